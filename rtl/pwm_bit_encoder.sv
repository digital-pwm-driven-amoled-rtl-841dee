// Data-line encoder: turns one line of 8-bit pixel intensities into the on/off values the data
// lines carry while that line is selected.
//
// For each pixel it takes the bit of b7..b0 that the encoding table assigns to the current drive
// (first or second drive of the current subframe), or a constant 0 for the first drive of
// subframe 1; the table itself is in amoled_pwm_pkg. The result is registered: when `load` is
// high in slot t the data lines hold the new values from slot t+1 on, and keep them until the next
// load. The table follows the published scheme; the register is this design's choice.
module pwm_bit_encoder
  import amoled_pwm_pkg::*;
#(
  parameter int unsigned N_COLS = 64
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             load,
  input  bitsel_t                          bitsel,
  input  logic [N_COLS-1:0][PIX_BITS-1:0]  pixels,
  output logic [N_COLS-1:0]                data
);
  logic [N_COLS-1:0] data_d;

  always_comb begin
    for (int c = 0; c < N_COLS; c++)
      data_d[c] = bitsel.use_bit && pixels[c][bitsel.idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    data <= '0;
    else if (load) data <= data_d;
  end
endmodule
