// Column current bookkeeping for the per-column current DACs.
//
// With the pixel drive transistor used as a switch, the current of a column is set outside the
// panel: the column's current DAC must deliver one reference current (2 uA in the published
// display) for every pixel of that column that is switched on. This block keeps a shadow copy
// of the on/off state of every pixel and, per column, the number of lit pixels, which is the
// DAC code in units of the reference current.
//
// Each select event (ev_valid, in the slot in which select line ev_line is high and the data lines
// carry `data`) replaces the line's old states by the new ones: for every column the count moves
// by new - old, and the shadow line is overwritten. The new codes are valid from the next cycle.
// Lines never written since reset count as dark. The DAC code width (12 bits, the width of a
// common video current DAC) and everything inside are this design's choices; the published text
// only says that each DAC drives a multiple of the reference current.
module column_current_ctrl #(
  parameter int unsigned N_LINES = 160,
  parameter int unsigned N_COLS  = 64,
  parameter int unsigned DAC_W   = 12,
  localparam int unsigned LINE_W = $clog2(N_LINES)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          ev_valid,
  input  logic [LINE_W-1:0]             ev_line,
  input  logic [N_COLS-1:0]             data,
  output logic [N_COLS-1:0][DAC_W-1:0]  dac_code
);
  logic [N_COLS-1:0]  shadow [N_LINES];
  logic [N_LINES-1:0] written;
  logic [N_COLS-1:0]  old_line;

  assign old_line = written[ev_line] ? shadow[ev_line] : '0;

  always_ff @(posedge clk) begin
    if (ev_valid) shadow[ev_line] <= data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      written  <= '0;
      dac_code <= '0;
    end else if (ev_valid) begin
      written[ev_line] <= 1'b1;
      for (int c = 0; c < N_COLS; c++) begin
        if (data[c] && !old_line[c])      dac_code[c] <= dac_code[c] + DAC_W'(1);
        else if (!data[c] && old_line[c]) dac_code[c] <= dac_code[c] - DAC_W'(1);
      end
    end
  end

  initial assert (N_LINES < (1 << DAC_W)) else $error("DAC_W too small for N_LINES");
endmodule
