// Select linedriver integrated on the foil: one shift register of N_BLOCKS blocks of
// LINES_PER_BLOCK line drivers (16 x 10 = 160 select lines in the published display).
//
// Block b drives its lines under clock A, C, B, A, ... (phase 2b mod 3), because each block's
// 2-clock-delay first stage shifts the phase by one clock. The start pulse enters the first block
// on clock B (clk1 of block 0). A pulse that enters in slot t0 drives line k = 10b + i in slot
// t0 + 2 + 29b + 3i. Because the register is a plain shift register, several pulses can travel
// through it at once; the timing controller injects two per subframe, spaced so that no two
// select lines are ever high in the same slot (checked by an assertion below).
//
// Interface: ph = {C, B, A} one-slot clock enables from the timing controller; start = the
// start pulse (one slot, on clock B); sel[k] = select line k, each high for one slot.
module line_driver #(
  parameter int unsigned N_BLOCKS        = 16,
  parameter int unsigned LINES_PER_BLOCK = 10,
  localparam int unsigned N_LINES        = N_BLOCKS * LINES_PER_BLOCK
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               reset,
  input  logic [2:0]         ph,
  input  logic               start,
  output logic [N_LINES-1:0] sel
);
  for (genvar b = 0; b < N_BLOCKS; b++) begin : g_block
    logic line_in, next_in;
    if (b == 0) begin : g_in_first
      assign line_in = start;
    end else begin : g_in
      assign line_in = sel[b*LINES_PER_BLOCK - 1];
    end
    if (b == N_BLOCKS - 1) begin : g_next_last
      assign next_in = 1'b0;
    end else begin : g_next
      assign next_in = sel[(b+1)*LINES_PER_BLOCK];
    end

    ld_block #(
      .LINES      (LINES_PER_BLOCK),
      .BLOCK_PHASE((2 * b) % 3)
    ) u_block (
      .clk, .rst_n, .reset, .ph,
      .line_in, .next_in,
      .sel(sel[b*LINES_PER_BLOCK +: LINES_PER_BLOCK])
    );
  end

  // Never two select lines at once.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sel));
endmodule
