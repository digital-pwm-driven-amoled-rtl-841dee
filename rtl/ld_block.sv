// Block of line drivers: one 2-clock-delay stage followed by LINES-1 3-clock-delay stages.
//
// All select lines of a block are driven under one of the three linedriver clocks, given by
// BLOCK_PHASE (0 = A, 1 = B, 2 = C). Every stage receives the clocks rotated so that its clk3 is
// the block's clock, its clk1 the clock after it and its clk2 the one after that. The first stage
// takes the last select line of the previous block, which was driven on clk1 of this block, and
// delays it by 2 pulses; the others delay by 3 pulses. A pulse therefore crosses the block in
// 2 + 3*(LINES-1) slots (29 for ten lines) and leaves on a different clock than it came in on.
// The published block has ten line drivers, one of the 2-clock kind; placing that one first in
// the block is this design's reading of the layout.
//
// Interface: ph = {C, B, A} one-slot clock enables; line_in = previous select line (or the start
// pulse for the first block); next_in = first select line of the next block; sel = this block's
// select lines, sel[0] first.
module ld_block #(
  parameter int unsigned LINES       = 10,
  parameter int unsigned BLOCK_PHASE = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             reset,
  input  logic [2:0]       ph,
  input  logic             line_in,
  input  logic             next_in,
  output logic [LINES-1:0] sel
);
  localparam int unsigned P3 = BLOCK_PHASE % 3;
  localparam int unsigned P1 = (BLOCK_PHASE + 1) % 3;
  localparam int unsigned P2 = (BLOCK_PHASE + 2) % 3;

  logic [LINES:1] nxt;  // nxt[i+1] = OUT(i+1), the line after stage i
  assign nxt = {next_in, sel[LINES-1:1]};

  ld_stage2 u_first (
    .clk, .rst_n, .reset,
    .ph_clk1(ph[P1]), .ph_clk2(ph[P2]), .ph_clk3(ph[P3]),
    .out_prev(line_in), .out_next(nxt[1]), .out(sel[0])
  );

  for (genvar i = 1; i < LINES; i++) begin : g_stage
    ld_stage3 u_stage (
      .clk, .rst_n, .reset,
      .ph_clk1(ph[P1]), .ph_clk2(ph[P2]), .ph_clk3(ph[P3]),
      .out_prev(sel[i-1]), .out_next(nxt[i+1]), .out(sel[i])
    );
  end
endmodule
