// Line driver with a delay of 2 clock pulses: the first stage of every block of ten lines.
//
// Cycle-level digital equivalent of the stage built from two bootstrapped stages, one state bit
// each (n_in, n_boot). The previous
// select line (last line of the previous block) is driven under this stage's clk1; the stage
// captures it on clk1, moves it to its output node on clk2 and passes the clk3 pulse to its own
// select line. The delay is therefore 2 slots instead of 3, which makes the following block drive
// its lines on a different clock: the clock phase rotates every 10 lines. Clock enables as in
// ld_stage3 (one-slot pulses synchronous to `clk`). out_next discharges the output node as
// OUT(n+1) does in the published schematic; `reset` and rst_n clear the stage.
module ld_stage2 (
  input  logic clk,
  input  logic rst_n,
  input  logic reset,
  input  logic ph_clk1,
  input  logic ph_clk2,
  input  logic ph_clk3,
  input  logic out_prev,  // OUT(n-1), high during a clk1 slot
  input  logic out_next,  // OUT(n+1)
  output logic out        // OUT(n)
);
  logic n_in;    // charge sampled on the first capacitor at clk1
  logic n_boot;  // second bootstrapped node, set at clk2

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_in   <= 1'b0;
      n_boot <= 1'b0;
    end else if (reset) begin
      n_in   <= 1'b0;
      n_boot <= 1'b0;
    end else begin
      if (ph_clk1) n_in <= out_prev;
      if (ph_clk2) begin
        n_boot <= n_in;
        n_in   <= 1'b0;
      end
      if (ph_clk3 || out_next) n_boot <= 1'b0;
    end
  end

  assign out = n_boot & ph_clk3;

  a_one_clock: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({ph_clk1, ph_clk2, ph_clk3}));
endmodule
