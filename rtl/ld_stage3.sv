// One line driver with a delay of 3 clock pulses (nine per block of ten).
//
// Cycle-level digital equivalent of the bootstrapped, unipolar n-type stage of the linedriver on
// foil. The stage sees three of the linedriver clocks under the names clk1, clk2 and clk3, as in
// the published schematic; here each is a one-slot-wide enable pulse (ph_clk*) synchronous to the
// master clock `clk`, and exactly one of the three is high in any slot. clk3 is the clock that
// this stage and its neighbours in the same block drive their select lines with.
//
// Operation: the previous select line is high during a clk3 slot; the stage captures it (input
// node), moves it on at clk1 and at clk2 (the bootstrap node), and at the next clk3 pulse passes
// that pulse to its own select line `out`. Delay: exactly 3 slots from out_prev to out. As in the
// schematic, the following select line `out_next` discharges the stage, and `reset` clears it.
// The circuit has two clocked inverting stages and one bootstrapped output stage; here each of
// the three is one state bit (n_in, n_mid, n_boot), stored without inversion. Which transistor
// does what inside is not reproduced; only the timing behaviour is.
//
// Interface: out is combinational from a register and ph_clk3 (one slot wide, no glitch in
// a synchronous simulation); all state is reset by rst_n (asynchronous) or reset (synchronous).
module ld_stage3 (
  input  logic clk,
  input  logic rst_n,
  input  logic reset,     // panel reset line
  input  logic ph_clk1,
  input  logic ph_clk2,
  input  logic ph_clk3,
  input  logic out_prev,  // OUT(n-1)
  input  logic out_next,  // OUT(n+1)
  output logic out        // OUT(n), the select line
);
  logic n_in;    // pulse captured from OUT(n-1)
  logic n_mid;   // after clk1
  logic n_boot;  // after clk2: stage armed to pass the next clk3 pulse

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_in   <= 1'b0;
      n_mid  <= 1'b0;
      n_boot <= 1'b0;
    end else if (reset) begin
      n_in   <= 1'b0;
      n_mid  <= 1'b0;
      n_boot <= 1'b0;
    end else begin
      if (ph_clk3) begin
        n_in   <= out_prev;
        n_boot <= 1'b0;          // output pulse delivered
      end
      if (ph_clk1) begin
        n_mid <= n_in;
        n_in  <= 1'b0;
      end
      if (ph_clk2) begin
        n_boot <= n_mid;
        n_mid  <= 1'b0;
      end
      if (out_next) n_boot <= 1'b0;
    end
  end

  assign out = n_boot & ph_clk3;

  // The three clocks never pulse together.
  a_one_clock: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({ph_clk1, ph_clk2, ph_clk3}));
endmodule
