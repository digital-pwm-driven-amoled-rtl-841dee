// Testbench of ld_stage3: the select pulse must appear exactly 3 slots after the input pulse,
// on a clk3 slot, once; out_next and reset must cancel a pending pulse.
module tb_ld_stage3;
  logic clk = 1'b0, rst_n = 1'b0, reset = 1'b0;
  logic [2:0] ph;  // {clk3, clk2, clk1}
  logic out_prev = 1'b0, out_next = 1'b0, out;
  int   checks = 0, failures = 0;
  int   slot = 0;

  ld_stage3 dut (.clk, .rst_n, .reset, .ph_clk1(ph[0]), .ph_clk2(ph[1]), .ph_clk3(ph[2]),
                 .out_prev, .out_next, .out);

  always #5 clk = ~clk;
  // slot s: clk1 when s%3==0, clk2 when 1, clk3 when 2
  always_comb ph = 3'b001 << (slot % 3);
  always @(posedge clk) slot <= slot + 1;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: slot %0d got %0b expected %0b", what, slot, got, exp);
    end
  endtask

  // Wait until the current slot is a clk3 slot.
  task automatic to_clk3();
    while (slot % 3 != 2) begin @(posedge clk); #1; end
  endtask

  // Put a one-slot pulse on out_prev in this slot, then watch `n` slots and return the
  // slot offset of every out pulse (bit i set = pulse i slots after the input).
  task automatic pulse_and_watch(input int n, input int clear_at, output logic [15:0] seen);
    seen = '0;
    out_prev = 1'b1;
    #1 seen[0] = out;
    @(posedge clk); #1 out_prev = 1'b0;
    for (int i = 1; i < n; i++) begin
      out_next = (i == clear_at);
      #0 seen[i] = out;
      @(posedge clk); #1;
    end
    out_next = 1'b0;
  endtask

  logic [15:0] seen;
  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // normal shift, several times
    for (int r = 0; r < 4; r++) begin
      to_clk3();
      pulse_and_watch(12, -1, seen);
      check(seen[3], 1'b1, "pulse 3 slots later");
      check(seen == 16'h0008, 1'b1, "exactly one pulse");
    end
    // input pulse on a non-clk3 slot is not taken
    to_clk3(); @(posedge clk); #1;
    pulse_and_watch(12, -1, seen);
    check(seen == 16'h0000, 1'b1, "input outside clk3 ignored");
    // out_next (next line) discharges the stage before it fires
    to_clk3();
    pulse_and_watch(12, 2, seen);
    check(seen == 16'h0000, 1'b1, "out_next cancels");
    // reset clears a pending pulse
    to_clk3();
    out_prev = 1'b1; @(posedge clk); #1 out_prev = 1'b0; reset = 1'b1;
    @(posedge clk); #1 reset = 1'b0;
    seen = '0;
    for (int i = 0; i < 8; i++) begin seen[i] = out; @(posedge clk); #1; end
    check(seen == 16'h0000, 1'b1, "reset cancels");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
