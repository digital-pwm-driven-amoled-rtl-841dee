// Testbench of ld_block (one block of 10 line drivers under clock A). It injects start pulses in pairs with
// the spacings the timing controller uses (30 to 60 slots; the block is only 29 slots long) and, every slot, compares
// all select lines against a reference model: a pulse injected in slot t0 must drive line
// k = 10b + i in slot t0 + 2 + 29b + 3i. It also checks that no two lines are ever high together
// and that every line is driven on clock A.
module tb_ld_block;
  localparam int NB = 1, LPB = 10, NL = NB * LPB;
  logic clk = 1'b0, rst_n = 1'b0, reset = 1'b0;
  logic [2:0]    ph;
  logic          start = 1'b0;
  logic [NL-1:0] sel, exp_sel;
  int   checks = 0, failures = 0, slot = 0;
  int   inj [$];
  int   overlap_slots = 0, two_in_flight = 0;

  ld_block #(.LINES(LPB), .BLOCK_PHASE(0)) dut (.clk, .rst_n, .reset, .ph, .line_in(start), .next_in(1'b0), .sel);

  always #5 clk = ~clk;
  always_comb ph = 3'b001 << (slot % 3);
  always @(posedge clk) if (rst_n) slot <= slot + 1;

  function automatic int fire_time(input int t0, input int k);
    return t0 + 2 + 29 * (k / LPB) + 3 * (k % LPB);
  endfunction

  // Reference comparison, every slot, sampled mid-slot.
  always @(negedge clk) if (rst_n) begin
    int active;
    exp_sel = '0;
    active  = 0;
    foreach (inj[j]) begin
      if (slot >= inj[j] && slot <= fire_time(inj[j], NL - 1)) active++;
      for (int k = 0; k < NL; k++)
        if (fire_time(inj[j], k) == slot) exp_sel[k] = 1'b1;
    end
    if (active > 1) two_in_flight++;
    checks++;
    if (sel !== exp_sel) begin
      failures++;
      if (failures < 10) $display("FAIL slot %0d: sel mismatch", slot);
    end
    if ($countones(sel) > 1) overlap_slots++;
    if (sel[0])  begin checks++; if (ph !== 3'b001) failures++; end
    for (int k = 1; k < NL; k++) if (sel[k]) begin checks++; if (ph !== 3'b001) failures++; end
  end

  task automatic inject_at(input int t);
    while (slot != t) @(negedge clk);
    inj.push_back(t);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
  endtask

  int spacing [5] = '{30, 33, 36, 45, 60};
  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int s = 0; s < 5; s++) begin
      automatic int base = 10 + 960 * s;   // base % 3 == 1: clock B
      inject_at(base);
      inject_at(base + spacing[s]);
    end
    while (slot < 10 + 960 * 5 + 10) @(negedge clk);
    checks++;
    if (overlap_slots != 0) begin failures++; $display("FAIL: %0d slots with two select lines", overlap_slots); end
    $display("slots with two pulses in flight: %0d", two_in_flight);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
