// Testbench of pwm_timing_ctrl over a little more than two frames at full size. A reference
// schedule is built here from the encoding table and the start-pulse spacings written out as
// numbers (30, 30, 57, 117, 231, 231, 465 slots; none in subframe 8): start pulses at slot 1 and
// 1 + spacing of every 960-slot subframe, line k of a pulse started in slot t0 fired in slot
// t0 + 2 + 29*(k/10) + 3*(k%10) and announced two slots before. Every slot it compares the
// clocks, start, announcements (line and bit), the enc_/ev_ copies, subframe and frame_start.
module tb_pwm_timing_ctrl;
  import amoled_pwm_pkg::*;
  localparam int NL = 160, SF = 960, FRAME = 8 * SF;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] ph, subframe;
  logic start, rd_valid, enc_load, ev_valid, frame_start, both_active;
  logic [7:0] rd_line, ev_line;
  bitsel_t rd_bitsel, enc_bitsel;
  int checks = 0, failures = 0, slot = 0;
  int both_seen = 0, second_drives = 0, single_subframes = 0;

  pwm_timing_ctrl dut (.clk, .rst_n, .ph, .start, .rd_valid, .rd_line, .rd_bitsel,
                       .enc_load, .enc_bitsel, .ev_valid, .ev_line,
                       .subframe, .frame_start, .both_active);
  always #5 clk = ~clk;

  int spacing [8] = '{30, 30, 57, 117, 231, 231, 465, -1};
  int first_tab  [8] = '{-1, 0, 1, 2, 3, 7, 4, 5};
  int second_tab [8] = '{ 7, 7, 7, 7, 6, 6, 6, -2};

  // expected announcement per slot: line, bit (-1 constant 0); -3 = none
  int ann_line [int];
  int ann_bit  [int];
  int start_at [int];

  task automatic add_pulse(input int t0, input int b);
    start_at[t0] = 1;
    for (int k = 0; k < NL; k++) begin
      automatic int t = t0 + 2 + 29 * (k / 10) + 3 * (k % 10) - 2;
      if (ann_line.exists(t)) begin
        failures++; $display("FAIL reference: two events in slot %0d", t);
      end
      ann_line[t] = k;
      ann_bit[t]  = b;
    end
  endtask

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL slot %0d: %s", slot, what);
    end
  endtask

  logic prev_rd_valid = 1'b0, prev2_rd_valid = 1'b0;
  logic [7:0] prev_rd_line, prev2_rd_line;
  bitsel_t prev_rd_bitsel;

  always @(negedge clk) if (rst_n) begin
    automatic int s_idx = (slot / SF) % 8;
    chk(ph == 3'(1 << (slot % 3)), "clock phase");
    chk(start == start_at.exists(slot), "start pulse");
    chk(subframe == 3'(s_idx), "subframe");
    chk(frame_start == (slot % FRAME == 0), "frame_start");
    if (ann_line.exists(slot)) begin
      chk(rd_valid && rd_line == 8'(ann_line[slot]), "announced line");
      if (ann_bit[slot] == -1) chk(!rd_bitsel.use_bit, "bit: constant 0");
      else chk(rd_bitsel.use_bit && rd_bitsel.idx == 3'(ann_bit[slot]), "bit index");
    end else begin
      chk(!rd_valid, "no announcement");
    end
    chk(enc_load == prev_rd_valid && (!enc_load || enc_bitsel == prev_rd_bitsel), "enc copy");
    chk(ev_valid == prev2_rd_valid && (!ev_valid || ev_line == prev2_rd_line), "ev copy");
    if (both_active) both_seen++;
    prev2_rd_valid = prev_rd_valid; prev2_rd_line = prev_rd_line;
    prev_rd_valid = rd_valid; prev_rd_line = rd_line; prev_rd_bitsel = rd_bitsel;
  end
  always @(posedge clk) if (rst_n) slot <= slot + 1;

  initial begin
    for (int f = 0; f < 3; f++)
      for (int s = 0; s < 8; s++) begin
        automatic int t = (f * 8 + s) * SF;
        add_pulse(t + 1, first_tab[s]);
        if (spacing[s] > 0) begin
          add_pulse(t + 1 + spacing[s], second_tab[s]);
          second_drives++;
        end else single_subframes++;
      end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    while (slot < 2 * FRAME + 600) @(posedge clk);
    chk(both_seen > 0, "two pulses in flight at some time");
    $display("slots with both pulses in flight: %0d", both_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * FRAME) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
