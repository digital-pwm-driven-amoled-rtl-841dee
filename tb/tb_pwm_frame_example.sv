// Workload testbench: the one-frame encoding example of the drive scheme. Columns 0..31 of the
// image hold intensity 10011001 and columns 32..63 its complement 01100110. For every line and
// every select event of three frames it checks the pixel state written (15 drives per frame in
// the order of the encoding table) and the time until that line's next drive (start spacing of
// the subframe for a first drive, the rest of the 960-slot subframe for a second drive, the whole
// subframe for subframe 8). It also checks that every column's DAC code equals the lit pixels.
// Runs the top at its default size.
module tb_pwm_frame_example;
  localparam int NL = 160, NC = 64, SF = 960;
  logic clk = 1'b0, rst_n = 1'b0, panel_reset = 1'b0;
  logic wr_en = 1'b0;
  logic [7:0] wr_line = '0, wr_data = '0;
  logic [5:0] wr_col = '0;
  logic [2:0] clk_abc, subframe;
  logic start, frame_start, both_active;
  logic [NL-1:0] select;
  logic [NC-1:0] data_line;
  logic [NC-1:0][11:0] dac_code;
  logic [NL-1:0][NC-1:0] pixel_on;

  amoled_pwm_top dut (.clk, .rst_n, .panel_reset, .wr_en, .wr_line, .wr_col, .wr_data,
                      .clk_abc, .start, .select, .data_line, .dac_code, .pixel_on,
                      .subframe, .frame_start, .both_active);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, slot = 0;
  // pixel state after each of the 15 drives of a frame
  //                       sf1   sf2   sf3   sf4   sf5   sf6   sf7   sf8
  logic seq_99 [15] = '{0, 1, 1, 1, 0, 1, 0, 1, 1, 0, 1, 0, 1, 0, 0};
  logic seq_66 [15] = '{0, 0, 0, 0, 1, 0, 1, 0, 0, 1, 0, 1, 0, 1, 1};
  // slots from each drive to the next drive of the same line
  int gap [15] = '{30, 930, 30, 930, 57, 903, 117, 843, 231, 729, 231, 729, 465, 495, 960};
  int n_ev [NL];
  int last_t [NL];

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL slot %0d: %s", slot, what);
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    for (int l = 0; l < NL; l++) if (select[l]) begin
      automatic int e = n_ev[l] % 15;
      chk(pixel_on[l][0] == seq_99[e] && pixel_on[l][31] == seq_99[e], "10011001 pixel state");
      chk(pixel_on[l][32] == seq_66[e] && pixel_on[l][63] == seq_66[e], "01100110 pixel state");
      if (n_ev[l] > 0) begin
        automatic int pe = (n_ev[l] - 1) % 15;
        chk(slot - last_t[l] == gap[pe], "time between drives");
      end
      last_t[l] = slot;
      n_ev[l]++;
    end
    if (slot > 500)
      for (int c = 0; c < NC; c += 21) begin
        automatic int n = 0;
        for (int l = 0; l < NL; l++) n += pixel_on[l][c];
        // codes lag the pixels by one slot: compare only when no line is selected
        if (select == '0) chk(dac_code[c] == 12'(n), "DAC code");
      end
  end
  always @(posedge clk) if (rst_n) slot <= slot + 1;

  initial begin
    foreach (n_ev[l]) n_ev[l] = 0;
    foreach (last_t[l]) last_t[l] = 0;
    @(posedge clk); #1;
    for (int l = 0; l < NL; l++)
      for (int c = 0; c < NC; c++) begin
        wr_en = 1'b1; wr_line = 8'(l); wr_col = 6'(c); wr_data = c < 32 ? 8'b1001_1001 : 8'b0110_0110;
        @(posedge clk); #1;
      end
    wr_en = 1'b0;
    #1 rst_n = 1'b1;
    while (slot < 3 * 8 * SF) @(negedge clk);
    foreach (n_ev[l]) chk(n_ev[l] == 45, "15 drives per line per frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * 8 * SF + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
