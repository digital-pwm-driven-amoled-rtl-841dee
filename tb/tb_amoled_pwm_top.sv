// End-to-end testbench of amoled_pwm_top at its default size (64 x 160 pixels, 16 linedriver
// blocks, 960-slot subframes). It loads a random 8-bit image, runs four frames and checks:
//  * light output: over one whole frame every pixel is lit for exactly the time the encoding
//    table gives for its value (sum over subframes of first-drive bit x spacing plus
//    second-drive bit x (960 - spacing)), and within 75 slots of value x 30 slots;
//  * column currents: every slot, each column's DAC code equals the number of lit pixels of that
//    column one slot earlier;
//  * a host write during operation changes the light output of exactly those pixels from the
//    next frame on.
// It counts the mechanisms of the design and fails if one never happened: two pulses in the
// linedriver at once, a select line on every clock A/B/C, a block-boundary (2-clock) stage firing,
// subframe 8 with a single drive, first drives writing a constant 0, frame starts.
module tb_amoled_pwm_top;
  import amoled_pwm_pkg::*;
  localparam int NL = 160, NC = 64, SF = 960, FRAME = 8 * SF;
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
  logic [7:0] img [NL][NC];
  int on_time [NL][NC];
  int n_both = 0, n_on_clk [3] = '{0, 0, 0}, n_boundary = 0, n_frames = 0, n_sf8_single = 0;
  int n_zero_drive = 0, n_second = 0;

  int spacing    [8] = '{30, 30, 57, 117, 231, 231, 465, -1};
  int first_tab  [8] = '{-1, 0, 1, 2, 3, 7, 4, 5};
  int second_tab [8] = '{ 7, 7, 7, 7, 6, 6, 6, -2};

  function automatic int expected_on(input logic [7:0] v);
    int t = 0;
    for (int s = 0; s < 8; s++) begin
      if (first_tab[s] >= 0 && v[first_tab[s]])
        t += (spacing[s] > 0) ? spacing[s] : SF;
      if (second_tab[s] >= 0 && v[second_tab[s]])
        t += SF - spacing[s];
    end
    return t;
  endfunction

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL slot %0d: %s", slot, what);
    end
  endtask

  // per-slot monitors
  int prev_count [NC];
  int selects_in_sf [NL];
  always @(negedge clk) if (rst_n) begin
    automatic int cnt [NC];
    // light integration for the two measurement windows
    if ((slot >= FRAME && slot < 2 * FRAME) || (slot >= 3 * FRAME && slot < 4 * FRAME))
      for (int l = 0; l < NL; l++)
        for (int c = 0; c < NC; c++)
          on_time[l][c] += pixel_on[l][c];
    // column currents against the lit pixels of the previous slot
    for (int c = 0; c < NC; c++) cnt[c] = 0;
    for (int l = 0; l < NL; l++)
      for (int c = 0; c < NC; c++) cnt[c] += pixel_on[l][c];
    if (slot > 500)
      for (int c = 0; c < NC; c++)
        chk(dac_code[c] == 12'(prev_count[c]), "DAC code = lit pixels in column");
    prev_count = cnt;
    // mechanisms
    if (both_active) n_both++;
    if (frame_start) n_frames++;
    if (select != '0) begin
      chk($onehot(select), "one select line at a time");
      for (int p = 0; p < 3; p++) if (clk_abc[p]) n_on_clk[p]++;
      for (int b = 1; b < NL / 10; b++) if (select[10 * b]) n_boundary++;
      for (int l = 0; l < NL; l++) if (select[l]) selects_in_sf[l]++;
      if (subframe == 3'd0 && data_line == '0) n_zero_drive++;
    end
    if (slot % SF == SF - 1) begin
      automatic int exp_n = (subframe == 3'd7) ? 1 : 2;
      if (slot > SF) begin
        for (int l = 0; l < NL; l++) chk(selects_in_sf[l] == exp_n, "drives per line per subframe");
        if (subframe == 3'd7) n_sf8_single++;
        else n_second++;
      end
      foreach (selects_in_sf[l]) selects_in_sf[l] = 0;
    end
  end
  always @(posedge clk) if (rst_n) slot <= slot + 1;

  task automatic check_window(input string tag);
    int worst = 0;
    for (int l = 0; l < NL; l++)
      for (int c = 0; c < NC; c++) begin
        automatic int e = expected_on(img[l][c]);
        automatic int d = on_time[l][c] - 30 * int'(img[l][c]);
        chk(on_time[l][c] == e, {tag, ": on-time per encoding table"});
        if (d < 0) d = -d;
        if (d > worst) worst = d;
        chk(d <= 75, {tag, ": on-time close to value x 30 slots"});
        on_time[l][c] = 0;
      end
    $display("%s: largest deviation from value x 30 slots: %0d slots", tag, worst);
  endtask

  task automatic host_write(input int l, input int c, input logic [7:0] v);
    wr_en = 1'b1; wr_line = 8'(l); wr_col = 6'(c); wr_data = v;
    img[l][c] = v;
    @(posedge clk); #1 wr_en = 1'b0;
  endtask

  initial begin
    foreach (on_time[l, c]) on_time[l][c] = 0;
    foreach (prev_count[c]) prev_count[c] = 0;
    foreach (selects_in_sf[l]) selects_in_sf[l] = 0;
    // load the image while the drive is held in reset
    @(posedge clk); #1;
    for (int l = 0; l < NL; l++)
      for (int c = 0; c < NC; c++) begin
        automatic logic [7:0] v = 8'($urandom);
        if (l == 0) v = 8'(c * 4);        // include 0 and the value of the figure
        if (l == 1 && c == 0) v = 8'hFF;
        if (l == 1 && c == 1) v = 8'b1001_1001;
        host_write(l, c, v);
      end
    #1 rst_n = 1'b1;
    while (slot < 2 * FRAME) @(negedge clk);
    check_window("frame 2");
    // host writes during operation: 64 pixels change
    while (slot < 2 * FRAME + 100) @(negedge clk);
    #1;
    for (int i = 0; i < 64; i++)
      host_write($urandom_range(NL - 1), $urandom_range(NC - 1), 8'($urandom));
    while (slot < 4 * FRAME) @(negedge clk);
    check_window("frame 4");
    chk(n_both > 0, "two pulses in the linedriver at once");
    chk(n_on_clk[0] > 0 && n_on_clk[1] > 0 && n_on_clk[2] > 0, "select lines on clocks A, B and C");
    chk(n_boundary > 0, "block-boundary stage fired");
    chk(n_sf8_single > 0, "subframe 8 with a single drive");
    chk(n_second > 0, "subframes with two drives");
    chk(n_zero_drive > 0, "first drive of subframe 1 writes 0");
    chk(n_frames >= 4, "frame starts");
    $display("both pulses in flight %0d slots; selects on A/B/C %0d/%0d/%0d; boundary fires %0d",
             n_both, n_on_clk[0], n_on_clk[1], n_on_clk[2], n_boundary);
    $display("frames %0d; single-drive subframes %0d; two-drive subframes %0d; zero drives %0d",
             n_frames, n_sf8_single, n_second, n_zero_drive);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * FRAME + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
