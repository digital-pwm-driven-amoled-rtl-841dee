// Testbench of column_current_ctrl: random line writes; after each one every column's DAC code
// must equal the number of lit pixels in that column of a reference image kept here.
module tb_column_current_ctrl;
  localparam int NL = 160, NC = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ev_valid = 1'b0;
  logic [7:0] ev_line = '0;
  logic [NC-1:0] data = '0;
  logic [NC-1:0][11:0] dac_code;
  logic [NC-1:0] img [NL];
  int checks = 0, failures = 0;

  column_current_ctrl dut (.clk, .rst_n, .ev_valid, .ev_line, .data, .dac_code);
  always #5 clk = ~clk;

  task automatic compare();
    for (int c = 0; c < NC; c++) begin
      automatic int n = 0;
      for (int l = 0; l < NL; l++) n += img[l][c];
      checks++;
      if (dac_code[c] !== 12'(n)) begin
        failures++;
        if (failures < 10) $display("FAIL col %0d: code %0d expected %0d", c, dac_code[c], n);
      end
    end
  endtask

  initial begin
    for (int l = 0; l < NL; l++) img[l] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    compare();
    for (int i = 0; i < 2000; i++) begin
      automatic int l = $urandom_range(NL - 1);
      // mostly lit lines early on, so that columns fill up, then random
      data = i < 400 ? ~64'($urandom_range(3)) : {$urandom, $urandom};
      ev_line = 8'(l); ev_valid = 1'b1;
      img[l] = data;
      @(posedge clk); #1 ev_valid = 1'b0;
      data = {$urandom, $urandom};  // no effect without ev_valid
      @(posedge clk); #1;
      if (i % 10 == 0) compare();
    end
    // all lines full, then all dark
    for (int v = 0; v < 2; v++)
      for (int l = 0; l < NL; l++) begin
        data = v == 0 ? '1 : '0; ev_line = 8'(l); ev_valid = 1'b1; img[l] = data;
        @(posedge clk); #1 ev_valid = 1'b0;
        if (l == NL - 1) compare();
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
