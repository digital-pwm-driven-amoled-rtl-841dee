// Testbench of frame_buffer: fills the whole 160 x 64 x 8b image with a pattern, reads every line
// back, checks one-cycle read latency and that read data holds without rd_en, and overwrites
// single pixels.
module tb_frame_buffer;
  localparam int NL = 160, NC = 64;
  logic clk = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [7:0] wr_line = '0, rd_line = '0;
  logic [5:0] wr_col = '0;
  logic [7:0] wr_data = '0;
  logic [NC-1:0][7:0] rd_data;
  int checks = 0, failures = 0;

  frame_buffer dut (.clk, .wr_en, .wr_line, .wr_col, .wr_data, .rd_en, .rd_line, .rd_data);
  always #5 clk = ~clk;

  function automatic logic [7:0] pat(input int l, input int c);
    return 8'(l * 7 + c * 13 + (l ^ c));
  endfunction

  task automatic check_line(input int l);
    rd_en = 1'b1; rd_line = 8'(l);
    @(posedge clk); #1 rd_en = 1'b0;
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (rd_data[c] !== pat(l, c)) begin
        failures++;
        if (failures < 10) $display("FAIL line %0d col %0d: %h", l, c, rd_data[c]);
      end
    end
  endtask

  initial begin
    @(posedge clk); #1;
    for (int l = 0; l < NL; l++)
      for (int c = 0; c < NC; c++) begin
        wr_en = 1'b1; wr_line = 8'(l); wr_col = 6'(c); wr_data = pat(l, c);
        @(posedge clk); #1;
      end
    wr_en = 1'b0;
    for (int l = NL - 1; l >= 0; l--) check_line(l);
    // hold
    rd_line = 8'd5; @(posedge clk); #1;
    checks++; if (rd_data[0] !== pat(0, 0)) begin failures++; $display("FAIL hold"); end
    // single pixel overwrite
    wr_en = 1'b1; wr_line = 8'd77; wr_col = 6'd33; wr_data = 8'hA5;
    @(posedge clk); #1 wr_en = 1'b0;
    rd_en = 1'b1; rd_line = 8'd77; @(posedge clk); #1 rd_en = 1'b0;
    checks++; if (rd_data[33] !== 8'hA5) begin failures++; $display("FAIL overwrite"); end
    checks++; if (rd_data[32] !== pat(77, 32)) begin failures++; $display("FAIL neighbour"); end
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
