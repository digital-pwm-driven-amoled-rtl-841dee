// Testbench of the pixel_array model: a pixel takes its data line only while its select line is
// high, and keeps the value afterwards whatever the data lines do.
module tb_pixel_array;
  localparam int NL = 160, NC = 64;
  logic [NL-1:0] sel = '0;
  logic [NC-1:0] data = '0;
  logic [NL-1:0][NC-1:0] pixel_on, ref_img;
  int checks = 0, failures = 0;

  pixel_array dut (.sel, .data, .pixel_on);

  initial begin
    for (int l = 0; l < NL; l++) begin
      data = {$urandom, $urandom};
      sel[l] = 1'b1; #1; sel[l] = 1'b0; #1;
      ref_img[l] = data;
      data = ~data; #1;
    end
    for (int i = 0; i < 3000; i++) begin
      automatic int l = $urandom_range(NL - 1);
      data = {$urandom, $urandom}; #1;
      if ($urandom_range(1)) begin
        sel[l] = 1'b1; #1; ref_img[l] = data; sel[l] = 1'b0; #1;
      end
      data = {$urandom, $urandom}; #1;
      checks++;
      if (pixel_on !== ref_img) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
