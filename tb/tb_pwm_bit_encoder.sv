// Testbench of pwm_bit_encoder: random pixel lines, every drive of every subframe; the expected
// data lines come from the encoding table written out here as literal bit numbers.
module tb_pwm_bit_encoder;
  import amoled_pwm_pkg::*;
  localparam int NC = 64;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  bitsel_t bitsel;
  logic [NC-1:0][7:0] pixels;
  logic [NC-1:0] data, exp_data;
  int checks = 0, failures = 0;

  pwm_bit_encoder #(.N_COLS(NC)) dut (.clk, .rst_n, .load, .bitsel, .pixels, .data);
  always #5 clk = ~clk;

  // -1 = constant 0, -2 = no drive
  int first_tab  [8] = '{-1, 0, 1, 2, 3, 7, 4, 5};
  int second_tab [8] = '{ 7, 7, 7, 7, 6, 6, 6, -2};

  initial begin
    bitsel = '0; pixels = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int rep = 0; rep < 20; rep++)
      for (int s = 0; s < 8; s++)
        for (int d = 0; d < 2; d++) begin
          automatic int b = d == 0 ? first_tab[s] : second_tab[s];
          if (b == -2) continue;
          for (int c = 0; c < NC; c++) pixels[c] = 8'($urandom);
          bitsel = d == 0 ? first_bit(3'(s)) : second_bit(3'(s));
          for (int c = 0; c < NC; c++) exp_data[c] = (b < 0) ? 1'b0 : pixels[c][b];
          load = 1'b1;
          @(posedge clk); #1 load = 1'b0;
          checks++;
          if (data !== exp_data) begin
            failures++;
            $display("FAIL subframe %0d drive %0d", s + 1, d + 1);
          end
          // data lines hold while load is low
          pixels = ~pixels;
          @(posedge clk); #1;
          checks++;
          if (data !== exp_data) begin failures++; $display("FAIL hold"); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
