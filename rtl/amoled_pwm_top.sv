// Digital PWM-driven AMOLED display: driving electronics, select linedriver and pixel matrix.
//
// Instead of setting each pixel's brightness with an analog gate voltage (which needs a large
// drain-source voltage across the drive transistor and wastes static power), every pixel is
// used as an on/off switch and its brightness is set by how long it is on within a frame
// (pulse-width modulation with 8 bits). The column current while a pixel is on is imposed by an
// external current DAC per column. To reach 8 bits with almost 100% on-time, a frame is split
// into 8 subframes in which each select line is driven twice (once in the last subframe); both
// select pulses travel through one shift register, the linedriver on the foil.
//
// Blocks: pwm_timing_ctrl (clocks A/B/C, start pulses, select-event prediction), frame_buffer
// (the 8-bit image), pwm_bit_encoder (data lines from the encoding table), line_driver (16 blocks
// of 10 line drivers, 160 select lines), pixel_array (behavioural model of the 64x160 pixels) and
// column_current_ctrl (current DAC codes). The current DACs themselves are outside; their codes
// are outputs.
//
// Timing: one master-clock cycle is one clock pulse of the linedriver (200 kHz in the published
// display); a subframe is SUBFRAME_PULSES cycles and a frame 8 subframes. A select event for line
// l is announced two cycles ahead; the frame buffer is read one cycle ahead; the data lines are
// stable during the cycle in which select line l is high; the DAC codes follow one cycle later.
// Host writes to the frame buffer take effect at the next drive of the pixel's line.
module amoled_pwm_top
  import amoled_pwm_pkg::*;
#(
  parameter int unsigned N_BLOCKS        = 16,
  parameter int unsigned LINES_PER_BLOCK = 10,
  parameter int unsigned N_COLS          = 64,
  parameter int unsigned SUBFRAME_PULSES = 960,
  parameter int unsigned DAC_W           = 12,
  localparam int unsigned N_LINES = N_BLOCKS * LINES_PER_BLOCK,
  localparam int unsigned LINE_W  = $clog2(N_LINES),
  localparam int unsigned COL_W   = $clog2(N_COLS)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          panel_reset,
  // host port of the frame buffer
  input  logic                          wr_en,
  input  logic [LINE_W-1:0]             wr_line,
  input  logic [COL_W-1:0]              wr_col,
  input  logic [PIX_BITS-1:0]           wr_data,
  // linedriver clocks and start pulse, select lines, data lines
  output logic [2:0]                    clk_abc,
  output logic                          start,
  output logic [N_LINES-1:0]            select,
  output logic [N_COLS-1:0]             data_line,
  // codes for the column current DACs, in units of the pixel reference current
  output logic [N_COLS-1:0][DAC_W-1:0]  dac_code,
  // light output of the pixel model
  output logic [N_LINES-1:0][N_COLS-1:0] pixel_on,
  output logic [2:0]                    subframe,
  output logic                          frame_start,
  output logic                          both_active
);
  logic                              rd_valid, enc_load, ev_valid;
  logic [LINE_W-1:0]                 rd_line, ev_line;
  bitsel_t                           enc_bitsel;
  logic [N_COLS-1:0][PIX_BITS-1:0]   line_pixels;

  pwm_timing_ctrl #(
    .N_BLOCKS(N_BLOCKS), .LINES_PER_BLOCK(LINES_PER_BLOCK), .SUBFRAME_PULSES(SUBFRAME_PULSES)
  ) u_ctrl (
    .clk, .rst_n,
    .ph(clk_abc), .start,
    .rd_valid, .rd_line, .rd_bitsel(),
    .enc_load, .enc_bitsel,
    .ev_valid, .ev_line,
    .subframe, .frame_start, .both_active
  );

  frame_buffer #(
    .N_LINES(N_LINES), .N_COLS(N_COLS), .PIX_BITS(PIX_BITS)
  ) u_fb (
    .clk,
    .wr_en, .wr_line, .wr_col, .wr_data,
    .rd_en(rd_valid), .rd_line, .rd_data(line_pixels)
  );

  pwm_bit_encoder #(.N_COLS(N_COLS)) u_enc (
    .clk, .rst_n,
    .load(enc_load), .bitsel(enc_bitsel), .pixels(line_pixels),
    .data(data_line)
  );

  line_driver #(.N_BLOCKS(N_BLOCKS), .LINES_PER_BLOCK(LINES_PER_BLOCK)) u_ld (
    .clk, .rst_n, .reset(panel_reset),
    .ph(clk_abc), .start, .sel(select)
  );

  pixel_array #(.N_LINES(N_LINES), .N_COLS(N_COLS)) u_pix (
    .sel(select), .data(data_line), .pixel_on
  );

  column_current_ctrl #(.N_LINES(N_LINES), .N_COLS(N_COLS), .DAC_W(DAC_W)) u_cur (
    .clk, .rst_n,
    .ev_valid, .ev_line, .data(data_line),
    .dac_code
  );

  // The controller's prediction and the linedriver agree: the announced line fires.
  a_predicted: assert property (@(posedge clk) disable iff (!rst_n || panel_reset)
    ev_valid |-> select[ev_line]);
  a_no_unpredicted: assert property (@(posedge clk) disable iff (!rst_n || panel_reset)
    (select != '0) |-> ev_valid);
endmodule
