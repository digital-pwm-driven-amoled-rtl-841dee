// Frame buffer: the image shown on the panel, N_LINES lines of N_COLS pixels of 8 bits.
//
// A host writes one pixel per cycle (wr_en, wr_line, wr_col, wr_data); the display side reads a
// whole line per cycle with one cycle of latency (rd_en in cycle t, rd_data valid from t+1 and
// held until the next read). There is a single copy of the image, so a write lands in the
// frame being scanned. The existence of an image store in the driving electronics follows the
// published set-up; its organisation and ports are this design's choices.
module frame_buffer #(
  parameter int unsigned N_LINES  = 160,
  parameter int unsigned N_COLS   = 64,
  parameter int unsigned PIX_BITS = 8,
  localparam int unsigned LINE_W  = $clog2(N_LINES),
  localparam int unsigned COL_W   = $clog2(N_COLS)
) (
  input  logic                               clk,
  input  logic                               wr_en,
  input  logic [LINE_W-1:0]                  wr_line,
  input  logic [COL_W-1:0]                   wr_col,
  input  logic [PIX_BITS-1:0]                wr_data,
  input  logic                               rd_en,
  input  logic [LINE_W-1:0]                  rd_line,
  output logic [N_COLS-1:0][PIX_BITS-1:0]    rd_data
);
  logic [N_COLS-1:0][PIX_BITS-1:0] mem [N_LINES];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_line][wr_col] <= wr_data;
    if (rd_en) rd_data <= mem[rd_line];
  end
endmodule
