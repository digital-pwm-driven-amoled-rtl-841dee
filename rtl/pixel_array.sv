// Behavioural model of the pixel matrix on foil: N_LINES x N_COLS 2T1C a-IGZO pixels with
// top-emitting OLEDs. Not synthesizable logic in the product: each pixel is two thin-film
// transistors, a storage capacitor and an OLED.
//
// In the PWM drive the drive transistor is used as a switch, so each pixel reduces to one bit:
// while its select line is high the switch transistor copies the column's data line onto the
// storage capacitor, and the pixel is lit (draws the column's reference current) while that
// stored value is 1. The model is therefore a transparent latch per pixel (the latches are
// intended; they are the storage capacitors). Like the physical capacitors, the model powers up
// in an unknown state; the drive writes every pixel within the first subframe.
//
// Interface: sel[l] = select line l; data[c] = data line of column c; pixel_on[l][c] = pixel lit.
module pixel_array #(
  parameter int unsigned N_LINES = 160,
  parameter int unsigned N_COLS  = 64
) (
  input  logic [N_LINES-1:0]             sel,
  input  logic [N_COLS-1:0]              data,
  output logic [N_LINES-1:0][N_COLS-1:0] pixel_on
);
  for (genvar l = 0; l < N_LINES; l++) begin : g_line
    always_latch begin
      if (sel[l]) pixel_on[l] = data;
    end
  end

endmodule
