// Timing controller of the digital PWM drive (the logic of the external driving electronics).
//
// It generates the three linedriver clocks A, B, C (one pulse per master-clock slot, in turn),
// counts pulses, subframes and frames, and raises the linedriver start pulse twice per subframe
// (once in subframe 8): the first pulse at slot 1 of the subframe (on clock B, the clk1 of the
// first block), the second one amoled_pwm_pkg::second_start_pulses() slots later. The subframe
// length, the delays and the encoding table follow the published scheme; the slot offsets and the
// rounding of the delays to whole clock cycles are this design's choices (see the package).
//
// The linedriver has no output the controller could read, so the controller follows each
// travelling pulse with a tracker of its own (line number and slots to go) and announces every
// select event two slots ahead: in slot t-2 it emits rd_valid with the line and the bit of the
// encoding table to write, so that the frame buffer can be read in slot t-1 and the data lines
// are stable during slot t, when the select line fires.
//
// The same announcement is repeated one slot later (enc_*: load the data-line encoder) and two
// slots later (ev_*: the select line fires now, used for the column current bookkeeping).
//
// Interface: ph = {C, B, A}; start = linedriver input; rd_* = select event two slots ahead;
// subframe = current subframe (0..7); frame_start = one-slot pulse at the first slot of a frame;
// second_active = the second pulse of the subframe is travelling while the first still is.
module pwm_timing_ctrl
  import amoled_pwm_pkg::*;
#(
  parameter int unsigned N_BLOCKS        = 16,
  parameter int unsigned LINES_PER_BLOCK = 10,
  parameter int unsigned SUBFRAME_PULSES = 960,
  localparam int unsigned N_LINES = N_BLOCKS * LINES_PER_BLOCK,
  localparam int unsigned LINE_W  = $clog2(N_LINES),
  localparam int unsigned CNT_W   = $clog2(SUBFRAME_PULSES)
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [2:0]        ph,
  output logic              start,
  output logic              rd_valid,
  output logic [LINE_W-1:0] rd_line,
  output bitsel_t           rd_bitsel,
  output logic              enc_load,
  output bitsel_t           enc_bitsel,
  output logic              ev_valid,
  output logic [LINE_W-1:0] ev_line,
  output logic [2:0]        subframe,
  output logic              frame_start,
  output logic              both_active
);
  typedef struct packed {
    logic              active;
    logic [LINE_W-1:0] line;  // next line to announce
    logic [1:0]        wait_slots;
    logic [2:0]        sf;    // subframe the pulse belongs to
  } tracker_t;

  logic [CNT_W-1:0] cnt;
  logic [1:0]       ph_idx;
  logic [2:0]       sf;
  tracker_t         trk [2];  // [0] first pulse, [1] second pulse
  logic             inject [2];
  logic             announce [2];

  // Injection decided one slot before the start pulse is high.
  assign inject[0] = (cnt == CNT_W'(0));
  assign inject[1] = has_second(sf) &&
                     (cnt == CNT_W'(second_start_pulses(sf, LINES_PER_BLOCK)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      ph_idx <= 2'd0;
      sf     <= 3'd0;
      start  <= 1'b0;
    end else begin
      ph_idx <= (ph_idx == 2'd2) ? 2'd0 : ph_idx + 2'd1;
      start  <= inject[0] || inject[1];
      if (cnt == CNT_W'(SUBFRAME_PULSES - 1)) begin
        cnt <= '0;
        sf  <= sf + 3'd1;
      end else begin
        cnt <= cnt + CNT_W'(1);
      end
    end
  end

  // Announcement pipeline: slot t-2 (rd_*), t-1 (enc_*), t (ev_*).
  logic [LINE_W-1:0] enc_line;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enc_load   <= 1'b0;
      enc_bitsel <= '0;
      enc_line   <= '0;
      ev_valid   <= 1'b0;
      ev_line    <= '0;
    end else begin
      enc_load   <= rd_valid;
      enc_bitsel <= rd_bitsel;
      enc_line   <= rd_line;
      ev_valid   <= enc_load;
      ev_line    <= enc_line;
    end
  end

  for (genvar k = 0; k < 2; k++) begin : g_trk
    assign announce[k] = trk[k].active && (trk[k].wait_slots == 2'd0);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        trk[k] <= '0;
      end else if (inject[k]) begin
        trk[k] <= '{active: 1'b1, line: '0, wait_slots: 2'd0, sf: sf};
      end else if (announce[k]) begin
        if (trk[k].line == LINE_W'(N_LINES - 1)) begin
          trk[k].active <= 1'b0;
        end else begin
          trk[k].line <= trk[k].line + LINE_W'(1);
          // Next line is the first of a block: 2-pulse stage, else 3 pulses.
          trk[k].wait_slots <= ((32'(trk[k].line) + 1) % LINES_PER_BLOCK == 0) ? 2'd1 : 2'd2;
        end
      end else if (trk[k].active) begin
        trk[k].wait_slots <= trk[k].wait_slots - 2'd1;
      end
    end
  end

  always_comb begin
    ph          = 3'b001 << ph_idx;
    rd_valid    = announce[0] || announce[1];
    rd_line     = announce[1] ? trk[1].line : trk[0].line;
    rd_bitsel   = announce[1] ? second_bit(trk[1].sf) : first_bit(trk[0].sf);
    subframe    = sf;
    frame_start = (cnt == '0) && (sf == 3'd0);
    both_active = trk[0].active && trk[1].active;
  end

  initial begin
    assert (SUBFRAME_PULSES % 3 == 0)
      else $error("SUBFRAME_PULSES must be a multiple of 3");
    assert (SUBFRAME_PULSES > second_start_pulses(3'd6, LINES_PER_BLOCK) + 3 * N_LINES)
      else $error("SUBFRAME_PULSES too short for the delay table");
  end

  // Two select events can never fall into the same slot.
  a_one_event: assert property (@(posedge clk) disable iff (!rst_n) !(announce[0] && announce[1]));
endmodule
