// Shared constants and helper functions of the digital PWM AMOLED drive.
//
// The display is scanned as 8 subframes per frame. In subframes 1..7 every select line is
// driven twice: once by a "first" pulse and, a fixed number of line slots later, once more by a
// "second" pulse that travels through the same shift register. Subframe 8 drives every line
// once. At each drive the pixel switch is set on or off from one bit of the 8-bit intensity
// b7..b0 (encoding table below). All of this follows the published scheme.
//
// Time base: one select-line pulse lasts one master-clock cycle ("pulse slot"); the three clocks
// A, B and C of the linedriver pulse in turn, one per slot. Inside a block of 10 line drivers a
// pulse moves one line every 3 slots, across a block boundary in 2 slots (the 2-clock-delay
// stage), so one block takes 29 slots. A line slot of the external 64x320 view is 3 pulses, and a
// subframe of 320 line slots is therefore 960 pulses (this design's reading of the timing).
//
// Delay between the two pulses of a subframe: the table gives it in select lines (10, 10, 20,
// 40, 80, 80, 160). The start pulses must both fall on the same clock phase, so the spacing is a
// multiple of 3 pulses; it is taken as the multiple of 3 nearest to the time the first pulse
// needs to travel that many lines (29 pulses per 10 lines). For delays of 10*2^k lines this is
// never exactly 29*2^k, which is what keeps two select lines from being driven in the same slot.
package amoled_pwm_pkg;

  localparam int unsigned PIX_BITS     = 8;

  // Clock phase names; phase index = slot number mod 3.
  typedef enum logic [1:0] {PH_A = 2'd0, PH_B = 2'd1, PH_C = 2'd2} phase_e;

  // What one drive of one subframe writes into the pixel: constant 0, or bit `idx` of b7..b0.
  typedef struct packed {
    logic       use_bit;  // 0: write a constant 0
    logic [2:0] idx;      // bit of the intensity that is written
  } bitsel_t;

  // Encoding table (0-based subframe index s = subframe number - 1).
  //   subframe : 1    2    3    4    5    6    7    8
  //   first    : 0    b0   b1   b2   b3   b7   b4   b5
  //   second   : b7   b7   b7   b7   b6   b6   b6   -
  function automatic bitsel_t first_bit(input logic [2:0] s);
    unique case (s)
      3'd0:    return '{use_bit: 1'b0, idx: 3'd0};
      3'd1:    return '{use_bit: 1'b1, idx: 3'd0};
      3'd2:    return '{use_bit: 1'b1, idx: 3'd1};
      3'd3:    return '{use_bit: 1'b1, idx: 3'd2};
      3'd4:    return '{use_bit: 1'b1, idx: 3'd3};
      3'd5:    return '{use_bit: 1'b1, idx: 3'd7};
      3'd6:    return '{use_bit: 1'b1, idx: 3'd4};
      default: return '{use_bit: 1'b1, idx: 3'd5};
    endcase
  endfunction

  function automatic bitsel_t second_bit(input logic [2:0] s);
    unique case (s)
      3'd0, 3'd1, 3'd2, 3'd3: return '{use_bit: 1'b1, idx: 3'd7};
      3'd4, 3'd5, 3'd6:       return '{use_bit: 1'b1, idx: 3'd6};
      default:                return '{use_bit: 1'b0, idx: 3'd0};  // subframe 8: no second drive
    endcase
  endfunction

  // Subframe 8 has no second drive.
  function automatic logic has_second(input logic [2:0] s);
    return s != 3'd7;
  endfunction

  // Delay between the two drives of subframe s, in select lines (table of the scheme).
  function automatic int unsigned delay_lines(input logic [2:0] s);
    unique case (s)
      3'd0, 3'd1: return 10;
      3'd2:       return 20;
      3'd3:       return 40;
      3'd4, 3'd5: return 80;
      3'd6:       return 160;
      default:    return 320;
    endcase
  endfunction

  // Pulses needed by one pulse to travel `lines` lines (a multiple of the block size).
  function automatic int unsigned travel_pulses(input int unsigned lines, input int unsigned block_lines);
    return (lines / block_lines) * (3 * (block_lines - 1) + 2);
  endfunction

  // Start-pulse spacing in pulses: travel time rounded to the nearest multiple of 3.
  function automatic int unsigned second_start_pulses(input logic [2:0] s, input int unsigned block_lines);
    int unsigned p;
    p = travel_pulses(delay_lines(s), block_lines);
    return ((p + 1) / 3) * 3;
  endfunction

  // Clock phase on which block b drives its select lines: A, C, B, A, ...
  function automatic int unsigned block_phase(input int unsigned b);
    return (2 * b) % 3;
  endfunction

endpackage
