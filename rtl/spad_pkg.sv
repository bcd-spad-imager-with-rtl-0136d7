// spad_pkg: sizes, word types and readout-mode decoding shared by the
// macropixel imager.
//
// The in-pixel TDC measures a STOP time as a 7-bit coarse count of 415 MHz
// reference-clock periods plus a 5-bit fine code (32 bins of 75 ps per
// period), i.e. 12 bits and about 300 ns full scale. Each conversion is tagged
// with a 6-bit gate index (up to 64 gate windows per frame), giving an 18-bit
// timestamp. Event counters are 5 bits wide. Together a timestamp and one
// counter fill the 23-bit row readout bus. The bit split of the 18-bit word
// and the all-ones "empty" value are this design's choice.
`timescale 1ps/1ps
package spad_pkg;

  localparam int N_SPAD   = 4;   // SPADs per macropixel (2x2)
  localparam int N_PHASE  = 16;  // column clock lines CK<0>..CK<15>
  localparam int COARSE_W = 7;
  localparam int FINE_W   = 5;
  localparam int GATE_W   = 6;
  localparam int CNT_W    = 5;
  localparam int TS_W     = GATE_W + COARSE_W + FINE_W;  // 18
  localparam int BUS_W    = 23;
  localparam int BIN_PS   = 75;                          // fine LSB
  localparam int CLK_PS   = BIN_PS * 2 * N_PHASE;        // 2400 ps period
  localparam int TRIM_W   = 3;   // clock calibration trim code (assumed)
  localparam int TRIM_PS  = 5;   // delay per trim step (assumed)

  typedef struct packed {
    logic [GATE_W-1:0]   gate_id;
    logic [COARSE_W-1:0] coarse;
    logic [FINE_W-1:0]   fine;
  } tdc_word_t;

  localparam tdc_word_t TS_EMPTY = '1;

  // Static macropixel configuration (global control lines).
  typedef struct packed {
    logic double_mode;  // SINGLE/DOUBLE: 1 = two-photon (coincidence) mode
    logic fast;         // FAST readout
    logic count;        // COUNT: counters only
    logic first_only;   // FIRST_ONLY: first event only
  } pix_cfg_t;

  typedef enum logic [2:0] {
    RD_NORMAL,      // 4 words: timestamp + counter per SPAD register
    RD_FAST,        // 2 words: first timestamp + WHO, then four counters
    RD_FIRST,       // 1 word: first timestamp + WHO
    RD_COUNT,       // 1 word: four counters
    RD_DBL_FIRST    // 1 word: first coincidence timestamp + double counter
  } rd_mode_t;

  function automatic rd_mode_t decode_mode(pix_cfg_t c);
    if (c.count)            return RD_COUNT;
    else if (c.first_only)  return c.double_mode ? RD_DBL_FIRST : RD_FIRST;
    else if (c.fast && !c.double_mode) return RD_FAST;
    else                    return RD_NORMAL;
  endfunction

  // Readout cycles (bus words) per macropixel for a mode.
  function automatic int unsigned words_per_pixel(pix_cfg_t c);
    case (decode_mode(c))
      RD_NORMAL: return 4;
      RD_FAST:   return 2;
      default:   return 1;
    endcase
  endfunction

endpackage
