// Shared sizes, data types and frame layouts of the LATRIC0 timing channel.
//
// Each of the three measurements (TOT, TOA, CAL) yields a raw value made of a
// 7-bit coarse count of ring-oscillator periods and a 30-bit fine phase word
// taken from the 15-stage ring (two phases per stage). The encoder turns the
// 30-bit fine word into a 5-bit number, giving a 12-bit encoded value.
// Raw frame  : 3 x 37 data bits + 17-bit header = 128 bits.
// Coded frame: 3 x 12 data bits +  4-bit header =  40 bits.
// Field sizes follow the chip description; the header bit patterns, the order
// of coarse/fine inside a field and the bit order of the frames are this
// design's own choices (see latric0_top).
package latric0_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N_STAGES   = 15;            // NAND delay cells in the ring
  localparam int unsigned N_PHASES   = 2 * N_STAGES;  // fine phases per RO period
  localparam int unsigned COARSE_W   = 7;             // coarse counter width
  localparam int unsigned FINE_BIN_W = 5;             // encoded fine width
  localparam int unsigned RAW_W      = COARSE_W + N_PHASES;   // 37
  localparam int unsigned ENC_W      = COARSE_W + FINE_BIN_W; // 12
  localparam int unsigned HDR128_W   = 17;
  localparam int unsigned HDR40_W    = 4;
  localparam int unsigned FRAME128_W = 3 * RAW_W + HDR128_W;  // 128
  localparam int unsigned FRAME40_W  = 3 * ENC_W + HDR40_W;   // 40

  // Header patterns. Bit 0 is sent first and is 1, so that a receiver watching
  // an idle (all-zero) line can find the start of a frame.
  localparam logic [HDR128_W-1:0] HEADER128 = 17'h1_5A53;
  localparam logic [HDR40_W-1:0]  HEADER40  = 4'b1011;

  // One raw measurement as latched: coarse count above the 30 fine phases.
  typedef struct packed {
    logic [COARSE_W-1:0] coarse;
    logic [N_PHASES-1:0] fine;
  } raw_meas_t;

  // One encoded measurement.
  typedef struct packed {
    logic [COARSE_W-1:0]   coarse;
    logic [FINE_BIN_W-1:0] fine;
  } enc_meas_t;

  // Frame contents, most significant field first: TOT, TOA, CAL, header.
  typedef struct packed {
    raw_meas_t             tot;
    raw_meas_t             toa;
    raw_meas_t             cal;
    logic [HDR128_W-1:0]   header;
  } frame128_t;

  typedef struct packed {
    enc_meas_t             tot;
    enc_meas_t             toa;
    enc_meas_t             cal;
    logic [HDR40_W-1:0]    header;
  } frame40_t;

endpackage
