// ir_pkg: constants and types shared by the infrared camera image pipeline.
//
// Holds the default geometry of the focal plane array (640 x 480 detectors,
// read through two outputs), the VideoBus word format (14-bit pixels, two
// lanes per strobe), the coefficient format of the non-uniformity correction
// and the register map the microcontroller sees. The array size, the 14-bit
// data, the 16-bit coefficients and the 9-cycle ADC latency follow the
// camera description; the register map and the coefficient scaling are this
// design's own choices.
package ir_pkg;

  // Array geometry and VideoBus format
  localparam int unsigned FPA_COLS    = 640;
  localparam int unsigned FPA_ROWS    = 480;
  localparam int unsigned VB_LANES    = 2;   // VDATA0 (even column), VDATA1 (odd column)
  localparam int unsigned VB_DW       = 14;  // ADC resolution
  localparam int unsigned NUC_CW      = 16;  // gain and offset coefficient width
  localparam int unsigned GAIN_FRAC   = 14;  // gain 1.0 = 2**14
  localparam int unsigned ADC_LAT     = 9;   // AD9251 pipeline latency in ADC clocks

  // Timing defaults (core clock 50 MHz)
  localparam int unsigned STB_DIV     = 8;   // 50 MHz / 8 = 6.25 MHz VideoBus strobe
  localparam int unsigned LINE_TICKS  = 336; // strobes per row period (320 data + overhead)
  localparam int unsigned READ_START  = 8;   // tick of the first pixel pair in a row period
  localparam int unsigned RESET_TICKS = 16;  // RESET pulse length at frame start
  localparam int unsigned DEF_FRAME_ROWS = 620; // 620 * 336 * 160 ns = 33.3 ms -> 30 Hz
  localparam int unsigned DEF_INT_TICKS  = 64;

  // Microcontroller register map (word addresses on an 8-bit address bus)
  typedef enum logic [7:0] {
    REG_CTRL      = 8'h00, // [0] read-out enable [1] NUC on [2] bad pixel on
                           // [3] overlay on [4] simulated ADC data [6:5] monitor stage
    REG_INT_TICKS = 8'h01, // integration time, ticks
    REG_FRAME_ROWS= 8'h02, // frame period, row periods
    REG_OVL_COLOR = 8'h03, // overlay colour {R,G,B}
    REG_MEM_ADDR  = 8'h04, // write address of the memory windows, auto-increment
    REG_COEF_L0   = 8'h05, // {gain, offset} of lane 0 (staged)
    REG_COEF_L1   = 8'h06, // {gain, offset} of lane 1: writes the coefficient word
    REG_BPM_DATA  = 8'h0D, // bad pixel flags of one word [LANES-1:0]
    REG_OVL_DATA  = 8'h0E, // overlay code of one pixel [1:0]
    REG_STATUS    = 8'h0F  // [15:0] frames read [16] displayed buffer [31:17] swaps
  } reg_addr_e;

  // Control register fields
  typedef struct packed {
    logic [1:0] tap_sel;
    logic       adc_sim;
    logic       overlay_en;
    logic       bpm_en;
    logic       nuc_en;
    logic       readout_en;
  } ctrl_t;

  // Overlay plane codes
  typedef enum logic [1:0] {
    OVL_NONE  = 2'd0,
    OVL_BLACK = 2'd1,
    OVL_WHITE = 2'd2,
    OVL_COLOR = 2'd3
  } ovl_code_e;

endpackage
