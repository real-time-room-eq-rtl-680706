// room_eq_pkg -- types and constants shared by the room-EQ peripheral.
//
// Audio samples are 24-bit two's complement (Q1.23 on the FIR path), FFT bins
// are 24-bit real + 24-bit imaginary with a 6-bit block exponent per frame, and
// the register bus is 32 bits wide; those widths follow the design document.
// The register offsets and bit positions below are this design's own choice:
// the document lists the registers and their roles but leaves the map open.
package room_eq_pkg;

  localparam int unsigned SAMPLE_W = 24;   // audio sample width
  localparam int unsigned EXP_W    = 6;    // block floating-point exponent width
  localparam int unsigned CSR_W    = 32;   // register bus width
  localparam int unsigned CSR_AW   = 4;    // word address bits of the register window

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  typedef struct packed {
    sample_t l;
    sample_t r;
  } stereo_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } bin_t;

  // Calibration sequencer states (state names as in the sequencer diagram).
  typedef enum logic [2:0] {
    SEQ_IDLE    = 3'd0,
    SEQ_SWEEP   = 3'd1,
    SEQ_CAPTURE = 3'd2,
    SEQ_FFT     = 3'd3,
    SEQ_DONE    = 3'd4,
    SEQ_ERROR   = 3'd5
  } seq_state_t;

  // Register word offsets (byte offset = 4 * word offset).
  typedef enum logic [CSR_AW-1:0] {
    REG_CTRL         = 4'd0,
    REG_STATUS       = 4'd1,
    REG_IRQ_MASK     = 4'd2,
    REG_SWEEP_LEN    = 4'd3,
    REG_CAPTURE_ADDR = 4'd4,
    REG_CAPTURE_DATA = 4'd5,
    REG_FFT_ADDR     = 4'd6,
    REG_FFT_DATA_RE  = 4'd7,
    REG_FFT_DATA_IM  = 4'd8,
    REG_FFT_EXPONENT = 4'd9,
    REG_COEF_ADDR    = 4'd10,
    REG_COEF_DATA    = 4'd11,
    REG_VERSION      = 4'd12,
    REG_SAMPLE_RATE  = 4'd13,
    REG_TAP_COUNT    = 4'd14,
    REG_SCRATCH      = 4'd15
  } reg_addr_t;

  // CTRL bits
  localparam int unsigned CTRL_START_SWEEP = 0;  // write-one-to-pulse
  localparam int unsigned CTRL_FIR_ENABLE  = 1;
  localparam int unsigned CTRL_SOFT_RESET  = 2;  // write-one-to-pulse
  localparam int unsigned CTRL_BYPASS      = 3;

  // STATUS bits (also the IRQ_MASK bit positions for the first four)
  localparam int unsigned ST_SWEEP_DONE    = 0;
  localparam int unsigned ST_CAPTURE_OVF   = 1;
  localparam int unsigned ST_FFT_DONE      = 2;
  localparam int unsigned ST_FIR_READY     = 3;
  localparam int unsigned ST_BUSY          = 4;
  localparam int unsigned ST_STATE_LSB     = 8;  // [10:8] sequencer state

  localparam logic [CSR_W-1:0] VERSION_ID  = 32'h0001_0000;

endpackage
