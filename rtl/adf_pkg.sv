// adf_pkg: constants and types shared by the ADF board, the SCLD and the
// Channel Link tester.
//
// The ADF board digitizes 32 calorimeter channels with 10-bit ADCs at
// 30.28 MHz (4 samples per 132 ns beam crossing), filters them with an 8-tap
// FIR run at 15.14 MHz, and ships 32 8-bit energies per crossing over
// Channel Link buses clocked at 60.56 MHz, of which 36 of 48 bits are used.
// These numbers follow the board description. Everything runs from a single
// 60.56 MHz clock with enables: 8 clocks per crossing, an ADC sample every
// 2 clocks, a filter output every 4 clocks. The single clock, the 8-bit
// coefficient width and the synchronisation bundle contents are this
// design's choices.
package adf_pkg;

  localparam int N_CH       = 32;  // channels per ADF board
  localparam int SAMPLE_W   = 10;  // ADC resolution
  localparam int ET_W       = 8;   // energy value width
  localparam int N_TAPS     = 8;   // FIR taps
  localparam int COEF_W     = 8;   // signed coefficient width
  localparam int FILT_W     = 22;  // |sum| <= 8*2046*128 < 2^21 (combined pairs)
  localparam int CLK_PER_BC = 8;   // 60.56 MHz / 7.57 MHz
  localparam int LINK_W     = 36;  // used bits of the Channel Link bus
  localparam int CL_BUS_W   = 48;  // Channel Link bus width
  localparam int N_LINKS    = 3;   // identical output links
  localparam int LUT_AW     = 10;  // energy look-up table address width
  localparam int HIST_DEPTH = 256; // history records (crossings)
  localparam int HIST_AW    = $clog2(HIST_DEPTH);
  localparam int RAW_DEPTH  = 512; // capture / playback buffer depth
  localparam int RAW_AW     = $clog2(RAW_DEPTH);
  localparam int RD_W       = 16;  // raw-readout word: {first, channel, sample}
  localparam int DAC_W      = 12;  // pedestal DAC code width

  typedef logic [SAMPLE_W-1:0]        sample_t;
  typedef logic signed [COEF_W-1:0]   coef_t;
  typedef logic signed [FILT_W-1:0]   filt_t;
  typedef logic [ET_W-1:0]            et_t;

  // Synchronous signals distributed by the SCLD to the ADF crates.
  typedef struct packed {
    logic bc_marker;  // phase 0 of a beam crossing
    logic l1_accept;  // level 1 trigger accept
    logic raw_fetch;  // fetch raw samples of the accepted event
    logic init;       // synchronous initialisation
  } sync_t;

  // Signals delivered to the SCLD by the serial command link receiver.
  typedef struct packed {
    logic bc_marker;
    logic l1_accept;
    logic init;
  } sclr_t;

  typedef enum logic [1:0] {BUF_LIVE = 2'd0, BUF_CAPTURE = 2'd1, BUF_PLAYBACK = 2'd2} buf_mode_t;
  typedef enum logic {LINK_DATA = 1'b0, LINK_PRBS = 1'b1} link_mode_t;

  // Per-channel configuration, written over the control bus.
  typedef struct packed {
    coef_t [N_TAPS-1:0] coef;     // coef[k] multiplies the k-th newest sample
    logic               bypass;   // filter bypassed: output = decimated sample
    logic               pk_en;    // peak detector on
    logic               dec_sel;  // which sample of each pair feeds the filter
    logic               combine;  // filter input = sum of the pair instead
    logic               slot_sel; // filter slot used when the peak detector is off
    logic [3:0]         shift;    // right shift ahead of the look-up table
    buf_mode_t          buf_mode; // raw buffer mode
  } chan_cfg_t;

endpackage
