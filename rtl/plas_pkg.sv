// plas_pkg: sizes, codes and shared types of the PLAS pipelined asymmetric
// switched-capacitor-array (SCA) front-end.
//
// Analog quantities (input voltages, stored capacitor voltages, output levels)
// are carried as unsigned codes in millivolts, SAMPLE_W bits wide. The channel
// counts, cell counts and frame field widths are those of the 32-channel
// prototype; the millivolt coding, the 8 mV DAC step, the frame header value
// and the digital output levels are this design's own choices.
package plas_pkg;

  // ---- array dimensions (prototype) ----
  localparam int unsigned N_CH     = 32;   // input channels
  localparam int unsigned N_SLOT   = 8;    // second-stage slots
  localparam int unsigned L_PRE    = 32;   // pre-trigger cells per channel
  localparam int unsigned L_BUF    = 32;   // storage buffer cells per slot
  localparam int unsigned L_POST   = 192;  // post-trigger cells per slot
  localparam int unsigned L_SLOT   = L_BUF + L_POST;  // 224 samples per event
  localparam int unsigned N_GTRIG  = 4;    // global trigger lines
  localparam int unsigned N_GROUP  = 4;    // channel groups sharing two Vref DACs
  localparam int unsigned GROUP_SZ = 8;    // channels per group

  // ---- analog coding (this design's choice) ----
  localparam int unsigned SAMPLE_W = 12;   // millivolt code width
  localparam int unsigned DAC_W    = 8;    // threshold / reference DAC code
  localparam int unsigned DAC_LSB_MV = 8;  // mV per DAC step
  localparam int unsigned SCA_MIN_MV = 300;   // SCA input range 0.3 V ..
  localparam int unsigned SCA_MAX_MV = 1500;  // .. 1.5 V
  localparam int unsigned VMID_MV    = 900;   // common mode of the output

  // ---- frame format (field widths from the frame layout) ----
  localparam int unsigned HDR_W     = 4;
  localparam int unsigned CH_ID_W   = 7;
  localparam int unsigned POS_W     = 5;
  localparam int unsigned SLOT_ID_W = 4;
  localparam int unsigned TS_W      = 36;
  localparam int unsigned RSV_W     = 5;
  localparam int unsigned ECC_W     = 7;
  localparam int unsigned INFO_W    = CH_ID_W + POS_W + SLOT_ID_W + TS_W + RSV_W; // 57
  localparam int unsigned DIG_W     = INFO_W + ECC_W;                             // 64
  localparam int unsigned N_WAIT    = 7;   // wait cycles, one per 32-cell section
  localparam int unsigned SECT_LEN  = 32;  // cells per SCA section
  localparam logic [HDR_W-1:0] FRAME_HDR = 4'b1100;  // breaks the 0101 idle pattern

  // ---- timing (in sample ticks: one tick per edge of the 100 MHz write clock) ----
  localparam int unsigned RD_DIV   = 4;    // 200 MHz ticks per 50 MHz readout step
  localparam int unsigned COPY_DIV = 4;    // ticks per copied pre-trigger cell

  // Per-channel configuration, written through I2C.
  typedef struct packed {
    logic                    pol;       // 1: comparators fire below threshold
    logic                    test_sel;  // 1: amplifier input from the common test input
    logic                    vref_sel;  // 0: group Vref1, 1: group Vref2
    logic                    en_ext;    // external (board) trigger enabled
    logic                    en_hyst;   // hysteresis re-arm through comparator 2
    logic                    en_lead;   // leading-edge trigger on comparator 1
    logic [N_GTRIG-1:0]      gmask;     // sensitivity to the global triggers
    logic [DAC_W-1:0]        thr_hi;    // comparator 1 threshold code
    logic [DAC_W-1:0]        thr_lo;    // comparator 2 threshold code
  } ch_cfg_t;

  // Digital part of an event frame, in transmission order (MSB first).
  typedef struct packed {
    logic [CH_ID_W-1:0]   in_ch;      // input channel that triggered
    logic [POS_W-1:0]     start_pos;  // pre-trigger cell written at the trigger
    logic [SLOT_ID_W-1:0] out_ch;     // slot (queue position) that holds the event
    logic [TS_W-1:0]      ts;         // trigger timestamp
    logic [RSV_W-1:0]     rsv;        // reserved, sent as zero
  } frame_info_t;

  // Output stage selection.
  typedef enum logic [1:0] {
    OUT_DIG  = 2'd0,   // a digital bit (idle pattern, header, data, ECC)
    OUT_ANA  = 2'd1,   // an analog sample from the selected slot
    OUT_WAIT = 2'd2    // wait cycle between 32-cell sections
  } out_mode_e;

endpackage
