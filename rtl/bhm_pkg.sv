// bhm_pkg: types and constants of the brain-heart monitoring chip around the
// ICA processor: activation-command bits, stream source identifiers and the
// channel-select codes of the analog front end.
package bhm_pkg;

  // Bits of the 8-bit activation command received from the science station.
  localparam int unsigned M_EEG_ADC  = 0;  // EEG acquisition        (ICA clock)
  localparam int unsigned M_ICA      = 1;  // 4-channel ICA processor (ICA clock)
  localparam int unsigned M_EKG_ADC  = 2;  // EKG acquisition        (HRV clock)
  localparam int unsigned M_HRV      = 3;  // HRV processor          (HRV clock)
  localparam int unsigned M_DOT      = 4;  // NIR ADC and DOT        (DOT clock)
  localparam int unsigned M_BYP_EEG  = 5;  // bypass EEG compression
  localparam int unsigned M_BYP_EKG  = 6;  // bypass EKG compression
  localparam int unsigned M_BYP_DOT  = 7;  // bypass DOT compression

  // Data sources of the prioritized data selector, in fixed priority order
  // (index 0 is served first): EKG 1, EEG/ICA 2, HRV 3, DOT 4.
  typedef enum logic [1:0] {SRC_EKG = 2'd0, SRC_EEG = 2'd1, SRC_HRV = 2'd2, SRC_DOT = 2'd3} src_e;

  // ADC_CHSEL codes: 0..3 EEG channels 1-4, 4..6 EKG channels 1-3, 7 DOT.
  localparam logic [2:0] CHSEL_EEG1 = 3'd0;
  localparam logic [2:0] CHSEL_EKG1 = 3'd4;
  localparam logic [2:0] CHSEL_DOT  = 3'd7;

  // Scheduled acquisition events of the front-end interface control unit.
  typedef enum logic [1:0] {EV_EEG = 2'd0, EV_EKG = 2'd1, EV_DOT = 2'd2} event_e;

endpackage
