// bhm_soc: brain-heart monitoring chip, digital top level.
//
// Integrates the system control unit, the front-end interface control unit,
// the 4-channel ICA processor, the prioritized data selector and raw-EEG
// and raw-EKG buffers. The blocks the document only names or describes without their
// insides - HRV processor, DOT processor, lossless compressor, UART and the
// analog front-end with its ADC - are outside this design; their signals
// are ports of this module.
// Data flow: the FICU converts EEG (4 ch, 128 Hz), EKG (3 ch, 256 Hz) and
// DOT (24 sensor values per frame) samples. With the ICA bit of the mode
// set, EEG words enter the ICA processor, which outputs independent
// components; with it clear the ICA clock is off and raw EEG words go to
// the selector through an 8-word buffer. ICA_BYPASS is a test input that
// puts the running ICA processor into its bypass mode. EKG words go to the external
// HRV processor and, through an 8-word buffer, to the selector. DOT words
// go to the external DOT processor. The selector feeds the compressor
// (EKG, EEG/ICA, external HRV result, external DOT result, in that
// priority) with valid/ready handshakes, so a busy compressor holds the
// selector and the selector holds the processors.
// Reset: RESET is the external active-high reset; the SCU's one-cycle
// internal reset after every activation command is OR-ed into it for all
// other blocks. The ICA processor runs on the SCU's gated ICA clock; gated
// HRV and DOT clocks are outputs for the external processors.
// Timing defaults assume the 24 MHz system clock of the document's FICU
// figure; the divider parameters allow faster test runs.
module bhm_soc
  import bhm_pkg::*;
  import ica_pkg::*;
#(
  parameter int unsigned DIV_ADC    = 20,
  parameter int unsigned DIV_10K    = 2400,
  parameter int unsigned DIV_256HZ  = 93750,
  parameter int unsigned DIV_24HZ   = 1000000,
  parameter int unsigned MAX_ITER_P = MAX_ITER
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        ica_bypass,       // test: ICA processor passes raw words
  // UART: received activation command
  input  logic        rx_mode_valid,
  input  logic [7:0]  rx_mode,
  // analog front-end / ADC
  output logic        aic_clk10k,
  output logic        adc_clk1200k,
  output logic        adc_reset,
  output logic        adc_start_conversion,
  output logic [2:0]  adc_chsel,
  input  logic        adc_eoc,
  input  logic [9:0]  adc_data,
  output logic [3:0]  dot_chsel,
  output logic [2:0]  led_sel,
  // HRV processor
  output logic        gclk_hrv,
  output logic        hrv_ekg_valid,
  output logic [9:0]  hrv_ekg_data,
  input  logic        hrv_valid,
  input  logic [15:0] hrv_data,
  output logic        hrv_ready,
  // DOT processor
  output logic        gclk_dot,
  output logic        dot_raw_valid,
  output logic [9:0]  dot_raw_data,
  output logic [4:0]  dot_raw_conv,
  input  logic        dot_valid,
  input  logic [15:0] dot_data,
  output logic        dot_ready,
  // lossless compressor
  output logic        comp_reset,       // internal reset after a command
  input  logic        comp_init_done,
  output logic        comp_valid,
  output logic [15:0] comp_data,
  output logic [1:0]  comp_src,
  output logic        comp_bypass,
  input  logic        comp_ready,
  // status
  output logic        running,
  output logic [7:0]  current_mode,
  output logic        raw_overflow,     // a raw EEG or EKG word was lost
  output logic        event_overflow,
  output logic        ica_overrun,
  output logic        ica_training,
  output logic        ica_train_done,
  output logic        ica_converged,
  output logic [9:0]  ica_iterations
);

  logic system_reset, rst_i, ficu_trigger, gclk_ica;

  bhm_scu u_scu (
    .clk, .reset, .rx_mode_valid, .rx_mode, .comp_init_done,
    .system_reset, .current_mode, .running, .ficu_trigger,
    .gclk_ica, .gclk_hrv, .gclk_dot
  );

  assign rst_i = reset | system_reset;
  assign comp_reset = system_reset;

  logic       eeg_valid, ekg_valid;
  logic [9:0] eeg_data, ekg_data;

  bhm_ficu #(
    .DIV_ADC(DIV_ADC), .DIV_10K(DIV_10K), .DIV_256HZ(DIV_256HZ), .DIV_24HZ(DIV_24HZ)
  ) u_ficu (
    .clk, .reset(rst_i), .trigger(ficu_trigger), .mode(current_mode),
    .aic_clk10k, .adc_clk1200k, .adc_reset, .adc_start_conversion, .adc_chsel,
    .adc_eoc, .adc_data, .dot_chsel, .led_sel,
    .eeg_valid, .eeg_data, .ekg_valid, .ekg_data,
    .dot_valid(dot_raw_valid), .dot_data(dot_raw_data), .dot_conv(dot_raw_conv),
    .queue_full(event_overflow)
  );

  // EEG / ICA path
  logic  ica_valid, ica_ready;
  word_t ica_data;

  ica_processor #(.MAX_ITER_P(MAX_ITER_P)) u_ica (
    .clk(gclk_ica), .reset(rst_i), .bypass(ica_bypass),
    .in_valid(eeg_valid & current_mode[M_ICA]), .eeg_in(eeg_data),
    .out_ready(ica_ready), .out_valid(ica_valid), .out_data(ica_data),
    .overrun(ica_overrun), .training(ica_training), .train_done(ica_train_done),
    .converged(ica_converged), .iterations(ica_iterations)
  );

  // raw EEG path (ICA processor off)
  logic       eegq_valid, eegq_ready, eeg_overflow;
  logic [9:0] eegq_data;

  bhm_fifo #(.W(10), .DEPTH(8)) u_eeg_fifo (
    .clk, .reset(rst_i), .in_valid(eeg_valid & ~current_mode[M_ICA]), .in_data(eeg_data),
    .out_valid(eegq_valid), .out_data(eegq_data), .out_ready(eegq_ready),
    .overflow(eeg_overflow)
  );

  // EKG path
  logic       ekgq_valid, ekgq_ready, ekg_raw_overflow;
  logic [9:0] ekgq_data;

  assign hrv_ekg_valid = ekg_valid;
  assign hrv_ekg_data  = ekg_data;

  bhm_fifo #(.W(10), .DEPTH(8)) u_ekg_fifo (
    .clk, .reset(rst_i), .in_valid(ekg_valid), .in_data(ekg_data),
    .out_valid(ekgq_valid), .out_data(ekgq_data), .out_ready(ekgq_ready),
    .overflow(ekg_raw_overflow)
  );
  assign raw_overflow = ekg_raw_overflow | eeg_overflow;

  // prioritized data selector
  logic [3:0]  src_valid, src_ready;
  logic [15:0] src_data [4];
  src_e        pds_src;

  assign src_valid[SRC_EKG] = ekgq_valid;
  assign src_data[SRC_EKG]  = {6'd0, ekgq_data};
  assign src_valid[SRC_EEG] = current_mode[M_ICA] ? ica_valid : eegq_valid;
  assign src_data[SRC_EEG]  = current_mode[M_ICA] ? ica_data : {6'd0, eegq_data};
  assign src_valid[SRC_HRV] = hrv_valid;
  assign src_data[SRC_HRV]  = hrv_data;
  assign src_valid[SRC_DOT] = dot_valid;
  assign src_data[SRC_DOT]  = dot_data;
  assign ekgq_ready = src_ready[SRC_EKG];
  assign ica_ready  = src_ready[SRC_EEG] & current_mode[M_ICA];
  assign eegq_ready = src_ready[SRC_EEG] & ~current_mode[M_ICA];
  assign hrv_ready  = src_ready[SRC_HRV];
  assign dot_ready  = src_ready[SRC_DOT];

  bhm_pds u_pds (
    .clk, .reset(rst_i), .mode(current_mode),
    .src_valid, .src_data, .src_ready,
    .out_valid(comp_valid), .out_data(comp_data), .out_src(pds_src),
    .out_bypass(comp_bypass), .out_ready(comp_ready)
  );
  assign comp_src = pds_src;

endmodule
