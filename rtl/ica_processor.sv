// ica_processor: 4-channel Infomax ICA processor for real-time EEG artifact
// removal.
//
// Ports follow the document's top-level view: CLK, RESET, BYPASS, IN_VALID,
// EEG_IN[9:0], OUT_READY, OUT_VALID, OUT_DATA[15:0]. Input samples arrive
// serially, channel 1..4 per sampling instant; output words are the
// components of one half-window, 32 samples x 4 components, Q7.8.
//
// Structure (as in the document): stage 1 (input buffering unit, mean and
// covariance unit, centering unit), the whitening unit, the training unit
// and the computation unit. A sequencer runs, for every new 64-sample
// window, MeanCov -> whitening matrix P -> Infomax training of W (whitened
// samples are recomputed from the buffer on demand, so no whitened copy is
// stored). The computation unit works in parallel and outputs the previous
// half-window with the previous W and P (operation pipelining between
// training and component extraction). The first half-window is never
// output; the first output block is W0 P0 x1.
//
// BYPASS = 1 sends each input word straight to the output (zero-extended)
// through the same handshake; the document names a bypass mode without
// detailing it, so this behaviour is this design's choice. A bypassed word
// that arrives while the previous one is still waiting is dropped.
// RESET is active high, asynchronous.
module ica_processor
  import ica_pkg::*;
#(
  parameter int unsigned MAX_ITER_P = MAX_ITER,
  parameter int unsigned NSWEEP     = 6
) (
  input  logic    clk,
  input  logic    reset,
  input  logic    bypass,
  input  logic    in_valid,
  input  sample_t eeg_in,
  input  logic    out_ready,
  output logic    out_valid,
  output word_t   out_data,
  // status
  output logic    overrun,      // sticky: a window was skipped
  output logic    training,     // training unit busy
  output logic    train_done,   // one-cycle pulse per trained window
  output logic    converged,    // last window stopped before the limit
  output logic [9:0] iterations // iterations of the last window
);

  typedef enum logic [1:0] {SQ_IDLE, SQ_MEANCOV, SQ_WHITEN, SQ_TRAIN} seq_e;
  seq_e seq;

  // ---- stage 1: input buffer ----
  logic       win_start, out_start, engine_busy, cu_busy;
  logic [5:0] rd_a_addr, mc_addr, wu_addr;
  logic [4:0] rd_b_addr;
  sample4_t   rd_a_data, rd_b_data;

  assign engine_busy = (seq != SQ_IDLE) || win_start || cu_busy;

  ica_ibu u_ibu (
    .clk, .reset, .enable(!bypass), .in_valid, .eeg_in, .engine_busy,
    .win_start, .out_start, .overrun,
    .rd_a_addr, .rd_a_data, .rd_b_addr, .rd_b_data);

  assign rd_a_addr = (seq == SQ_MEANCOV) ? mc_addr : wu_addr;

  // ---- stage 1: mean / covariance ----
  logic     mc_done, mean_valid;
  mean4_t   mean;
  accmat4_t cov;
  ica_meancov u_meancov (
    .clk, .reset, .start(win_start), .rd_addr(mc_addr), .rd_data(rd_a_data),
    .done(mc_done), .mean_valid, .mean, .cov);

  // ---- whitening unit ----
  logic       p_done, z_req, z_valid;
  logic [5:0] z_idx;
  vec4_t      z;
  accmat4_t   p_mat;
  ica_wu #(.NSWEEP(NSWEEP)) u_wu (
    .clk, .reset, .start(mc_done), .cov, .mean, .mean_valid,
    .p_done, .p_mat,
    .z_req, .z_idx, .rd_addr(wu_addr), .rd_data(rd_a_data), .z_valid, .z);

  // ---- training unit ----
  logic       tu_done, w_out_valid;
  logic [3:0] w_out_idx;
  word_t      w_out_data;
  ica_tu #(.MAX_ITER_P(MAX_ITER_P)) u_tu (
    .clk, .reset, .start(p_done), .z_req, .z_idx, .z_valid, .z,
    .busy(training), .done(tu_done), .converged, .iterations,
    .w_out_valid, .w_out_idx, .w_out_data);

  // ---- computation unit ----
  logic  cu_valid;
  word_t cu_data;
  logic  cu_ready;
  ica_cu u_cu (
    .clk, .reset, .start(out_start),
    .w_in_valid(w_out_valid), .w_in_idx(w_out_idx), .w_in_data(w_out_data),
    .p_mat, .mean, .rd_addr(rd_b_addr), .rd_data(rd_b_data),
    .busy(cu_busy), .out_valid(cu_valid), .out_ready(cu_ready), .out_data(cu_data));

  // ---- sequencer ----
  always_ff @(posedge clk or posedge reset) begin
    if (reset) seq <= SQ_IDLE;
    else unique case (seq)
      SQ_IDLE:    if (win_start) seq <= SQ_MEANCOV;
      SQ_MEANCOV: if (mc_done)   seq <= SQ_WHITEN;
      SQ_WHITEN:  if (p_done)    seq <= SQ_TRAIN;
      SQ_TRAIN:   if (tu_done)   seq <= SQ_IDLE;
      default:    seq <= SQ_IDLE;
    endcase
  end

  // ---- bypass path ----
  logic  byp_valid;
  word_t byp_data;
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      byp_valid <= 1'b0; byp_data <= '0;
    end else begin
      if (byp_valid && out_ready) byp_valid <= 1'b0;
      if (bypass && in_valid && !(byp_valid && !out_ready)) begin
        byp_valid <= 1'b1; byp_data <= word_t'({6'b0, eeg_in});
      end
    end
  end

  assign out_valid = bypass ? byp_valid : cu_valid;
  assign out_data  = bypass ? byp_data  : cu_data;
  assign cu_ready  = bypass ? 1'b0 : out_ready;
  assign train_done = tu_done;

endmodule
