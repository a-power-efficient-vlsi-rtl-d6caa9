// ica_cu: ICA computation unit (CU).
//
// Produces the independent components of one half-window (32 samples x 4
// components = 128 output words) while the next window is being trained.
// On start it captures the unmixing matrix W (kept from the training unit's
// output stream), the whitening matrix P and the channel means of the window
// that W was trained on, then with one shared scalar-product unit (four
// multipliers and an adder tree):
//   W_unmixing = W x P                (16 cycles, Q.24)
//   ICA_OUT    = W_unmixing x (x - mean) for each sample of the half-window
//                (4 cycles per sample, one component per cycle)
// The document gives W x P and W_unmixing x x; centering x with the captured
// means is this design's reading (the same centered data that was trained
// on). Output words are Q7.8, saturated, sample by sample, component 1..4,
// through a valid/ready handshake: a word is held until out_ready.
module ica_cu
  import ica_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       start,
  // W stream from the training unit
  input  logic       w_in_valid,
  input  logic [3:0] w_in_idx,
  input  word_t      w_in_data,
  // captured at start
  input  accmat4_t   p_mat,        // Q.24
  input  mean4_t     mean,         // Q10.6
  // half-window read port
  output logic [4:0] rd_addr,
  input  sample4_t   rd_data,
  output logic       busy,
  output logic       out_valid,
  input  logic       out_ready,
  output word_t      out_data
);

  typedef enum logic [1:0] {IDLE, UW, CALC, EMIT} state_e;
  state_e state;

  mat4_t    w;
  accmat4_t p_s, uw;
  mean4_t   mean_s;
  vec4_t    comp;
  logic [3:0] cnt;
  logic [4:0] s;

  xzm4_t xzm;
  logic  xzm_valid;
  ica_ctr u_ctr (.in_valid(state == CALC), .x(rd_data), .mean_valid(1'b1), .mean(mean_s),
                 .xzm_valid, .xzm);
  assign rd_addr = s;

  // shared scalar product
  logic signed [63:0] sp_a [NCH], sp_b [NCH];
  logic signed [63:0] sp_sum;
  always_comb begin
    for (int k = 0; k < NCH; k++) begin
      if (state == UW) begin
        sp_a[k] = 64'(w[cnt[3:2]][k]);  sp_b[k] = 64'(p_s[k][cnt[1:0]]);
      end else begin
        sp_a[k] = 64'(uw[cnt[1:0]][k]); sp_b[k] = xzm_valid ? 64'(xzm[k]) : '0;
      end
    end
    sp_sum = sp_a[0]*sp_b[0] + sp_a[1]*sp_b[1] + sp_a[2]*sp_b[2] + sp_a[3]*sp_b[3];
  end

  assign busy = (state != IDLE);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state <= IDLE; cnt <= '0; s <= '0; out_valid <= 1'b0; out_data <= '0;
      p_s <= '0; uw <= '0; mean_s <= '0; comp <= '0;
      for (int r = 0; r < NCH; r++)
        for (int c = 0; c < NCH; c++) w[r][c] <= (r == c) ? word_t'(1 << W_FRAC) : '0;
    end else begin
      if (w_in_valid) w[w_in_idx[3:2]][w_in_idx[1:0]] <= w_in_data;
      unique case (state)
        IDLE: if (start) begin
          p_s <= p_mat; mean_s <= mean; cnt <= '0; s <= '0; state <= UW;
        end
        UW: begin
          uw[cnt[3:2]][cnt[1:0]] <= sat32(sp_sum >>> W_FRAC);
          if (cnt == 4'd15) begin cnt <= '0; state <= CALC; end
          else cnt <= cnt + 4'd1;
        end
        CALC: begin
          comp[cnt[1:0]] <= sat16(sp_sum >>> 22);
          if (cnt == 4'd3) begin cnt <= '0; state <= EMIT; end
          else cnt <= cnt + 4'd1;
        end
        EMIT: begin
          if (!out_valid) begin
            out_valid <= 1'b1; out_data <= comp[cnt[1:0]];
          end else if (out_ready) begin
            if (cnt == 4'd3) begin
              out_valid <= 1'b0; cnt <= '0;
              if (s == 5'(HALF_WIN - 1)) state <= IDLE;
              else begin s <= s + 5'd1; state <= CALC; end
            end else begin
              cnt <= cnt + 4'd1; out_data <= comp[cnt[1:0] + 2'd1];
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // A word offered on the output stays until it is taken.
  logic  held_valid;
  word_t held_data;
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      held_valid <= 1'b0; held_data <= '0;
    end else begin
      if (held_valid) a_out_hold: assert (out_valid && out_data == held_data);
      held_valid <= out_valid && !out_ready;
      held_data  <= out_data;
    end
  end

endmodule
