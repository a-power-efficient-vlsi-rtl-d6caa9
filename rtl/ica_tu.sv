// ica_tu: Infomax ICA training unit (TU).
//
// Trains the 4x4 unmixing matrix W on one 64-sample window of whitened data
// z with the natural-gradient Infomax rule
//   T  = I + sum_j (1 - 2 g(u_j)) u_j^T,  u_j = W z_j,  g = logistic
//   dW = R (I + ...) W = (R T) W,  W <- W + dW
// repeated until sum(dW^2) <= threshold or MAX_ITER iterations. W keeps its
// value from one window to the next (identity after reset), as the document
// describes. The identity term is taken as 64*I, one I per sample of the
// window, as in the reference Infomax implementation (block size times I):
// with a bare I the fixed point of the rule would leave |u| near 0.2, below
// the 1/4 step of the lookup table the document chose. All arithmetic goes through one shared array of sixteen 16x16
// multipliers and one shared array of sixteen 32-bit adders, routed by state
// as in the document's state table:
//   S_wait      1 cycle   T = I, load z_0
//   S_cal_u     1 cycle   u = W z (adders 3,6,9,12 of the chains give u1..u4)
//   S_lookup_y  4 cycles  p_r = f(u_r) through one mirrored lookup unit
//   S_update_T  1 cycle   T += p u^T, load next z; back to S_cal_u 64 times
//   S_cal_delW  5 cycles  T = R*T, then one row of dW = T W per cycle
//   S_update_W  1 cycle   W += dW
//   S_compare   1 cycle   sum of dW^2 (multipliers square, adders sum)
//                         against the threshold, T = I
//   S_output    1 cycle, or 16 cycles streaming W (one element per cycle,
//               row-major) when training of the window has ended.
// The figure of the state machine prints S_output -> S_wait; this design
// goes S_output -> S_wait for the next iteration as well (the document's
// listing loops back to the u calculation).
// Convergence: the squared norm of dW is formed in Q.24, so THRESH_LSB
// counts units of 2^-24. The document's threshold (1.0012e-8) is 0.17 of
// one such unit, so THRESH_LSB = 0 and training ends when dW is exactly
// zero; the document's listing compares with "<=", which is followed here.
// The squares and their sum use the shared arrays, as in the document's
// state table.
// z samples come from the whitening unit on request (z_req/z_idx ->
// z_valid/z); the TU waits in S_wait/S_update_T if a sample is late.
// Sample 0 of the next iteration is prefetched while the last one is
// processed, so an iteration takes 6*64 + 9 = 393 cycles when z is never late.
module ica_tu
  import ica_pkg::*;
#(
  parameter int unsigned MAX_ITER_P = MAX_ITER,
  parameter int unsigned THRESH_LSB = 0
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       start,
  output logic       z_req,
  output logic [5:0] z_idx,
  input  logic       z_valid,
  input  vec4_t      z,
  output logic       busy,
  output logic       done,          // pulse after the last W word
  output logic       converged,     // last training ended below threshold
  output logic [9:0] iterations,    // iterations of the last training
  output logic       w_out_valid,
  output logic [3:0] w_out_idx,
  output word_t      w_out_data     // Q3.12
);

  // Identity term of T, scaled by the window length (see header).
  localparam acc_t T_ID = acc_t'(WIN) <<< T_FRAC;

  typedef enum logic [2:0] {S_WAIT, S_CAL_U, S_LOOKUP_Y, S_UPDATE_T,
                            S_CAL_DELW, S_UPDATE_W, S_COMPARE, S_OUTPUT} state_e;
  state_e state;

  mat4_t    w;
  accmat4_t t;
  vec4_t    u, p, zr, zbuf;
  logic     zbuf_ok, req_pend, run, finish;
  logic     z_avail;
  vec4_t    z_now;
  logic [5:0] j;
  logic [3:0] cnt;      // sub-state counter
  logic [9:0] iter;

  // ---- shared operator arrays ----
  word_t mul_a [16], mul_b [16];
  acc_t  prod  [16];
  acc_t  add_y [16];

  // ---- mirrored lookup ----
  word_t lk_u, lk_f;
  assign lk_u = u[cnt[1:0]];
  ica_nl_lookup u_lookup (.u(lk_u), .f_u(lk_f));

  function automatic acc_t sq_clamp(input acc_t v);
    return (v > acc_t'(32'h03FF_FFFF)) ? acc_t'(32'h03FF_FFFF) : v;
  endfunction

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      mul_a[i] = '0; mul_b[i] = '0;
    end
    unique case (state)
      S_CAL_U:
        for (int r = 0; r < NCH; r++)
          for (int c = 0; c < NCH; c++) begin
            mul_a[4*r+c] = w[r][c]; mul_b[4*r+c] = zr[c];
          end
      S_UPDATE_T:
        for (int r = 0; r < NCH; r++)
          for (int c = 0; c < NCH; c++) begin
            mul_a[4*r+c] = p[r]; mul_b[4*r+c] = u[c];
          end
      S_CAL_DELW:
        if (cnt == 4'd0) begin
          for (int r = 0; r < NCH; r++)
            for (int c = 0; c < NCH; c++) begin
              mul_a[4*r+c] = R_LEARN_Q24;
              mul_b[4*r+c] = sat16(64'(t[r][c] >>> 11));   // Q.16 -> Q.5
            end
        end else begin
          // row (cnt-1) of R*T times W: product group c holds T(r,k)*W(k,c)
          for (int c = 0; c < NCH; c++)
            for (int k = 0; k < NCH; k++) begin
              mul_a[4*c+k] = word_t'(t[cnt[1:0] - 2'd1][k]);
              mul_b[4*c+k] = w[k][c];
            end
        end
      S_COMPARE:
        // squares of the 16 dW elements (Q.12), held in T
        for (int i = 0; i < 16; i++) begin
          mul_a[i] = word_t'(t[i/4][i%4]); mul_b[i] = word_t'(t[i/4][i%4]);
        end
      default: ;
    endcase
    for (int i = 0; i < 16; i++) prod[i] = mul_a[i] * mul_b[i];

    // Adder array: each adder's result is formed in index order, so a chain
    // reads only results of lower-numbered adders.
    for (int i = 0; i < 16; i++) add_y[i] = '0;
    unique case (state)
      S_CAL_U, S_CAL_DELW:
        // four chains of three adders; outputs at adders 3, 6, 9, 12
        for (int g = 0; g < NCH; g++) begin
          add_y[3*g]   = prod[4*g] + prod[4*g+1];
          add_y[3*g+1] = add_y[3*g] + prod[4*g+2];
          add_y[3*g+2] = add_y[3*g+1] + prod[4*g+3];
        end
      S_UPDATE_T:
        for (int i = 0; i < 16; i++) add_y[i] = t[i/4][i%4] + (prod[i] >>> 6);  // Q.22 -> Q.16
      S_UPDATE_W:
        for (int i = 0; i < 16; i++) add_y[i] = acc_t'(w[i/4][i%4]) + t[i/4][i%4];
      S_COMPARE: begin
        // adder tree over dW^2 (Q.24); each square is clamped to 2^26 - 1
        // so that the sum of sixteen cannot overflow 32 bits
        for (int i = 0; i < 8; i++)
          add_y[i] = sq_clamp(prod[2*i]) + sq_clamp(prod[2*i+1]);
        for (int i = 0; i < 4; i++) add_y[8+i] = add_y[2*i] + add_y[2*i+1];
        add_y[12] = add_y[8] + add_y[9];
        add_y[13] = add_y[10] + add_y[11];
        add_y[14] = add_y[12] + add_y[13];
      end
      default: ;
    endcase
  end

  // a sample is usable in the cycle its z_valid arrives
  assign z_avail = zbuf_ok || z_valid;
  assign z_now   = zbuf_ok ? zbuf : z;

  assign busy = run;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state <= S_WAIT; run <= 1'b0; finish <= 1'b0;
      zbuf_ok <= 1'b0; req_pend <= 1'b0; z_req <= 1'b0; z_idx <= '0;
      j <= '0; cnt <= '0; iter <= '0; iterations <= '0; converged <= 1'b0; done <= 1'b0;
      w_out_valid <= 1'b0; w_out_idx <= '0; w_out_data <= '0;
      u <= '0; p <= '0; zr <= '0; zbuf <= '0;
      for (int r = 0; r < NCH; r++)
        for (int c = 0; c < NCH; c++) begin
          w[r][c] <= (r == c) ? word_t'(1 << W_FRAC) : '0;
          t[r][c] <= '0;
        end
    end else begin
      z_req <= 1'b0;
      done <= 1'b0;
      w_out_valid <= 1'b0;
      if (z_valid) begin zbuf <= z; zbuf_ok <= 1'b1; req_pend <= 1'b0; end

      unique case (state)
        S_WAIT: begin
          if (start && !run) begin run <= 1'b1; iter <= '0; end
          if (run || start) begin
            if (!z_avail && !req_pend) begin
              z_req <= 1'b1; z_idx <= 6'd0; req_pend <= 1'b1;
            end else if (z_avail) begin
              for (int r = 0; r < NCH; r++)
                for (int c = 0; c < NCH; c++)
                  t[r][c] <= (r == c) ? T_ID : '0;
              zr <= z_now; zbuf_ok <= 1'b0;
              z_req <= 1'b1; z_idx <= 6'd1; req_pend <= 1'b1;
              j <= '0; state <= S_CAL_U;
            end
          end
        end
        S_CAL_U: begin
          for (int r = 0; r < NCH; r++) u[r] <= sat16(64'(add_y[3*r+2] >>> W_FRAC));
          cnt <= '0; state <= S_LOOKUP_Y;
        end
        S_LOOKUP_Y: begin
          p[cnt[1:0]] <= lk_f;
          if (cnt == 4'd3) begin cnt <= '0; state <= S_UPDATE_T; end
          else cnt <= cnt + 4'd1;
        end
        S_UPDATE_T: begin
          if (j == 6'd63) begin
            for (int i = 0; i < 16; i++) t[i/4][i%4] <= add_y[i];
            cnt <= '0; state <= S_CAL_DELW;
          end else if (z_avail) begin
            for (int i = 0; i < 16; i++) t[i/4][i%4] <= add_y[i];
            zr <= z_now; zbuf_ok <= 1'b0;
            // prefetch; at j = 62 this wraps to sample 0 of the next iteration
            z_req <= 1'b1; z_idx <= j + 6'd2; req_pend <= 1'b1;
            j <= j + 6'd1; state <= S_CAL_U;
          end
        end
        S_CAL_DELW: begin
          if (cnt == 4'd0) begin
            for (int i = 0; i < 16; i++) t[i/4][i%4] <= acc_t'(sat16(64'(prod[i] >>> 15)));  // Q.14
          end else begin
            for (int c = 0; c < NCH; c++)
              t[cnt[1:0] - 2'd1][c] <= acc_t'(sat16(64'(add_y[3*c+2] >>> 14)));  // Q.12
          end
          if (cnt == 4'd4) begin cnt <= '0; state <= S_UPDATE_W; end
          else cnt <= cnt + 4'd1;
        end
        S_UPDATE_W: begin
          for (int i = 0; i < 16; i++) w[i/4][i%4] <= sat16(64'(add_y[i]));
          state <= S_COMPARE;
        end
        S_COMPARE: begin
          finish <= (add_y[14] <= acc_t'(THRESH_LSB)) || (iter == 10'(MAX_ITER_P - 1));
          converged <= (add_y[14] <= acc_t'(THRESH_LSB));
          iter <= iter + 10'd1;
          for (int r = 0; r < NCH; r++)
            for (int c = 0; c < NCH; c++)
              t[r][c] <= (r == c) ? T_ID : '0;
          cnt <= '0; state <= S_OUTPUT;
        end
        S_OUTPUT: begin
          if (!finish) state <= S_WAIT;
          else begin
            w_out_valid <= 1'b1; w_out_idx <= cnt; w_out_data <= w[cnt[3:2]][cnt[1:0]];
            if (cnt == 4'd15) begin
              cnt <= '0; state <= S_WAIT; run <= 1'b0; finish <= 1'b0;
              zbuf_ok <= 1'b0; req_pend <= 1'b0;   // drop the prefetched sample
              done <= 1'b1; iterations <= iter;
            end else cnt <= cnt + 4'd1;
          end
        end
        default: state <= S_WAIT;
      endcase
    end
  end

endmodule
