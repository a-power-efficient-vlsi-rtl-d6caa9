// ica_wu: whitening unit (WU).
//
// Finds the whitening matrix P = E D^-1/2 E^T of the window covariance
// C = E D E^T and applies it to centered samples, z = P (x - mean).
//   SVD engine: cyclic Jacobi eigenvalue decomposition of the symmetric
//   4x4 covariance. Each sweep visits the six index pairs in the document's
//   parallel order {(1,2),(3,4); (1,3),(2,4); (1,4),(2,3)}: two angle
//   CORDICs find the two rotation angles of a disjoint pair of pairs, then
//   eight vector CORDICs rotate the affected columns of C, then its rows,
//   then the columns of E (C <- J^T C J, E <- E J). The number of sweeps
//   (NSWEEP) is not given by the document ("after few iterations");
//   6 is this design's choice.
//   Post-processing: the diagonal of C is D; a 1/sqrt unit gives D^-1/2.
//   Vector product 4: one shared unit of four multipliers and an adder tree
//   forms F = E D^-1/2 (4 cycles), then P = F E^T (16 cycles) and
//   afterwards each whitened sample (4 cycles, one row of P per cycle).
// Interface: start with cov valid -> p_done pulse, P held in p_mat (Q.24).
//   Whitened samples are served on request: z_req with z_idx reads sample
//   z_idx of the window through rd_addr/rd_data (asynchronous read), centers
//   it with the CTR unit and returns z (Q7.8) with a z_valid pulse 5 cycles
//   later. z requests are accepted only while idle and after p_done.
module ica_wu
  import ica_pkg::*;
  import ica_cordic_pkg::*;
#(
  parameter int unsigned NSWEEP = 6,
  parameter int unsigned ITER   = 16
) (
  input  logic     clk,
  input  logic     reset,
  input  logic     start,
  input  accmat4_t cov,          // Q.6
  input  mean4_t   mean,         // Q10.6
  input  logic     mean_valid,
  output logic     p_done,
  output accmat4_t p_mat,        // Q.24
  // whitened-sample service
  input  logic       z_req,
  input  logic [5:0] z_idx,
  output logic [5:0] rd_addr,
  input  sample4_t   rd_data,
  output logic       z_valid,
  output vec4_t      z
);

  typedef enum logic [3:0] {IDLE, ANG, ANG_WT, COLS, COLS_WT, ROWS, ROWS_WT,
                            EVEC, EVEC_WT, ISQ, ISQ_WT, PF, PP, ZCALC} state_e;
  state_e state;
  logic   p_valid;     // P of the current window is ready for z requests

  cdata_t a [NCH][NCH];
  cdata_t e [NCH][NCH];
  cdata_t f [NCH][NCH];
  logic [31:0] d [NCH];
  logic [1:0] step;
  logic [3:0] sweep;
  logic [3:0] cnt;
  logic [5:0] zi;

  // Pair schedule of the current step.
  logic [1:0] p1, q1, p2, q2;
  always_comb begin
    unique case (step)
      2'd0:    begin p1 = 2'd0; q1 = 2'd1; p2 = 2'd2; q2 = 2'd3; end
      2'd1:    begin p1 = 2'd0; q1 = 2'd2; p2 = 2'd1; q2 = 2'd3; end
      default: begin p1 = 2'd0; q1 = 2'd3; p2 = 2'd1; q2 = 2'd2; end
    endcase
  end

  // ---- two angle CORDICs ----
  logic   ang_start;
  logic   ang_done [2];
  angle_t ang_th   [2];
  angle_t theta    [2];
  cdata_t ang_x [2], ang_y [2];

  always_comb begin
    ang_x[0] = a[q1][q1] - a[p1][p1];  ang_y[0] = a[p1][q1] <<< 1;
    ang_x[1] = a[q2][q2] - a[p2][p2];  ang_y[1] = a[p2][q2] <<< 1;
  end

  for (genvar g = 0; g < 2; g++) begin : g_ang
    ica_cordic_angle #(.ITER(ITER)) u_ang (
      .clk, .reset, .start(ang_start), .x_in(ang_x[g]), .y_in(ang_y[g]),
      .done(ang_done[g]), .theta(ang_th[g]));
  end

  // ---- eight vector CORDICs: 0..3 serve pair 1, 4..7 pair 2, index k ----
  logic   rot_start;
  logic   rot_done [8];
  cdata_t rot_xi [8], rot_yi [8], rot_xo [8], rot_yo [8];

  always_comb begin
    for (int k = 0; k < NCH; k++) begin
      unique case (state)
        ROWS, ROWS_WT: begin
          rot_xi[k]   = a[p1][k]; rot_yi[k]   = a[q1][k];
          rot_xi[k+4] = a[p2][k]; rot_yi[k+4] = a[q2][k];
        end
        EVEC, EVEC_WT: begin
          rot_xi[k]   = e[k][p1]; rot_yi[k]   = e[k][q1];
          rot_xi[k+4] = e[k][p2]; rot_yi[k+4] = e[k][q2];
        end
        default: begin // columns of C
          rot_xi[k]   = a[k][p1]; rot_yi[k]   = a[k][q1];
          rot_xi[k+4] = a[k][p2]; rot_yi[k+4] = a[k][q2];
        end
      endcase
    end
  end

  for (genvar g = 0; g < 8; g++) begin : g_rot
    ica_cordic_rotate #(.ITER(ITER)) u_rot (
      .clk, .reset, .start(rot_start), .x_in(rot_xi[g]), .y_in(rot_yi[g]),
      .theta(theta[g/4]), .done(rot_done[g]), .x_out(rot_xo[g]), .y_out(rot_yo[g]));
  end

  // ---- 1/sqrt ----
  logic        isq_start, isq_done;
  logic [31:0] isq_d;
  ica_inv_sqrt u_isq (
    .clk, .reset, .start(isq_start), .lambda_q6(a[cnt[1:0]][cnt[1:0]]),
    .done(isq_done), .d_q24(isq_d));

  // ---- centering unit on the read port ----
  logic  xzm_valid;
  xzm4_t xzm;
  ica_ctr u_ctr (
    .in_valid(state == ZCALC), .x(rd_data), .mean_valid, .mean,
    .xzm_valid, .xzm);
  assign rd_addr = zi;

  // ---- shared vector product unit (four multipliers + adder tree) ----
  logic signed [79:0] vp_prod [NCH];
  logic signed [79:0] vp_sum;
  cdata_t vp_a [NCH], vp_b [NCH];
  logic [1:0] ci, cj;
  assign ci = cnt[3:2];
  assign cj = cnt[1:0];

  always_comb begin
    for (int k = 0; k < NCH; k++) begin
      unique case (state)
        PF:    begin vp_a[k] = e[cnt[1:0]][k]; vp_b[k] = cdata_t'({1'b0, d[k]}); end
        PP:    begin vp_a[k] = f[ci][k];       vp_b[k] = e[cj][k]; end
        ZCALC: begin vp_a[k] = cdata_t'(p_mat[cnt[1:0]][k]);
                     vp_b[k] = xzm_valid ? cdata_t'(xzm[k]) : '0; end
        default: begin vp_a[k] = '0; vp_b[k] = '0; end
      endcase
      vp_prod[k] = vp_a[k] * vp_b[k];
    end
    vp_sum = vp_prod[0] + vp_prod[1] + vp_prod[2] + vp_prod[3];
  end

  assign ang_start = (state == ANG);
  assign rot_start = (state == COLS) || (state == ROWS) || (state == EVEC);
  assign isq_start = (state == ISQ);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state <= IDLE; step <= '0; sweep <= '0; cnt <= '0; zi <= '0;
      p_done <= 1'b0; p_valid <= 1'b0; z_valid <= 1'b0; z <= '0; p_mat <= '0;
      theta[0] <= '0; theta[1] <= '0;
      for (int i = 0; i < NCH; i++) begin
        d[i] <= '0;
        for (int j = 0; j < NCH; j++) begin a[i][j] <= '0; e[i][j] <= '0; f[i][j] <= '0; end
      end
    end else begin
      p_done  <= 1'b0;
      z_valid <= 1'b0;
      unique case (state)
        IDLE: begin
          if (start) begin
            for (int i = 0; i < NCH; i++)
              for (int j = 0; j < NCH; j++) begin
                a[i][j] <= cdata_t'(cov[i][j]);
                e[i][j] <= (i == j) ? (cdata_t'(1) <<< E_FRAC) : '0;
              end
            step <= '0; sweep <= '0; p_valid <= 1'b0;
            state <= ANG;
          end else if (z_req && p_valid) begin
            zi <= z_idx; cnt <= '0; state <= ZCALC;
          end
        end
        ANG:   state <= ANG_WT;
        ANG_WT: if (ang_done[0]) begin
          theta[0] <= ang_th[0] >>> 1;     // rotation angle is half of atan
          theta[1] <= ang_th[1] >>> 1;
          state <= COLS;
        end
        COLS:   state <= COLS_WT;
        COLS_WT: if (rot_done[0]) begin
          for (int k = 0; k < NCH; k++) begin
            a[k][p1] <= rot_xo[k];   a[k][q1] <= rot_yo[k];
            a[k][p2] <= rot_xo[k+4]; a[k][q2] <= rot_yo[k+4];
          end
          state <= ROWS;
        end
        ROWS:   state <= ROWS_WT;
        ROWS_WT: if (rot_done[0]) begin
          for (int k = 0; k < NCH; k++) begin
            a[p1][k] <= rot_xo[k];   a[q1][k] <= rot_yo[k];
            a[p2][k] <= rot_xo[k+4]; a[q2][k] <= rot_yo[k+4];
          end
          state <= EVEC;
        end
        EVEC:   state <= EVEC_WT;
        EVEC_WT: if (rot_done[0]) begin
          for (int k = 0; k < NCH; k++) begin
            e[k][p1] <= rot_xo[k];   e[k][q1] <= rot_yo[k];
            e[k][p2] <= rot_xo[k+4]; e[k][q2] <= rot_yo[k+4];
          end
          if (step == 2'd2) begin
            step <= '0;
            if (sweep == 4'(NSWEEP - 1)) begin state <= ISQ; cnt <= '0; end
            else begin sweep <= sweep + 4'd1; state <= ANG; end
          end else begin
            step <= step + 2'd1; state <= ANG;
          end
        end
        ISQ:   state <= ISQ_WT;
        ISQ_WT: if (isq_done) begin
          d[cnt[1:0]] <= isq_d;
          if (cnt == 4'd3) begin cnt <= '0; state <= PF; end
          else begin cnt <= cnt + 4'd1; state <= ISQ; end
        end
        PF: begin   // F[i][k] = E[i][k] * d[k]   (Q.28 * Q.24 >> 28 = Q.24)
          for (int k = 0; k < NCH; k++) f[cnt[1:0]][k] <= cdata_t'(vp_prod[k] >>> E_FRAC);
          if (cnt == 4'd3) begin cnt <= '0; state <= PP; end
          else cnt <= cnt + 4'd1;
        end
        PP: begin   // P[i][j] = sum_k F[i][k] * E[j][k]   (Q.24)
          p_mat[ci][cj] <= sat32(64'(vp_sum >>> E_FRAC));
          if (cnt == 4'd15) begin
            cnt <= '0; state <= IDLE; p_done <= 1'b1; p_valid <= 1'b1;
          end else cnt <= cnt + 4'd1;
        end
        ZCALC: begin // z_i = sum_k P[i][k] * xzm_k  (Q.24 * Q.6 >> 22 = Q.8)
          z[cnt[1:0]] <= sat16(64'(vp_sum >>> 22));
          if (cnt == 4'd3) begin
            cnt <= '0; state <= IDLE; z_valid <= 1'b1;
          end else cnt <= cnt + 4'd1;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
