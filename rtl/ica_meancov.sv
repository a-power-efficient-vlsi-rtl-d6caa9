// ica_meancov: mean and covariance unit (MeanCov) of stage 1.
//
// Computes the four channel means and the 4x4 covariance matrix of one
// 64-sample window with a single shared multiply-accumulate operator
// (A*B+C), as in the document. Only the ten upper-triangle elements are
// accumulated; the lower triangle is mirrored.
//   Pass over the window: for each sample j (read through rd_addr/rd_data,
//   an asynchronous read port of the input buffer), 14 MAC steps: four sums
//   S_c += x_c and ten products Q_pq += x_p*x_q.
//   Finish: mean_c = S_c / 64, kept as Q10.6 (the 6-bit shift), and ten more
//   MAC steps cov_pq = (64*Q_pq - S_p*S_q) / 64^2, i.e. E[XY]-E[X]E[Y].
// Separate sum registers for the means are this design's choice.
// Timing: start pulse -> done pulse after 64*14 + 10 + 1 cycles; mean_valid
// and the outputs then hold until the next start.
module ica_meancov
  import ica_pkg::*;
(
  input  logic     clk,
  input  logic     reset,
  input  logic     start,
  output logic [5:0] rd_addr,
  input  sample4_t rd_data,
  output logic     done,
  output logic     mean_valid,
  output mean4_t   mean,       // Q10.6
  output accmat4_t cov         // Q.6, symmetric
);

  typedef enum logic [1:0] {IDLE, ACC, FIN} state_e;
  state_e state;

  logic [3:0]  step;           // 0..13 within a sample, 0..9 in FIN
  logic [5:0]  j;
  logic [15:0] sum_v [NCH];
  logic signed [39:0] prod_v [10];

  // Pair table of the ten upper-triangle elements.
  function automatic logic [1:0] pair_p(input logic [3:0] k);
    case (k)
      4'd0, 4'd1, 4'd2, 4'd3: return 2'd0;
      4'd4, 4'd5, 4'd6:       return 2'd1;
      4'd7, 4'd8:             return 2'd2;
      default:                return 2'd3;
    endcase
  endfunction
  function automatic logic [1:0] pair_q(input logic [3:0] k);
    case (k)
      4'd0: return 2'd0; 4'd1: return 2'd1; 4'd2: return 2'd2; 4'd3: return 2'd3;
      4'd4: return 2'd1; 4'd5: return 2'd2; 4'd6: return 2'd3;
      4'd7: return 2'd2; 4'd8: return 2'd3;
      default: return 2'd3;
    endcase
  endfunction

  // Shared MAC operands.
  logic signed [17:0] mac_a, mac_b;
  logic signed [39:0] mac_c, mac_y;
  logic [3:0] k;

  always_comb begin
    mac_a = '0; mac_b = '0; mac_c = '0; k = '0;
    if (state == ACC) begin
      if (step < 4) begin
        mac_a = 18'(rd_data[step[1:0]]);
        mac_b = 18'sd1;
        mac_c = 40'(sum_v[step[1:0]]);
      end else begin
        k     = step - 4'd4;
        mac_a = 18'(rd_data[pair_p(k)]);
        mac_b = 18'(rd_data[pair_q(k)]);
        mac_c = prod_v[k];
      end
    end else if (state == FIN) begin
      k     = step;
      mac_a = -18'(sum_v[pair_p(k)]);
      mac_b = 18'(sum_v[pair_q(k)]);
      mac_c = prod_v[k] <<< 6;
    end
    mac_y = 40'(mac_a * mac_b) + mac_c;
  end

  assign rd_addr = j;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state <= IDLE; step <= '0; j <= '0; done <= 1'b0; mean_valid <= 1'b0;
      for (int c = 0; c < NCH; c++) sum_v[c] <= '0;
      for (int i = 0; i < 10; i++) prod_v[i] <= '0;
      mean <= '0; cov <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          state <= ACC; step <= '0; j <= '0; mean_valid <= 1'b0;
          for (int c = 0; c < NCH; c++) sum_v[c] <= '0;
          for (int i = 0; i < 10; i++) prod_v[i] <= '0;
        end
        ACC: begin
          if (step < 4) sum_v[step[1:0]] <= mac_y[15:0];
          else          prod_v[k] <= mac_y;
          if (step == 4'd13) begin
            step <= '0;
            if (j == 6'd63) state <= FIN;
            j <= j + 6'd1;
          end else step <= step + 4'd1;
        end
        FIN: begin
          cov[pair_p(k)][pair_q(k)] <= acc_t'(mac_y >>> 6);
          cov[pair_q(k)][pair_p(k)] <= acc_t'(mac_y >>> 6);
          if (step == 4'd9) begin
            state <= IDLE; done <= 1'b1; mean_valid <= 1'b1;
            for (int c = 0; c < NCH; c++) mean[c] <= sum_v[c];
          end else step <= step + 4'd1;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
