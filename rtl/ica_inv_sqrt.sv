// ica_inv_sqrt: 1/sqrt(x) unit of the whitening unit (turns the eigenvalue
// matrix D into D^-1/2).
//
// Input: eigenvalue lambda as Q.6 (covariance format); values below one LSB
// are clamped to one LSB, values above 2^27 to 2^27. Output: lambda^-1/2 in
// Q.24. The document only names this operator; this design computes it in
// two bit-serial steps that need no table:
//   s = isqrt(lambda_q6 * 2^20)   (= sqrt(lambda) * 2^13, 24 result bits,
//                                   one bit per clock)
//   d = 2^37 / s                  (restoring division, one bit per clock)
// Timing: start pulse -> done pulse 24 + 38 + 1 cycles later; d holds.
// Lint note: bit 48 of the square-root trial difference is reported as
// unused. Bit 49 is the sign that decides each root digit; the remainder
// that is kept is always below 2^26, so bit 48 is zero whenever the trial is
// kept and is only present to keep the subtraction wide enough.
module ica_inv_sqrt (
  input  logic               clk,
  input  logic               reset,
  input  logic               start,
  input  logic signed [39:0] lambda_q6,
  output logic               done,
  output logic [31:0]        d_q24
);

  typedef enum logic [1:0] {IDLE, SQRT, DIV} state_e;
  state_e state;

  logic [47:0] rad;       // remaining radicand bits
  logic [47:0] rem;       // square-root remainder
  logic [23:0] root;
  logic [5:0]  cnt;
  logic [37:0] quo;       // division: quotient / shifting dividend
  logic [23:0] drem;      // division remainder (< root)
  logic [26:0] lam_c;

  logic [49:0] trial;
  logic [24:0] dtrial;

  always_comb begin
    if (lambda_q6 < 40'sd1)               lam_c = 27'd1;
    else if (lambda_q6 > 40'sd134217727)  lam_c = 27'd134217727;
    else                                  lam_c = lambda_q6[26:0];
    trial  = {rem, rad[47:46]} - {24'b0, root, 2'b01};
    dtrial = {drem, quo[37]} - {1'b0, root};
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state <= IDLE; rad <= '0; rem <= '0; root <= '0; cnt <= '0;
      quo <= '0; drem <= '0; done <= 1'b0; d_q24 <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          rad <= {1'b0, lam_c, 20'b0}; rem <= '0; root <= '0; cnt <= '0;
          state <= SQRT;
        end
        SQRT: begin
          // Digit-by-digit square root, two radicand bits per step.
          if (!trial[49]) begin
            rem  <= trial[47:0];
            root <= {root[22:0], 1'b1};
          end else begin
            rem  <= {rem[45:0], rad[47:46]};
            root <= {root[22:0], 1'b0};
          end
          rad <= {rad[45:0], 2'b00};
          if (cnt == 6'd23) begin
            cnt <= '0; state <= DIV;
            quo <= 38'h20_0000_0000;        // 2^37
            drem <= '0;
          end else cnt <= cnt + 6'd1;
        end
        DIV: begin
          if (!dtrial[24]) begin
            drem <= dtrial[23:0];
            quo  <= {quo[36:0], 1'b1};
          end else begin
            drem <= {drem[22:0], quo[37]};
            quo  <= {quo[36:0], 1'b0};
          end
          if (cnt == 6'd37) begin
            state <= IDLE; done <= 1'b1;
            d_q24 <= (!dtrial[24]) ? 32'({quo[36:0], 1'b1}) : 32'({quo[36:0], 1'b0});
          end else cnt <= cnt + 6'd1;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
