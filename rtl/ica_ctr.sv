// ica_ctr: data centering unit (CTR) of stage 1.
//
// Four parallel subtractors remove the window mean of each channel:
// x_zm(i) = x(i) - mean, as the document describes. The means come from the
// mean/covariance unit together with MEAN_VALID; the output valid is the
// conjunction of the input valid and MEAN_VALID (this design's reading of
// how the two are combined). Means are Q10.6, so the centered samples are
// Q10.6 signed (17 bits) and keep the fraction of the mean.
// Combinational, no latency.
module ica_ctr
  import ica_pkg::*;
(
  input  logic     in_valid,
  input  sample4_t x,
  input  logic     mean_valid,
  input  mean4_t   mean,
  output logic     xzm_valid,
  output xzm4_t    xzm
);

  always_comb begin
    for (int c = 0; c < NCH; c++)
      xzm[c] = xzm_t'({1'b0, x[c], 6'b0}) - xzm_t'({1'b0, mean[c]});
  end

  assign xzm_valid = in_valid & mean_valid;

endmodule
