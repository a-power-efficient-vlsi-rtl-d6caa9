// ica_cordic_rotate: vector CORDIC of the whitening unit's SVD engine.
//
// Rotation-mode CORDIC: (x, y) -> (x cos t - y sin t, x sin t + y cos t)
// for |t| < 1.7 rad (Q.28). ITER micro-rotations, one per clock, followed
// by one cycle that removes the CORDIC gain with a multiply by 1/K (Q.30).
// The iteration count (16) is this design's choice; it must equal the angle
// CORDIC's and not exceed 20.
// Timing: start pulse -> done pulse ITER+2 cycles later; outputs hold.
module ica_cordic_rotate
  import ica_cordic_pkg::*;
#(
  parameter int unsigned ITER = 16
) (
  input  logic   clk,
  input  logic   reset,
  input  logic   start,
  input  cdata_t x_in,
  input  cdata_t y_in,
  input  angle_t theta,
  output logic   done,
  output cdata_t x_out,
  output cdata_t y_out
);

  cdata_t x, y;
  angle_t z;
  logic [4:0] i;
  logic busy, comp;
  logic signed [CW+31:0] xk, yk;

  assign xk = x * KINV_Q30;
  assign yk = y * KINV_Q30;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      x <= '0; y <= '0; z <= '0; i <= '0; busy <= 1'b0; comp <= 1'b0; done <= 1'b0;
      x_out <= '0; y_out <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        x <= x_in; y <= y_in; z <= theta; i <= '0; busy <= 1'b1; comp <= 1'b0;
      end else if (busy) begin
        if (!z[ANG_W-1]) begin
          x <= x - (y >>> i); y <= y + (x >>> i); z <= z - atan_tab(i);
        end else begin
          x <= x + (y >>> i); y <= y - (x >>> i); z <= z + atan_tab(i);
        end
        if (i == 5'(ITER - 1)) begin busy <= 1'b0; comp <= 1'b1; end
        i <= i + 5'd1;
      end else if (comp) begin
        comp  <= 1'b0;
        done  <= 1'b1;
        x_out <= cdata_t'(xk >>> 30);
        y_out <= cdata_t'(yk >>> 30);
      end
    end
  end

endmodule
