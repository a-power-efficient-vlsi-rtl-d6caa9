// ica_cordic_angle: angle CORDIC of the whitening unit's SVD engine.
//
// Vectoring-mode CORDIC: returns theta = atan(y/x) in (-pi/2, pi/2), Q.28
// radians. When x < 0 both inputs are negated first, which leaves y/x and
// hence the Jacobi rotation angle unchanged. One micro-rotation per clock,
// ITER iterations (the document does not give the iteration count; 16 is
// this design's choice and must not exceed 20).
// Timing: start pulse with x,y -> done pulse ITER+1 cycles later; theta holds.
module ica_cordic_angle
  import ica_cordic_pkg::*;
#(
  parameter int unsigned ITER = 16
) (
  input  logic   clk,
  input  logic   reset,
  input  logic   start,
  input  cdata_t x_in,
  input  cdata_t y_in,
  output logic   done,
  output angle_t theta
);

  cdata_t x, y;
  angle_t z;
  logic [4:0] i;
  logic busy;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      x <= '0; y <= '0; z <= '0; i <= '0; busy <= 1'b0; done <= 1'b0; theta <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        x <= x_in[CW-1] ? -x_in : x_in;
        y <= x_in[CW-1] ? -y_in : y_in;
        z <= '0; i <= '0; busy <= 1'b1;
      end else if (busy) begin
        if (!y[CW-1]) begin
          x <= x + (y >>> i); y <= y - (x >>> i); z <= z + atan_tab(i);
        end else begin
          x <= x - (y >>> i); y <= y + (x >>> i); z <= z - atan_tab(i);
        end
        if (i == 5'(ITER - 1)) begin
          busy <= 1'b0; done <= 1'b1;
          theta <= (!y[CW-1]) ? z + atan_tab(i) : z - atan_tab(i);
        end
        i <= i + 5'd1;
      end
    end
  end

endmodule
