// ica_cordic_pkg: constants shared by the angle and vector CORDICs of the
// whitening unit. Angles are Q.28 radians in 32 bits.
//   atan_tab(i) = round(atan(2^-i) * 2^28)
//   KINV_Q30    = round(prod_i 1/sqrt(1+2^-2i) * 2^30) for 16 iterations
package ica_cordic_pkg;

  localparam int unsigned CW    = 40;          // internal datapath width
  localparam int unsigned ANG_W = 32;
  localparam logic signed [31:0] KINV_Q30 = 32'sd652032874;

  typedef logic signed [CW-1:0]    cdata_t;
  typedef logic signed [ANG_W-1:0] angle_t;

  function automatic angle_t atan_tab(input logic [4:0] i);
    case (i)
      5'd0:  return 32'sd210828714; 5'd1:  return 32'sd124459457;
      5'd2:  return 32'sd65760959;  5'd3:  return 32'sd33381290;
      5'd4:  return 32'sd16755422;  5'd5:  return 32'sd8385879;
      5'd6:  return 32'sd4193963;   5'd7:  return 32'sd2097109;
      5'd8:  return 32'sd1048571;   5'd9:  return 32'sd524287;
      5'd10: return 32'sd262144;    5'd11: return 32'sd131072;
      5'd12: return 32'sd65536;     5'd13: return 32'sd32768;
      5'd14: return 32'sd16384;     5'd15: return 32'sd8192;
      5'd16: return 32'sd4096;      5'd17: return 32'sd2048;
      5'd18: return 32'sd1024;      default: return 32'sd512;
    endcase
  endfunction

endpackage
