// ica_nl_lookup: mirrored non-linear lookup unit of the ICA training unit.
//
// Returns f(u) = 1 - 2/(1+exp(-u)), the term (1-2y) of the Infomax update,
// for a Q7.8 input u. f is odd, so only the half for u >= 0 is stored:
// 32 entries with a step of 1/4, covering 0 <= u < 8 (the document chooses
// a 32-entry ROM, a lookup range of about +-7 and saturation to +-1 outside).
//   u >= 0 : index = u[10:6], or 5'b11111 when u[14:11] != 0 (|u| >= 8)
//   u <  0 : index = ~u[10:6], or 5'b11111 when u[14:11] != 4'b1111,
//            and the ROM word is inverted (one's complement ~ negation)
// This selection follows the bit fields printed in the document's figure of
// the unit. ROM entry k is round((1 - 2/(1+exp(-k/4))) * 2^14) for k < 31;
// entry 31 holds the saturation value -1.0 (-16384). Output is Q1.14.
// Purely combinational (the ROM is a constant table).
// Lint note: input bits u[5:0] are reported as unused. They are the part of
// u finer than the 1/4 table step, which the document's lookup also drops.
module ica_nl_lookup
  import ica_pkg::*;
(
  input  word_t u,      // Q7.8
  output word_t f_u     // Q1.14
);

  logic [4:0] idx;
  word_t      rom_q;

  always_comb begin
    if (u[15]) idx = (u[14:11] != 4'b1111) ? 5'b11111 : ~u[10:6];
    else       idx = (u[14:11] != 4'b0000) ? 5'b11111 :  u[10:6];
  end

  // Half-range ROM of f(u) for u = idx/4 (see header for the formula).
  always_comb begin
    unique case (idx)
      5'd0:  rom_q = 16'sd0;       5'd1:  rom_q = -16'sd2037;
      5'd2:  rom_q = -16'sd4013;   5'd3:  rom_q = -16'sd5871;
      5'd4:  rom_q = -16'sd7571;   5'd5:  rom_q = -16'sd9087;
      5'd6:  rom_q = -16'sd10406;  5'd7:  rom_q = -16'sd11533;
      5'd8:  rom_q = -16'sd12478;  5'd9:  rom_q = -16'sd13260;
      5'd10: rom_q = -16'sd13898;  5'd11: rom_q = -16'sd14415;
      5'd12: rom_q = -16'sd14830;  5'd13: rom_q = -16'sd15161;
      5'd14: rom_q = -16'sd15423;  5'd15: rom_q = -16'sd15631;
      5'd16: rom_q = -16'sd15795;  5'd17: rom_q = -16'sd15923;
      5'd18: rom_q = -16'sd16024;  5'd19: rom_q = -16'sd16103;
      5'd20: rom_q = -16'sd16165;  5'd21: rom_q = -16'sd16213;
      5'd22: rom_q = -16'sd16251;  5'd23: rom_q = -16'sd16280;
      5'd24: rom_q = -16'sd16303;  5'd25: rom_q = -16'sd16321;
      5'd26: rom_q = -16'sd16335;  5'd27: rom_q = -16'sd16346;
      5'd28: rom_q = -16'sd16354;  5'd29: rom_q = -16'sd16361;
      5'd30: rom_q = -16'sd16366;  default: rom_q = -16'sd16384;
    endcase
  end

  assign f_u = u[15] ? ~rom_q : rom_q;

endmodule
