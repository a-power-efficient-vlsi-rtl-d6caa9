// bhm_pds: prioritized data selector (PDS).
//
// Four 16-bit source streams (EKG, EEG/ICA, HRV, DOT) compete for the
// single input of the lossless compressor. Whenever the output register is
// empty or being taken by the compressor, the highest-priority valid source
// is accepted (document's fixed priority: EKG 1, EEG/ICA 2, HRV 3, DOT 4;
// 1 is taken as the highest). Each word leaves with its source number and
// the compression-bypass flag of its source from the activation command
// (bits 5-7 for EEG, EKG and DOT; HRV data is always marked bypassed
// because the document lists HRV compression as "Not Supported").
// Handshake: valid/ready on every side. When the compressor deasserts
// ready the output register holds and no source is granted (second stage
// of the backward handshake); each processor then holds its own output
// (third stage). One word per cycle at full throughput.
module bhm_pds
  import bhm_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic [7:0]  mode,
  input  logic [3:0]  src_valid,     // index = src_e
  input  logic [15:0] src_data [4],
  output logic [3:0]  src_ready,
  output logic        out_valid,
  output logic [15:0] out_data,
  output src_e        out_src,
  output logic        out_bypass,
  input  logic        out_ready
);

  logic       take;
  logic [1:0] sel;
  logic       any;

  always_comb begin
    sel = 2'd0; any = 1'b0;
    for (int i = 3; i >= 0; i--)
      if (src_valid[i]) begin sel = 2'(i); any = 1'b1; end
  end

  assign take = !out_valid || out_ready;

  always_comb begin
    src_ready = '0;
    if (take && any) src_ready[sel] = 1'b1;
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      out_valid <= 1'b0; out_data <= '0; out_src <= SRC_EKG; out_bypass <= 1'b0;
    end else if (take) begin
      out_valid <= any;
      if (any) begin
        out_data <= src_data[sel];
        out_src  <= src_e'(sel);
        unique case (src_e'(sel))
          SRC_EKG: out_bypass <= mode[M_BYP_EKG];
          SRC_EEG: out_bypass <= mode[M_BYP_EEG];
          SRC_HRV: out_bypass <= 1'b1;
          default: out_bypass <= mode[M_BYP_DOT];
        endcase
      end
    end
  end

endmodule
