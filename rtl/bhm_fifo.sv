// bhm_fifo: small synchronous FIFO with valid/ready on both sides.
//
// Used to hold raw front-end samples while the prioritized data selector
// serves a higher-priority source or the compressor is busy (the document's
// output-buffer role; its size is this design's choice). A write when full
// is dropped and flagged in the sticky OVERFLOW output (the sources are
// sample streams that cannot wait, so there is no input ready). Read data is
// combinational from the storage array (first-word fall-through).
module bhm_fifo #(
  parameter int unsigned W     = 10,
  parameter int unsigned DEPTH = 8
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data,
  input  logic         out_ready,
  output logic         overflow
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd, wr;
  logic [AW:0]   cnt;
  logic          in_ready, push, pop;

  assign in_ready  = (cnt != (AW+1)'(DEPTH));
  assign out_valid = (cnt != '0);
  assign out_data  = mem[rd];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      rd <= '0; wr <= '0; cnt <= '0; overflow <= 1'b0;
    end else begin
      if (push) begin
        mem[wr] <= in_data;
        wr <= (wr == AW'(DEPTH - 1)) ? '0 : wr + 1'b1;
      end
      if (pop) rd <= (rd == AW'(DEPTH - 1)) ? '0 : rd + 1'b1;
      cnt <= cnt + (AW+1)'(push) - (AW+1)'(pop);
      if (in_valid && !in_ready) overflow <= 1'b1;
    end
  end

endmodule
