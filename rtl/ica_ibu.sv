// ica_ibu: input buffering unit (IBU) of stage 1, the data controller of the
// ICA processor.
//
// Three identical banks of 32 words each hold the incoming EEG in a circular
// order; a word is one sample of all four channels (4 x 10 bits, so the three
// banks hold 3 x 32 x 40 = 3840 bits). Samples arrive serially on eeg_in,
// channel 1 to 4, one per in_valid. While a half-window (32 samples) fills
// one bank, the other two hold the current 64-sample window:
//   * when the second half-window is full, window 0 (banks 0,1) is handed to
//     training (win_start);
//   * each later fill starts training of the window formed by the previous
//     half and the new one, and at the same time starts component output of
//     the previous half with the unmixing matrix of the window before
//     (out_start). The document gives this overlapped 50% sliding window,
//     the three-bank allocation and the use of the previous W.
// If the engine is still busy when a window is due, the window is skipped
// and the sticky overrun flag is set (this design's choice; the document
// sizes the clock so that this does not happen).
// Read ports are asynchronous: port A reads sample j (0..63) of the training
// window, port B reads sample k (0..31) of the half-window being output.
module ica_ibu
  import ica_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       enable,
  input  logic       in_valid,
  input  sample_t    eeg_in,
  input  logic       engine_busy,
  output logic       win_start,
  output logic       out_start,
  output logic       overrun,
  input  logic [5:0] rd_a_addr,
  output sample4_t   rd_a_data,
  input  logic [4:0] rd_b_addr,
  output sample4_t   rd_b_data
);

  sample4_t   mem [NBANK][HALF_WIN];
  sample_t    hold [NCH-1];
  logic [1:0] ch;
  logic [4:0] waddr;
  logic [1:0] wbank, lo_bank, hi_bank, out_bank;
  logic [1:0] filled;   // number of half-windows seen, saturates at 2

  function automatic logic [1:0] prev_bank(input logic [1:0] b);
    return (b == 2'd0) ? 2'd2 : b - 2'd1;
  endfunction
  function automatic logic [1:0] next_bank(input logic [1:0] b);
    return (b == 2'd2) ? 2'd0 : b + 2'd1;
  endfunction

  assign rd_a_data = mem[rd_a_addr[5] ? hi_bank : lo_bank][rd_a_addr[4:0]];
  assign rd_b_data = mem[out_bank][rd_b_addr];

  // Bank write: the fourth channel completes a word.
  always_ff @(posedge clk) begin
    if (enable && in_valid && ch == 2'd3)
      mem[wbank][waddr] <= {eeg_in, hold[2], hold[1], hold[0]};
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      ch <= '0; waddr <= '0; wbank <= '0; lo_bank <= '0; hi_bank <= 2'd1; out_bank <= '0;
      filled <= '0; win_start <= 1'b0; out_start <= 1'b0; overrun <= 1'b0;
      for (int c = 0; c < NCH-1; c++) hold[c] <= '0;
    end else begin
      win_start <= 1'b0;
      out_start <= 1'b0;
      if (enable && in_valid) begin
        if (ch != 2'd3) hold[ch] <= eeg_in;
        ch <= ch + 2'd1;
        if (ch == 2'd3) begin
          waddr <= waddr + 5'd1;
          if (waddr == 5'(HALF_WIN - 1)) begin
            wbank <= next_bank(wbank);
            if (filled != 2'd0) begin
              if (engine_busy) overrun <= 1'b1;
              else begin
                lo_bank   <= prev_bank(wbank);
                hi_bank   <= wbank;
                win_start <= 1'b1;
                if (filled == 2'd2) begin
                  out_bank  <= prev_bank(wbank);
                  out_start <= 1'b1;
                end
              end
            end
            if (filled != 2'd2 && !(filled != 2'd0 && engine_busy)) filled <= filled + 2'd1;
          end
        end
      end
    end
  end

endmodule
