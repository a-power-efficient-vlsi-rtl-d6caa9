// bhm_scu: system control unit (SCU).
//
// After the external reset the chip is inactive until an activation command
// (8 bits, see bhm_pkg) arrives from the UART. The SCU then stores it as the
// current mode, sends a one-cycle internal reset to all other modules, waits
// for INIT_DONE from the compression module (which needs 96 cycles to
// initialise), turns on the processor clocks that the mode needs and sends
// a one-cycle trigger to the front-end interface control unit. It then
// waits for the next command, which restarts the same sequence. This is the
// document's initialisation flow; the internal reset following the command
// valid by one cycle, with the mode updated at the same edge, matches its
// waveform.
// Clock gating: a processor's clock runs only when its signal is acquired
// and processed (document: the clock is turned off when the acquisition is
// not activated or set to transmit raw data). So the ICA clock needs bits 0
// and 1, the HRV clock bits 2 and 3, the DOT clock bit 4. Clocks stay off
// from a command until INIT_DONE.
module bhm_scu
  import bhm_pkg::*;
(
  input  logic       clk,
  input  logic       reset,          // external system reset, active high
  input  logic       rx_mode_valid,
  input  logic [7:0] rx_mode,
  input  logic       comp_init_done,
  output logic       system_reset,   // internal reset, one cycle
  output logic [7:0] current_mode,
  output logic       running,
  output logic       ficu_trigger,
  output logic       gclk_ica,
  output logic       gclk_hrv,
  output logic       gclk_dot
);

  typedef enum logic [1:0] {S_INACTIVE, S_RESET, S_WAIT_INIT, S_ACTIVE} state_e;
  state_e state;

  logic en_ica, en_hrv, en_dot;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state <= S_INACTIVE; current_mode <= '0; system_reset <= 1'b0;
      running <= 1'b0; ficu_trigger <= 1'b0;
    end else begin
      system_reset <= 1'b0;
      ficu_trigger <= 1'b0;
      unique case (state)
        S_INACTIVE, S_ACTIVE:
          if (rx_mode_valid) begin
            current_mode <= rx_mode;
            system_reset <= 1'b1;
            running <= 1'b0;
            state <= S_RESET;
          end
        S_RESET: state <= S_WAIT_INIT;
        S_WAIT_INIT:
          if (comp_init_done) begin
            running <= 1'b1;
            ficu_trigger <= 1'b1;
            state <= S_ACTIVE;
          end
        default: state <= S_INACTIVE;
      endcase
    end
  end

  assign en_ica = running & current_mode[M_EEG_ADC] & current_mode[M_ICA];
  assign en_hrv = running & current_mode[M_EKG_ADC] & current_mode[M_HRV];
  assign en_dot = running & current_mode[M_DOT];

  bhm_clock_gate u_cg_ica (.clk, .en(en_ica), .gclk(gclk_ica));
  bhm_clock_gate u_cg_hrv (.clk, .en(en_hrv), .gclk(gclk_hrv));
  bhm_clock_gate u_cg_dot (.clk, .en(en_dot), .gclk(gclk_dot));

endmodule
