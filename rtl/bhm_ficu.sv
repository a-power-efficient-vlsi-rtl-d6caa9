// bhm_ficu: front-end interface control unit (FICU).
//
// Drives the analog front-end chip (AIC) and its time-multiplexed 10-bit ADC
// and delivers the converted samples to the processing engines.
//   Clocks: two dividers of the system clock give AIC_CLK10K (amplifier
//   chopper and switched-capacitor filter) and ADC_CLK1200K (ADC master
//   clock). ADC_RESET is high from reset until the first ADC clock cycle.
//   Scheduling: after the trigger from the system control unit a 256 Hz
//   counter schedules EKG acquisitions and, on every other tick (EEG flag),
//   EEG acquisitions (128 Hz); a 24 Hz counter schedules DOT acquisitions,
//   one sensor value each. Events wait in a buffer of at most 8 entries; when
//   events fall due together they are queued in ADC priority order EEG,
//   EKG, DOT. An EEG event converts channels 1-4, an EKG event channels 1-3.
//   A-D conversion state machine (document's five states): channel
//   selection -> dummy conversion -> wait for EOC -> real conversion ->
//   send data to engine. The dummy conversion lets the analog multiplexer
//   settle after ADC_CHSEL changes; its result is discarded.
//   DOT: 6 LEDs x 4 sensors = 24 conversions per frame; DOT_CHSEL follows
//   the document's mapping table and LED_SEL moves to the next LED right
//   after the fourth conversion of an LED.
// ADC handshake (document): START_CONVERSION is sampled on an ADC clock
// edge; the conversion takes 12 ADC cycles including that one; EOC is high
// for one ADC cycle with the data valid. The FICU changes START on the ADC
// clock's falling phase and samples EOC/DATA in the middle of its high phase.
// Divider values assume a 24 MHz system clock (from the document's FICU
// figure); all are parameters so tests can run faster.
module bhm_ficu
  import bhm_pkg::*;
#(
  parameter int unsigned DIV_ADC   = 20,        // 24 MHz / 1.2 MHz
  parameter int unsigned DIV_10K   = 2400,      // 24 MHz / 10 kHz
  parameter int unsigned DIV_256HZ = 93750,     // 24 MHz / 256 Hz
  parameter int unsigned DIV_24HZ  = 1000000    // 24 MHz / 24 Hz
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       trigger,
  input  logic [7:0] mode,
  // AIC interface
  output logic       aic_clk10k,
  output logic       adc_clk1200k,
  output logic       adc_reset,
  output logic       adc_start_conversion,
  output logic [2:0] adc_chsel,
  input  logic       adc_eoc,
  input  logic [9:0] adc_data,
  output logic [3:0] dot_chsel,
  output logic [2:0] led_sel,
  // converted samples
  output logic       eeg_valid,
  output logic [9:0] eeg_data,      // channels 1..4 in order
  output logic       ekg_valid,
  output logic [9:0] ekg_data,      // channels 1..3 in order
  output logic       dot_valid,
  output logic [9:0] dot_data,
  output logic [4:0] dot_conv,      // conversion number 0..23
  output logic       queue_full     // an event was lost (sticky)
);

  // ---------------- clock dividers ----------------
  logic [$clog2(DIV_ADC)-1:0] adc_cnt;
  logic [$clog2(DIV_10K)-1:0] k10_cnt;
  logic adc_sample, adc_drive;     // strobes inside the ADC clock period

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      adc_cnt <= '0; k10_cnt <= '0; aic_clk10k <= 1'b0; adc_clk1200k <= 1'b1;
    end else begin
      adc_cnt <= (adc_cnt == $bits(adc_cnt)'(DIV_ADC - 1)) ? '0 : adc_cnt + 1'b1;
      adc_clk1200k <= (adc_cnt == $bits(adc_cnt)'(DIV_ADC - 1)) || (adc_cnt < $bits(adc_cnt)'(DIV_ADC/2 - 1));
      if (k10_cnt == $bits(k10_cnt)'(DIV_10K/2 - 1)) begin
        k10_cnt <= '0; aic_clk10k <= ~aic_clk10k;
      end else k10_cnt <= k10_cnt + 1'b1;
    end
  end
  // adc_clk1200k is high while adc_cnt is 0 .. DIV_ADC/2-1 (registered
  // one cycle late from the counter, so its rising edge follows adc_cnt = 0).
  assign adc_sample = (adc_cnt == $bits(adc_cnt)'(DIV_ADC/4 + 1));
  assign adc_drive  = (adc_cnt == $bits(adc_cnt)'(DIV_ADC/2 + 1));

  always_ff @(posedge clk or posedge reset) begin
    if (reset) adc_reset <= 1'b1;
    else if (adc_drive) adc_reset <= 1'b0;
  end

  // ---------------- acquisition scheduling ----------------
  logic active;
  logic [$clog2(DIV_256HZ)-1:0] c256;
  logic [$clog2(DIV_24HZ)-1:0]  c24;
  logic eeg_flag;
  logic tick256, tick24;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      active <= 1'b0; c256 <= '0; c24 <= '0; eeg_flag <= 1'b0;
    end else begin
      if (trigger) begin active <= 1'b1; c256 <= '0; c24 <= '0; eeg_flag <= 1'b0; end
      else if (active) begin
        c256 <= tick256 ? '0 : c256 + 1'b1;
        c24  <= tick24  ? '0 : c24 + 1'b1;
        if (tick256) eeg_flag <= ~eeg_flag;
      end
    end
  end
  assign tick256 = active && (c256 == $bits(c256)'(DIV_256HZ - 1));
  assign tick24  = active && (c24  == $bits(c24)'(DIV_24HZ - 1));

  // event buffer, at most 8 entries
  event_e     evq [8];
  logic [2:0] q_rd, q_wr;
  logic [3:0] q_cnt;
  logic       push_eeg, push_ekg, push_dot, pop;
  logic [1:0] n_push;

  assign push_eeg = tick256 && !eeg_flag && mode[M_EEG_ADC];
  assign push_ekg = tick256 && mode[M_EKG_ADC];
  assign push_dot = tick24 && mode[M_DOT];
  assign n_push   = 2'(push_eeg) + 2'(push_ekg) + 2'(push_dot);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      q_rd <= '0; q_wr <= '0; q_cnt <= '0; queue_full <= 1'b0;
      for (int i = 0; i < 8; i++) evq[i] <= EV_EEG;
    end else begin
      if (4'(q_cnt) + 4'(n_push) - 4'(pop) > 4'd8) queue_full <= 1'b1;
      else begin
        // priority order EEG, EKG, DOT
        if (push_eeg) evq[q_wr] <= EV_EEG;
        if (push_ekg) evq[q_wr + 3'(push_eeg)] <= EV_EKG;
        if (push_dot) evq[q_wr + 3'(push_eeg) + 3'(push_ekg)] <= EV_DOT;
        q_wr  <= q_wr + 3'(n_push);
        q_cnt <= q_cnt + 4'(n_push) - 4'(pop);
      end
      if (pop) q_rd <= q_rd + 3'd1;
    end
  end

  // ---------------- A-D conversion state machine ----------------
  typedef enum logic [2:0] {A_IDLE, A_CHSEL, A_DUMMY, A_WAIT_EOC, A_REAL, A_SEND} astate_e;
  astate_e ast;
  event_e  cur_ev;
  logic [1:0] ch;            // channel within the event
  logic       started;       // START has been raised for the current conversion
  logic [4:0] dconv;         // DOT conversion number 0..23
  logic [9:0] sample;

  // DOT_CHSEL mapping: LED l uses sensors b, b+4, b+1, b+5 with
  // b = 0, 1, 2, 4, 5, 6 for LED 1..6.
  function automatic logic [3:0] dot_sensor(input logic [4:0] n);
    logic [3:0] b;
    unique case (n[4:2])
      3'd0: b = 4'd0; 3'd1: b = 4'd1; 3'd2: b = 4'd2;
      3'd3: b = 4'd4; 3'd4: b = 4'd5; default: b = 4'd6;
    endcase
    unique case (n[1:0])
      2'd0: return b;
      2'd1: return b + 4'd4;
      2'd2: return b + 4'd1;
      default: return b + 4'd5;
    endcase
  endfunction

  assign pop = (ast == A_IDLE) && (q_cnt != 0);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      ast <= A_IDLE; cur_ev <= EV_EEG; ch <= '0; started <= 1'b0; dconv <= '0;
      adc_start_conversion <= 1'b0; adc_chsel <= '0; dot_chsel <= '0; led_sel <= '0;
      sample <= '0;
      eeg_valid <= 1'b0; ekg_valid <= 1'b0; dot_valid <= 1'b0;
      eeg_data <= '0; ekg_data <= '0; dot_data <= '0; dot_conv <= '0;
    end else begin
      eeg_valid <= 1'b0; ekg_valid <= 1'b0; dot_valid <= 1'b0;
      if (adc_drive && adc_start_conversion && started) adc_start_conversion <= 1'b0;
      unique case (ast)
        A_IDLE: if (q_cnt != 0) begin
          cur_ev <= evq[q_rd]; ch <= '0; ast <= A_CHSEL;
        end
        A_CHSEL: begin
          unique case (cur_ev)
            EV_EEG:  adc_chsel <= CHSEL_EEG1 + 3'(ch);
            EV_EKG:  adc_chsel <= CHSEL_EKG1 + 3'(ch);
            default: begin adc_chsel <= CHSEL_DOT; dot_chsel <= dot_sensor(dconv); end
          endcase
          started <= 1'b0;
          ast <= A_DUMMY;
        end
        A_DUMMY: if (adc_drive) begin       // raise START for one ADC cycle
          adc_start_conversion <= 1'b1; started <= 1'b1; ast <= A_WAIT_EOC;
        end
        A_WAIT_EOC: if (adc_sample && adc_eoc) begin
          started <= 1'b0; ast <= A_REAL;
        end
        A_REAL: begin
          if (!started && adc_drive) begin
            adc_start_conversion <= 1'b1; started <= 1'b1;
          end else if (started && adc_sample && adc_eoc) begin
            sample <= adc_data; ast <= A_SEND;
          end
        end
        A_SEND: begin
          unique case (cur_ev)
            EV_EEG: begin eeg_valid <= 1'b1; eeg_data <= sample; end
            EV_EKG: begin ekg_valid <= 1'b1; ekg_data <= sample; end
            default: begin
              dot_valid <= 1'b1; dot_data <= sample; dot_conv <= dconv;
              if (dconv[1:0] == 2'd3) led_sel <= (led_sel == 3'd5) ? 3'd0 : led_sel + 3'd1;
              dconv <= (dconv == 5'd23) ? 5'd0 : dconv + 5'd1;
            end
          endcase
          if ((cur_ev == EV_EEG && ch != 2'd3) || (cur_ev == EV_EKG && ch != 2'd2)) begin
            ch <= ch + 2'd1; ast <= A_CHSEL;
          end else ast <= A_IDLE;
        end
        default: ast <= A_IDLE;
      endcase
    end
  end

endmodule
