// dpwm: digital PWM with trailing triangle modulation for the boost switch.
//
// A free-running counter divides the 50 MHz clock into switching periods of
// PERIOD clocks (1024 -> 48.83 kHz). The switch on-time D = PERIOD - off_count
// is split around the period boundary: the switch is on from the start of the
// period until floor(D/2) clocks, off through the middle, and on again from
// PERIOD - ceil(D/2) to the end, so that the on-pulse is centred on the period
// boundary. The inductor current sampled at that boundary (the middle of the
// rising current ramp) is then the average current of the switching period.
// That placement of the edges follows the trailing triangle modulation of the
// design; the counter, the registered outputs and the rounding are this
// implementation's choice.
//
// The convert strobe adc_conv is low during the first half of the period and
// high during the second half, so its falling edge coincides with the period
// boundary, the sampling instant. The 50 % shape is this design's choice; only
// the falling edge matters to the converters.
//
// The new off-time for a period is computed after that period's own sample,
// so it arrives some tens of clocks into the period. The first-half turn-off
// edge therefore waits for off_valid of the current period; if no value has
// arrived by WAIT_MAX clocks the previous value is used. If the value arrives
// after its own turn-off point, the switch turns off on the clock after it
// arrives and late_o pulses. The second-half turn-on edge always uses the
// latest value. Reset leaves the switch off with off_count = PERIOD (d = 0).
//
// Interface: off_count (0..PERIOD clocks) with a one-clock off_valid strobe.
// Outputs are registered; pwm_o is high for counter values k with
// k < floor(D/2) or k >= PERIOD - ceil(D/2); cycle_start_o is high while the
// counter is 0.
module dpwm
  import pfc_pkg::*;
#(
  parameter int unsigned PERIOD   = PWM_PERIOD,
  parameter int unsigned WAIT_MAX = 128
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [$clog2(PERIOD+1)-1:0]  off_count,
  input  logic                         off_valid,
  output logic                         pwm_o,
  output logic                         adc_conv_o,
  output logic                         cycle_start_o,
  output logic                         late_o,
  output logic [$clog2(PERIOD)-1:0]    count_o
);

  localparam int unsigned CW = $clog2(PERIOD);
  localparam int unsigned DW = $clog2(PERIOD+1);
  localparam logic [CW-1:0] LAST = CW'(PERIOD - 1);
  localparam logic [CW:0]   HALF = (CW+1)'(PERIOD / 2);

  logic [CW-1:0] cnt, cnt_next;
  logic [DW-1:0] off_reg;
  logic          have_new;
  logic [DW-1:0] on_cnt;
  logic [CW:0]   t_off, t_on;
  logic          pwm_next, in_first_half, release_ok;

  assign cnt_next      = (cnt == LAST) ? '0 : cnt + 1'b1;
  assign on_cnt        = DW'(PERIOD) - off_reg;
  assign t_off         = (CW+1)'(on_cnt >> 1);
  assign t_on          = (CW+1)'(DW'(PERIOD) - ((on_cnt + DW'(1)) >> 1));
  assign in_first_half = ({1'b0, cnt_next} < HALF);
  assign release_ok    = (have_new && cnt_next != '0) || ({1'b0, cnt_next} >= (CW+1)'(WAIT_MAX));

  always_comb begin
    pwm_next = pwm_o;
    if (in_first_half) begin
      if (pwm_o && release_ok && ({1'b0, cnt_next} >= t_off))
        pwm_next = 1'b0;
    end else begin
      if (!pwm_o && ({1'b0, cnt_next} >= t_on))
        pwm_next = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt           <= LAST;
      off_reg       <= DW'(PERIOD);
      have_new      <= 1'b0;
      pwm_o         <= 1'b0;
      adc_conv_o    <= 1'b1;
      cycle_start_o <= 1'b0;
      late_o        <= 1'b0;
    end else begin
      cnt           <= cnt_next;
      pwm_o         <= pwm_next;
      adc_conv_o    <= !in_first_half;
      cycle_start_o <= (cnt_next == '0);
      late_o        <= 1'b0;
      if (off_valid) begin
        off_reg  <= (off_count > DW'(PERIOD)) ? DW'(PERIOD) : off_count;
        // A value whose own turn-off point has already passed.
        late_o   <= pwm_o && in_first_half &&
                    ({1'b0, cnt_next} > (CW+1)'(((DW'(PERIOD) -
                     ((off_count > DW'(PERIOD)) ? DW'(PERIOD) : off_count)) >> 1)));
      end
      if (cnt_next == '0)
        have_new <= 1'b0;
      else if (off_valid)
        have_new <= 1'b1;
    end
  end

  assign count_o = cnt;

endmodule
