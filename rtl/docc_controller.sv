// docc_controller: fully digital one-cycle-control (DOCC) controller for a
// single-phase boost power factor correction rectifier.
//
// The controller makes the average inductor current follow the rectified line
// voltage without sensing that voltage. In continuous conduction the boost
// stage gives v_in = v_o (1 - d), so the wanted current i_L = G_in v_in becomes
// i_L = G_in v_o (1 - d), and the switch off-fraction follows from two sensed
// quantities only:
//     (1 - d[n]) = iL[n] / (Gine[n] * Vo[n]).
// Per switching period of 1024 clocks (48.83 kHz at 50 MHz):
//   1. dpwm drops the convert strobe at the period boundary, which is the middle
//      of the centred on-pulse, so the current converter samples the average
//      inductor current of the period just ended;
//   2. adc_if collects the upper eight bits of both converters: iL[n], Vo[n];
//   3. pi_compensator updates Gine[n] from Vref - Vo[n] (voltage loop);
//   4. gin_vo_multiplier forms Gine[n] * Vo[n];
//   5. seq_divider forms off_count = (iL[n] << 20) / (Gine[n] * Vo[n]),
//      clipped to 1024, the off-time in clocks;
//   6. dpwm applies it to the same period: the first on-half ends at
//      floor(D/2), the second on-half starts at 1024 - ceil(D/2),
//      D = 1024 - off_count.
// Steps 2-5 take about 16 clocks after the converters finish, well inside the
// shortest first on-half of the intended operating range. The loop structure
// follows the design; the numeric scaling of the divider (shift of 20) is this
// design's choice and fixes what a Gine value means: at 50 V rms input and the
// nominal sensing gains Gine = 1024 corresponds to about 125 W.
//
// Interface: adc_conv_o drives the convert input of both converters; each
// converter returns busy and a 12-bit two's complement word; pwm_o goes to the
// gate driver (high = switch on). The remaining outputs expose the loop state;
// light_load_o is high while Gine[n] < 500, the level below which the
// converter is expected to leave continuous conduction (the threshold follows
// the design; registering it on each Gine update is this design's choice).
// The assertion below is the only user of rst_n outside the flip-flops' reset,
// which is why lint sees rst_n used both synchronously and asynchronously.
module docc_controller
  import pfc_pkg::*;
(
  input  logic              clk,          // 50 MHz
  input  logic              rst_n,
  // A/D converters
  output logic              adc_conv_o,
  input  logic              adc_il_busy,
  input  logic [ADC_W-1:0]  adc_il_data,
  input  logic              adc_vo_busy,
  input  logic [ADC_W-1:0]  adc_vo_data,
  // gate driver
  output logic              pwm_o,
  // observation
  output logic [GINE_W-1:0] gine_o,
  output logic [DUTY_W-1:0] off_count_o,
  output logic              off_valid_o,
  output logic              cycle_start_o,
  output logic              duty_late_o,
  output logic              gine_sat_o,
  output logic              off_sat_o,
  output logic              light_load_o  // Gine[n] below GINE_CCM_MIN: MCM/DCM expected
);

  sample_t              smp;
  logic                 smp_valid;
  logic [GINE_W-1:0]    gine;
  logic                 gine_valid;
  logic [PROD_W-1:0]    prod;
  logic                 prod_valid;
  logic [NUM_W-1:0]     num;
  logic                 div_busy;

  adc_if u_adc_if (
    .clk, .rst_n,
    .adc_conv       (adc_conv_o),
    .il_busy        (adc_il_busy),
    .il_data        (adc_il_data),
    .vo_busy        (adc_vo_busy),
    .vo_data        (adc_vo_data),
    .sample_o       (smp),
    .sample_valid_o (smp_valid)
  );

  pi_compensator u_pi (
    .clk, .rst_n,
    .in_valid    (smp_valid),
    .vo          (smp.vo),
    .gine_o      (gine),
    .out_valid_o (gine_valid),
    .sat_o       (gine_sat_o)
  );

  gin_vo_multiplier u_mult (
    .clk, .rst_n,
    .in_valid    (gine_valid),
    .gine        (gine),
    .vo          (smp.vo),
    .prod_o      (prod),
    .out_valid_o (prod_valid)
  );

  // A negative current code (offset around the line zero crossing) counts as 0.
  assign num = smp.il[CODE_W-1] ? '0 : NUM_W'({smp.il[CODE_W-2:0], DIV_SHIFT'(0)});

  seq_divider #(
    .NW (NUM_W), .DW (PROD_W), .QW (DUTY_W), .QMAX (PWM_PERIOD)
  ) u_div (
    .clk, .rst_n,
    .start  (prod_valid),
    .num    (num),
    .den    (prod),
    .busy_o (div_busy),
    .done_o (off_valid_o),
    .quot_o (off_count_o),
    .sat_o  (off_sat_o)
  );

  dpwm #(.PERIOD (PWM_PERIOD)) u_dpwm (
    .clk, .rst_n,
    .off_count     (off_count_o),
    .off_valid     (off_valid_o),
    .pwm_o         (pwm_o),
    .adc_conv_o    (adc_conv_o),
    .cycle_start_o (cycle_start_o),
    .late_o        (duty_late_o),
    .count_o       ()
  );

  assign gine_o = gine;

  // Load indicator: a small emulated admittance means a light load, at which
  // the converter no longer conducts continuously over the whole line cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          light_load_o <= 1'b1;
    else if (gine_valid) light_load_o <= (gine < GINE_W'(GINE_CCM_MIN));
  end

  // The sampled pair must stay put while the divider works on it.
  property p_no_restart;
    @(posedge clk) disable iff (!rst_n) prod_valid |-> !div_busy;
  endproperty
  assert property (p_no_restart);

endmodule
