// pfc_load_sweep_tb: closed-loop load sweep of the DOCC controller at its
// default parameters, 25 W to 175 W in 25 W steps at 50 V rms / 80 V, with
// the behavioural boost power stage (L = 500 uH, C2 = 1000 uF) and two
// converter models. At each point the load is set, the loop is given 0.4 s
// to settle, and over the next 0.1 s the bench measures the mean output
// voltage (must be 80 V +- 2.5 V), the power factor from per-period averages
// of line voltage and inductor current (above 0.99 from 75 W, 0.98 at 50 W,
// 0.85 at 25 W, where half the periods are discontinuous) and the share of
// periods in discontinuous conduction (none to speak of from 75 W, some below).
// From 75 W the peak sampled current code must equal the peak of the ideal
// line current, P / 50 V * sqrt(2) * 25.5 codes/A, within 2 codes. Gine must
// rise with the load. In every period the off-time is also compared with
// min((iL << 20) / (Gine * Vo), 1024) computed from the converter words.
// 175 W is the last point: above about 176 W the current code clips at 127.
module pfc_load_sweep_tb;
  import pfc_pkg::*;

  localparam real CLK_S = 20.0e-9;
  localparam int  NPTS = 7;
  localparam real T_SETTLE = 0.4, T_MEAS = 0.1;

  logic clk = 0, rst_n = 0;
  logic conv, il_busy, vo_busy, pwm;
  logic [11:0] il_data, vo_data;
  logic [GINE_W-1:0] gine;
  logic [DUTY_W-1:0] off_count;
  logic off_valid, cstart, late, gsat, osat, light;

  real r_load = 80.0 * 80.0 / 25.0;
  real v_in, i_l, v_o, s_i, s_v;

  docc_controller dut (
    .clk, .rst_n,
    .adc_conv_o(conv), .adc_il_busy(il_busy), .adc_il_data(il_data),
    .adc_vo_busy(vo_busy), .adc_vo_data(vo_data),
    .pwm_o(pwm), .gine_o(gine), .off_count_o(off_count), .off_valid_o(off_valid),
    .cycle_start_o(cstart), .duty_late_o(late), .gine_sat_o(gsat), .off_sat_o(osat), .light_load_o(light)
  );

  boost_power_stage plant (
    .clk, .sw_on(pwm), .period_start(cstart), .r_load,
    .v_in, .i_l, .v_o, .sense_i(s_i), .sense_v(s_v)
  );

  adc_model adc_i (.clk, .conv, .vin(s_i), .busy(il_busy), .data(il_data));
  adc_model adc_v (.clk, .conv, .vin(s_v), .busy(vo_busy), .data(vo_data));

  always #10 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL %s t=%0t", what, $time); end
  endtask

  function automatic int expected_off(input logic [11:0] wi, input logic [11:0] wv, input int g);
    longint il, vo, den, q;
    il = longint'($signed(wi[11:4]));
    vo = longint'($signed(wv[11:4]));
    if (il < 0) il = 0;
    if (vo < 0) vo = 0;
    den = longint'(g) * vo;
    if (den == 0) return 1024;
    q = (il << 20) / den;
    return (q > 1024) ? 1024 : int'(q);
  endfunction

  int  k = 0;
  logic [11:0] w_il, w_vo;
  real sum_il = 0.0, sum_vi = 0.0;
  real pf_p = 0.0, pf_vv = 0.0, pf_ii = 0.0;
  real vo_sum = 0.0;
  int  vo_n = 0, il_max = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      if (cstart) begin
        pf_p  += sum_vi * sum_il;
        pf_vv += sum_vi * sum_vi;
        pf_ii += sum_il * sum_il;
        sum_il = 0.0; sum_vi = 0.0;
        k = 0;
      end else begin
        k++;
      end
      sum_il += i_l / 1024.0;
      sum_vi += v_in / 1024.0;
      if (k == 17) begin
        w_il = il_data;
        w_vo = vo_data;
        if (int'($signed(il_data[11:4])) > il_max) il_max = int'($signed(il_data[11:4]));
      end
      if (off_valid)
        check(int'(off_count) == expected_off(w_il, w_vo, int'(gine)), "control law");
      if ((k & 255) == 0) begin
        vo_sum += v_o; vo_n++;
      end
    end
  end

  initial begin : watchdog
    repeat (int'((NPTS * (T_SETTLE + T_MEAS) + 0.05) / CLK_S)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real p_w, vavg, pf, exp_pk;
    int  dcm0, per0, g_prev;
    repeat (5) @(posedge clk);
    rst_n = 1;
    g_prev = -1;
    for (int i = 1; i <= NPTS; i++) begin
      p_w = 25.0 * i;
      r_load = 80.0 * 80.0 / p_w;
      repeat (int'(T_SETTLE / CLK_S)) @(posedge clk);
      vo_sum = 0.0; vo_n = 0; pf_p = 0.0; pf_vv = 0.0; pf_ii = 0.0; il_max = 0;
      dcm0 = plant.dcm_events; per0 = plant.periods;
      repeat (int'(T_MEAS / CLK_S)) @(posedge clk);
      vavg = vo_sum / vo_n;
      pf = pf_p / $sqrt(pf_vv * pf_ii);
      $display("%4.0f W: Vo %.2f V  PF %.4f  Gine %0d  peak iL code %0d  DCM periods %0.1f %%",
               p_w, vavg, pf, gine, il_max,
               100.0 * real'(plant.dcm_events - dcm0) / real'(plant.periods - per0));
      check(vavg > 77.5 && vavg < 82.5, $sformatf("%.0f W regulation %.2f V", p_w, vavg));
      check(pf > ((p_w >= 75.0) ? 0.99 : (p_w >= 50.0) ? 0.98 : 0.85),
            $sformatf("%.0f W power factor %.4f", p_w, pf));
      if (p_w >= 75.0) begin
        // continuous conduction: the sampled peak is the peak of the average line current
        exp_pk = p_w / 50.0 * 1.41421356 * 25.5;
        check(real'(il_max) > exp_pk - 2.0 && real'(il_max) < exp_pk + 2.0,
              $sformatf("%.0f W peak current code %0d, expected %.1f", p_w, il_max, exp_pk));
        check(plant.dcm_events - dcm0 < (plant.periods - per0) / 100, "continuous conduction");
      end else begin
        check(plant.dcm_events - dcm0 > 0, "light load enters discontinuous conduction");
      end
      check(int'(gine) > g_prev, "Gine rises with load");
      check(light == (gine < 500), "light-load indicator");
      g_prev = int'(gine);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
