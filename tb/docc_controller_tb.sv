// docc_controller_tb: closed-loop test of the whole DOCC controller, at its
// default parameters, driving a behavioural boost PFC power stage (50 V rms,
// 50 Hz line, L = 500 uH, C2 = 1000 uF, 80 V output) through two converter
// models.
//
// Sequence: start-up at 120 W from the precharged output, a 120 W -> 64 W load
// step, a 64 W -> 120 W load step, and a 40 W light load. In every switching
// period the bench checks, independently of the RTL:
//   * one new off-time per period, 31 clocks after the period boundary
//     (15-clock conversion plus the controller pipeline), 20 when the
//     divider saturates at once;
//   * off_count = min((iL << 20) / (Gine * Vo), 1024) from the converter words;
//   * the switch on-clocks: ceil(D/2) in the second half, max(floor(D/2),
//     latency + 2) in the first half (the first clock the new value can act),
//     D = 1024 - off_count.
// At the end of each phase it checks the regulated output (80 V +- 2.5 V) and
// the power factor computed from the per-period averages of line voltage and
// inductor current. It counts, and requires, discontinuous-conduction periods,
// divider saturation, Gine clamping, a late first-half edge and the
// light-load indicator (Gine < 500), which must match Gine at every phase end.
module docc_controller_tb;
  import pfc_pkg::*;

  localparam real CLK_S = 20.0e-9;

  logic clk = 0, rst_n = 0;
  logic conv, il_busy, vo_busy, pwm;
  logic [11:0] il_data, vo_data;
  logic [GINE_W-1:0] gine;
  logic [DUTY_W-1:0] off_count;
  logic off_valid, cstart, late, gsat, osat, light;

  real r_load = 80.0 * 80.0 / 120.0;
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
  int n_late = 0, n_osat = 0, n_gsat = 0, n_periods = 0;
  int n_late_exp = 0;
  int n_light = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL %s t=%0t", what, $time); end
  endtask

  // ---------------- per-period checks ----------------
  int  k = 0;                 // clocks since the period boundary
  int  d_cur = 0, d_prev = 0;
  int  valid_seen = 0;
  int  k_valid = 0;
  int  on_first = 0, on_second = 0;
  bit  started = 0;
  logic [11:0] w_il, w_vo;
  // per-period averages for the power factor
  real sum_il = 0.0, sum_vi = 0.0;
  real pf_p = 0.0, pf_vv = 0.0, pf_ii = 0.0;
  real vo_sum = 0.0; int vo_n = 0;
  real vo_max = 0.0, vo_min = 1000.0;

  function automatic int expected_off(input logic [11:0] wi, input logic [11:0] wv, input int g);
    longint il, vo, num, den, q;
    il = longint'($signed(wi[11:4]));
    vo = longint'($signed(wv[11:4]));
    if (il < 0) il = 0;
    if (vo < 0) vo = 0;
    num = il << 20;
    den = longint'(g) * vo;
    if (den == 0) return 1024;
    q = num / den;
    return (q > 1024) ? 1024 : int'(q);
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (late) n_late++;
      if (osat && off_valid) n_osat++;
      if (gsat) n_gsat++;
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (cstart) begin
        if (started) begin
          int first_exp;
          n_periods++;
          check(valid_seen == 1, "one new off-time per period");
          first_exp = (d_cur / 2 > k_valid + 2) ? d_cur / 2 : k_valid + 2;
          if (first_exp > 512) first_exp = 512;
          if (d_prev == 0) first_exp = 0;
          if (d_prev != 0 && d_cur / 2 < k_valid + 1) n_late_exp++;
          check(on_second == (d_cur + 1) / 2, $sformatf("second-half on-time %0d D=%0d", on_second, d_cur));
          check(on_first == first_exp, $sformatf("first-half on-time %0d exp %0d D=%0d", on_first, first_exp, d_cur));
          pf_p  += (sum_vi / 1024.0) * (sum_il / 1024.0);
          pf_vv += (sum_vi / 1024.0) * (sum_vi / 1024.0);
          pf_ii += (sum_il / 1024.0) * (sum_il / 1024.0);
          d_prev = d_cur;
        end
        started = 1;
        k = 0;
        valid_seen = 0;
        on_first = 0; on_second = 0;
        sum_il = 0.0; sum_vi = 0.0;
      end else begin
        k++;
      end
      if (pwm) begin
        if (k < 512) on_first++; else on_second++;
      end
      sum_il += i_l;
      sum_vi += v_in;
      if (!il_busy && adc_i.left == 0 && k == 17) begin
        w_il = il_data;
        w_vo = vo_data;
      end
      if (off_valid) begin
        valid_seen++;
        check(k == (osat && k == 20 ? 20 : 31), $sformatf("off-time latency %0d clocks", k));
        k_valid = k;
        check(int'(off_count) == expected_off(w_il, w_vo, int'(gine)),
              $sformatf("control law: got %0d exp %0d (il=%0d vo=%0d g=%0d)", off_count,
                        expected_off(w_il, w_vo, int'(gine)), $signed(w_il[11:4]), $signed(w_vo[11:4]), gine));
        d_cur = 1024 - int'(off_count);
      end
      if ((k & 255) == 0) begin
        vo_sum += v_o; vo_n++;
        if (v_o > vo_max) vo_max = v_o;
        if (v_o < vo_min) vo_min = v_o;
      end
    end
  end

  task automatic run_s(input real sec);
    repeat (int'(sec / CLK_S)) @(posedge clk);
  endtask

  task automatic measure(input string name, input real sec, input real pf_min);
    real vavg, pf;
    vo_sum = 0.0; vo_n = 0; pf_p = 0.0; pf_vv = 0.0; pf_ii = 0.0;
    run_s(sec);
    vavg = vo_sum / vo_n;
    pf = (pf_vv > 0.0 && pf_ii > 0.0) ? pf_p / $sqrt(pf_vv * pf_ii) : 0.0;
    $display("%s: Vo avg %.2f V, PF %.4f, Gine %0d, P %.1f W", name, vavg, pf, gine, vavg * vavg / r_load);
    check(vavg > 77.5 && vavg < 82.5, $sformatf("%s output regulated (%.2f V)", name, vavg));
    check(pf > pf_min, $sformatf("%s power factor %.4f", name, pf));
    check(light == (gine < 500), $sformatf("%s light-load indicator", name));
    if (light) n_light++;
  endtask

  localparam real T_START = 0.5, T_MEAS = 0.1, T_STEP = 1.2;

  initial begin : watchdog
    repeat (int'((T_START + 2.0 * T_STEP + T_START + 4.0 * T_MEAS + 0.05) / CLK_S)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dcm0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    // start-up at 120 W
    run_s(T_START);
    measure("120 W", T_MEAS, 0.99);
    // 120 W -> 64 W
    vo_max = 0.0;
    r_load = 100.0;
    run_s(T_STEP - T_MEAS);
    $display("120 W -> 64 W: peak %.2f V", vo_max);
    check(vo_max > 82.0, "load drop produces an overshoot");
    measure("64 W", T_MEAS, 0.98);
    // 64 W -> 120 W
    vo_min = 1000.0;
    r_load = 80.0 * 80.0 / 120.0;
    run_s(T_STEP - T_MEAS);
    $display("64 W -> 120 W: dip %.2f V", vo_min);
    check(vo_min < 78.0, "load rise produces an undershoot");
    measure("120 W again", T_MEAS, 0.99);
    // 40 W light load: mixed conduction
    r_load = 160.0;
    dcm0 = plant.dcm_events;
    run_s(T_START);
    measure("40 W", T_MEAS, 0.95);
    $display("periods %0d, DCM periods at 40 W %0d, late edges %0d (expected %0d), divider saturations %0d, Gine clamps %0d",
             n_periods, plant.dcm_events - dcm0, n_late, n_late_exp, n_osat, n_gsat);
    check(plant.dcm_events - dcm0 > 0, "discontinuous conduction at light load");
    check(n_late == n_late_exp, "late first-half edges as predicted");
    check(n_late > 0, "late first-half edge exercised");
    check(n_osat > 0, "divider saturation exercised");
    check(n_gsat > 0, "Gine clamp exercised");
    check(n_light > 0, "light-load indication exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
