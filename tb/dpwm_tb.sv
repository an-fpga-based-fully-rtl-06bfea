// dpwm_tb: self-checking test of the trailing-triangle DPWM.
//
// Every switching period the bench picks an on-time D (0..1024), the clock at
// which the new off-time is delivered, or no delivery at all, and compares
// pwm_o, adc_conv_o and count_o on every clock with the expected waveform:
// on for k < max(floor(D/2), delivery + 2) in the first half (if the pulse
// was on at the boundary), on for k >= 1024 - ceil(D/2) in the second half,
// convert strobe low in the first half. It also checks the period length
// (1024 clocks, 48.83 kHz at 50 MHz) and counts late-delivery and timeout
// periods, requiring each to occur.
module dpwm_tb;
  import pfc_pkg::*;

  localparam int P  = PWM_PERIOD;
  localparam int WM = 128;
  localparam int NCYC = 400;

  logic clk = 0, rst_n = 0;
  logic [DUTY_W-1:0] off_count;
  logic off_valid;
  logic pwm, conv, cstart, late;
  logic [CNT_W-1:0] count;

  int checks = 0, failures = 0;
  int n_late = 0, n_late_exp = 0, n_timeout = 0, n_full = 0, n_zero = 0;

  dpwm #(.PERIOD(P), .WAIT_MAX(WM)) dut (
    .clk, .rst_n, .off_count, .off_valid,
    .pwm_o(pwm), .adc_conv_o(conv), .cycle_start_o(cstart),
    .late_o(late), .count_o(count)
  );

  always #10 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  always @(posedge clk) if (rst_n && late) n_late++;

  initial begin : watchdog
    repeat (P * (NCYC + 4)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d_old, d_new, kv, mode, first_on, second_on;
    time last_start;
    bit on_at_start;
    off_valid = 0;
    off_count = DUTY_W'(P);
    repeat (3) @(posedge clk);
    rst_n = 1;
    d_old = 0;
    last_start = 0;
    for (int cyc = 0; cyc < NCYC; cyc++) begin
      // align to count 0
      do @(negedge clk); while (!cstart);
      check(count == 0, "cycle_start at count 0");
      if (last_start != 0) check(($time - last_start) == time'(P * 20), "period of 1024 clocks");
      last_start = $time;
      on_at_start = (d_old > 0);
      mode = $urandom_range(9);            // 0: no delivery, 1: late, else normal
      case ($urandom_range(9))
        0: d_new = 0;
        1: d_new = P;
        default: d_new = $urandom_range(P);
      endcase
      kv = $urandom_range(60, 10);
      if (mode == 1) begin
        d_new = $urandom_range(2 * kv, 0);  // turn-off point before delivery
      end
      if (cyc < 2) mode = 2;
      if (mode == 0) begin
        d_new = d_old;
        n_timeout++;
        first_on = (d_old / 2 > WM) ? d_old / 2 : WM;
      end else begin
        first_on = (d_new / 2 > kv + 2) ? d_new / 2 : kv + 2;
        if (on_at_start && (kv + 1 > d_new / 2)) n_late_exp++;
      end
      if (first_on > P / 2) first_on = P / 2;
      if (!on_at_start) first_on = 0;
      second_on = (d_new + 1) / 2;
      if (d_new == P) n_full++;
      if (d_new == 0) n_zero++;
      for (int k = 0; k < P; k++) begin
        if (k > 0) @(negedge clk);
        check(count == CNT_W'(k), "counter");
        check(conv == (k >= P / 2), "convert strobe");
        if (k < P / 2) check(pwm == (k < first_on), $sformatf("pwm first half k=%0d D=%0d old=%0d mode=%0d kv=%0d pwm=%0d", k, d_new, d_old, mode, kv, pwm));
        else           check(pwm == (k >= P - second_on), $sformatf("pwm second half k=%0d D=%0d", k, d_new));
        if (mode != 0 && k == kv) begin
          off_valid = 1;
          off_count = DUTY_W'(P - d_new);
        end else begin
          off_valid = 0;
        end
      end
      d_old = d_new;
    end
    @(negedge clk);
    check(n_late == n_late_exp, $sformatf("late pulses %0d expected %0d", n_late, n_late_exp));
    check(n_late_exp > 0, "late delivery exercised");
    check(n_timeout > 0, "timeout exercised");
    check(n_full > 0 && n_zero > 0, "full and zero duty exercised");
    $display("periods=%0d late=%0d timeout=%0d full=%0d zero=%0d", NCYC, n_late, n_timeout, n_full, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
