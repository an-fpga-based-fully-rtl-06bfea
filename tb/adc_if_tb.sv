// adc_if_tb: self-checking test of the converter interface.
//
// The bench plays both converters: after each falling edge of the convert
// strobe each channel raises busy for its own random conversion time and
// presents a random 12-bit word when busy falls. The bench checks that
// exactly one sample_valid_o follows each strobe, one clock after the later
// busy falls, and that the codes are the upper eight bits of the words. A
// strobe that falls again n0 a channel has finished must yield no sample.
module adc_if_tb;
  import pfc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic conv = 1, il_busy = 0, vo_busy = 0;
  logic [ADC_W-1:0] il_data = '0, vo_data = '0;
  sample_t smp;
  logic valid;
  int checks = 0, failures = 0, n_valid = 0, n_abort = 0;

  adc_if dut (.clk, .rst_n, .adc_conv(conv), .il_busy, .il_data, .vo_busy, .vo_data,
              .sample_o(smp), .sample_valid_o(valid));

  always #10 clk = ~clk;
  always @(posedge clk) if (valid) n_valid++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_il, t_vo, t_max, n0;
    logic [ADC_W-1:0] w_il, w_vo;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 500; it++) begin
      t_il = $urandom_range(30, 2);
      t_vo = $urandom_range(30, 2);
      t_max = (t_il > t_vo) ? t_il : t_vo;
      w_il = ADC_W'($urandom);
      w_vo = ADC_W'($urandom);
      @(negedge clk); conv = 1;
      repeat (3) @(negedge clk);
      n0 = n_valid;
      conv = 0;
      if (it % 10 == 9) begin
        // aborted: the strobe falls again after il finished but before vo did
        @(negedge clk); il_busy = 1; vo_busy = 1;
        repeat (2) @(negedge clk); il_busy = 0; il_data = w_il;
        repeat (2) @(negedge clk); conv = 1;
        @(negedge clk); conv = 0;
        repeat (2) @(negedge clk); vo_busy = 0; vo_data = w_vo;
        repeat (4) @(negedge clk);
        check(n_valid == n0, "no sample from an aborted pair");
        n_abort++;
        continue;
      end
      @(negedge clk); il_busy = 1; vo_busy = 1;
      for (int c = 1; c <= t_max + 1; c++) begin
        @(negedge clk);
        if (c == t_il) begin il_busy = 0; il_data = w_il; end
        if (c == t_vo) begin vo_busy = 0; vo_data = w_vo; end
        if (c == t_max + 1) begin
          check(valid == 1'b1, "valid one clock after the later busy fall");
          check(smp.il == code_t'(w_il[11:4]), "il code is upper eight bits");
          check(smp.vo == code_t'(w_vo[11:4]), "vo code is upper eight bits");
        end else begin
          check(valid == 1'b0, "no early valid");
        end
      end
      repeat (5) @(negedge clk);
      check(n_valid == n0 + 1, "exactly one valid per conversion");
    end
    check(n_abort > 0, "abort exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
