// gin_vo_multiplier_tb: self-checking test of the Gine * Vo multiplier.
// Random and corner operands (0, full-scale Gine, negative voltage codes,
// which count as zero) are applied; the product is compared one clock later.
module gin_vo_multiplier_tb;
  import pfc_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [GINE_W-1:0] gine = '0;
  code_t vo = '0;
  logic [PROD_W-1:0] prod;
  logic out_valid;
  int checks = 0, failures = 0, n_neg = 0;

  gin_vo_multiplier dut (.clk, .rst_n, .in_valid, .gine, .vo, .prod_o(prod), .out_valid_o(out_valid));

  always #10 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g, v, expv;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      g = (it % 7 == 0) ? 4095 : $urandom_range(4095);
      v = (it % 11 == 0) ? 127 : $urandom_range(255) - 128;
      gine = GINE_W'(g);
      vo = code_t'(v);
      in_valid = 1;
      expv = (v < 0) ? 0 : g * v;
      if (v < 0) n_neg++;
      @(negedge clk);
      in_valid = 0;
      check(out_valid, "valid after one clock");
      check(int'(prod) == expv, $sformatf("%0d*%0d -> %0d", g, v, prod));
    end
    check(n_neg > 0, "negative codes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
