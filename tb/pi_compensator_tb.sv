// pi_compensator_tb: self-checking test of the voltage-loop compensator.
//
// Random output-voltage codes (runs near the reference, and long excursions
// that drive the accumulator into both clamps) are applied one per update.
// A 64-bit reference model in the bench computes
//   acc = clamp(acc + 22*(102 - Vo[n]) + 899*(102 - Vo[n-1]), 0, 2^27 - 1),
//   Gine = acc >> 15
// and the bench compares gine_o, the one-clock latency of out_valid_o and
// sat_o with it, and requires both clamps to have acted.
module pi_compensator_tb;
  import pfc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  code_t vo = '0;
  logic [GINE_W-1:0] gine;
  logic out_valid, sat;
  int checks = 0, failures = 0, n_sat_lo = 0, n_sat_hi = 0;

  pi_compensator dut (.clk, .rst_n, .in_valid, .vo, .gine_o(gine), .out_valid_o(out_valid), .sat_o(sat));

  always #10 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc = 0, e = 0, e_prev = 0, nxt;
    longint amax = (longint'(1) << (GINE_W + GAIN3_SHIFT)) - 1;
    bit exp_sat;
    int v;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(gine == 0, "reset value");
    for (int it = 0; it < 6000; it++) begin
      case ((it / 500) % 4)
        0: v = 102 + $signed($urandom_range(8)) - 4;   // near reference
        1: v = $urandom_range(127, 0);                 // low voltage: Gine rises
        2: v = 127 - $urandom_range(10);               // overvoltage: Gine falls
        default: v = $urandom_range(255) - 128;        // any code
      endcase
      if ((it / 500) % 4 == 1) v = $urandom_range(40);
      vo = code_t'(v);
      in_valid = 1;
      e = 102 - longint'(vo);
      nxt = acc + 22 * e + 899 * e_prev;
      exp_sat = (nxt < 0) || (nxt > amax);
      if (nxt < 0) begin nxt = 0; n_sat_lo++; end
      if (nxt > amax) begin nxt = amax; n_sat_hi++; end
      acc = nxt;
      e_prev = e;
      @(negedge clk);
      in_valid = 0;
      check(out_valid, "out_valid one clock after in_valid");
      check(longint'(gine) == (acc >> GAIN3_SHIFT), $sformatf("gine %0d exp %0d", gine, acc >> GAIN3_SHIFT));
      check(sat == exp_sat, "sat flag");
      repeat ($urandom_range(3)) begin
        @(negedge clk);
        check(!out_valid, "no spurious valid");
        check(longint'(gine) == (acc >> GAIN3_SHIFT), "gine held between updates");
      end
    end
    check(n_sat_lo > 0 && n_sat_hi > 0, "both clamps exercised");
    $display("clamp low=%0d high=%0d", n_sat_lo, n_sat_hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
