// seq_divider_tb: self-checking test of the saturating divider at the sizes
// the controller uses (27-bit dividend iL << 20, 19-bit divisor Gine * Vo,
// 11 quotient bits, saturation at 1024). Operands are drawn so that the
// quotient spreads over the whole range, including divide-by-zero, results
// above 1024 and results that overflow 11 bits. Each result is compared with
// min(num / den, 1024); the latency must be 12 clocks, or 1 when the
// overflow test saturates at once.
module seq_divider_tb;
  localparam int NW = 27, DW = 19, QW = 11, QMAX = 1024;

  logic clk = 0, rst_n = 0, start = 0;
  logic [NW-1:0] num = '0;
  logic [DW-1:0] den = '0;
  logic busy, done, sat;
  logic [QW-1:0] quot;
  int checks = 0, failures = 0, n_sat = 0, n_fast = 0, n_zero = 0;

  seq_divider #(.NW(NW), .DW(DW), .QW(QW), .QMAX(QMAX)) dut (
    .clk, .rst_n, .start, .num, .den, .busy_o(busy), .done_o(done), .quot_o(quot), .sat_o(sat));

  always #10 clk = ~clk;

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
    longint n, d, q;
    int lat;
    bit fast;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 5000; it++) begin
      n = longint'($urandom_range(127)) << 20;
      if (it % 3 == 0) n = n | longint'($urandom_range(20'hFFFFF));
      d = longint'($urandom_range(4095)) * longint'($urandom_range(127));
      if (it % 50 == 0) d = 0;
      if (it % 5 == 1) d = longint'($urandom_range(DW'(-1)));
      num = NW'(n);
      den = DW'(d);
      q = (d == 0) ? QMAX : n / d;
      fast = (d == 0) || (n >= (d << QW));
      if (q > QMAX) q = QMAX;
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done && lat < 40) begin
        check(busy || fast, "busy while dividing");
        @(negedge clk);
        lat++;
      end
      check(done, "done");
      check(lat == (fast ? 1 : QW + 1), $sformatf("latency %0d", lat));
      check(longint'(quot) == q, $sformatf("%0d/%0d -> %0d exp %0d", n, d, quot, q));
      check(sat == (q == QMAX && (fast || n / d >= QMAX)), "sat flag");
      if (q == QMAX) n_sat++;
      if (fast) n_fast++;
      if (d == 0) n_zero++;
      @(negedge clk);
    end
    check(n_sat > 0 && n_fast > 0 && n_zero > 0, "saturation paths exercised");
    $display("sat=%0d fast=%0d zero=%0d", n_sat, n_fast, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
