// tb_ipg_estimator: self-checking test of the inter-packet gap estimate block.
// Feeds gap sequences straight into the block and checks: the estimate is
// round(sum * 16 / N) of the first N gaps; later gaps do not change it; it is
// ready a fixed 55 cycles after the N-th gap; manual mode hands on the set
// value one cycle after start; N = 0 acts as N = 1.
module tb_ipg_estimator;
  import jm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic enable = 0, start = 0, manual = 0;
  logic [VAL_W-1:0] manual_ipg = 0;
  logic [31:0] est_n = 0;
  logic gap_valid = 0;
  logic [31:0] gap = 0;
  logic estimating, est_valid;
  logic [VAL_W-1:0] ipg_est;
  logic [31:0] gaps_taken;
  int checks = 0, failures = 0;

  ipg_estimator dut (.*);

  always #4 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic begin_meas(bit man, logic [31:0] n, logic [31:0] mval);
    @(negedge clk);
    enable = 1; manual = man; est_n = n; manual_ipg = mval; start = 1;
    @(negedge clk);
    start = 0;
  endtask

  task automatic give_gap(logic [31:0] g);
    gap = g; gap_valid = 1;
    @(negedge clk);
    gap_valid = 0;
    repeat (20) @(negedge clk);
  endtask

  task automatic estimate(int n, int base, int spread);
    longint unsigned sum = 0;
    longint unsigned expv;
    int g, lat;
    begin_meas(0, n, 0);
    check(estimating && !est_valid, "estimating after start");
    for (int i = 0; i < n; i++) begin
      g = base + int'($urandom % (2 * spread + 1)) - spread;
      sum += g;
      if (i < n - 1) give_gap(g);
    end
    // last gap: time how long the estimate takes
    gap = g; gap_valid = 1;
    @(negedge clk);
    gap_valid = 0;
    lat = 1;
    while (!est_valid && lat < 200) begin @(negedge clk); lat++; end
    expv = (sum * 16 + longint'(n / 2)) / longint'(n);
    check(ipg_est == VAL_W'(expv), $sformatf("estimate %0d expected %0d", ipg_est, expv));
    check(lat == 55, $sformatf("estimate latency %0d", lat));
    check(!estimating && gaps_taken == n, "stopped after N gaps");
    // further gaps are ignored
    give_gap(base * 3);
    give_gap(7);
    check(ipg_est == VAL_W'(expv) && gaps_taken == n && est_valid, "estimate held");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    estimate(50, 125000, 0);
    estimate(50, 125000, 30);
    estimate(7, 1000, 400);
    estimate(1, 333, 0);
    estimate(400, 125000, 1000);
    // manual mode
    begin_meas(1, 50, 32'd2000016);
    check(est_valid && !estimating && ipg_est == 32'd2000016, "manual estimate");
    give_gap(5);
    check(ipg_est == 32'd2000016, "manual estimate held");
    // N = 0 behaves as N = 1
    begin_meas(0, 0, 0);
    give_gap(1234);
    repeat (60) @(negedge clk);
    check(est_valid && ipg_est == 32'd1234 * 16, "N=0 treated as 1");
    // disable clears the state
    enable = 0;
    @(negedge clk);
    check(!est_valid && !estimating, "disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
