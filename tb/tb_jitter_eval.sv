// tb_jitter_eval: self-checking test of the jitter evaluation block.
// With a fixed estimate, feeds random gaps and checks for every one the value
// written to the result memory (estimate - gap*16), and after each the
// count, maximum, minimum, peak-to-peak and the mean of |jitter|, which must
// be ready within 70 cycles. Also checks that gaps are ignored before the
// estimate is valid, that start clears the statistics and that values
// beyond 32 bits saturate.
module tb_jitter_eval;
  import jm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic enable = 0, start = 0, est_valid = 0;
  logic [VAL_W-1:0] ipg_est = 0;
  logic gap_valid = 0;
  logic [31:0] gap = 0;
  logic mem_we;
  logic [VAL_W-1:0] mem_wdata;
  jit_stats_t stats;
  int checks = 0, failures = 0;

  jitter_eval dut (.*);

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

  longint m_sum;
  int     m_cnt;
  longint m_max, m_min;

  task automatic clear();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    m_sum = 0; m_cnt = 0; m_max = 0; m_min = 0;
  endtask

  task automatic give_gap(logic [31:0] g);
    longint d;
    bit wrote = 0;
    d = longint'(ipg_est) - longint'(g) * 16;
    if (d > 64'sh7FFFFFFF) d = 64'sh7FFFFFFF;
    if (d < -64'sh80000000) d = -64'sh80000000;
    gap = g; gap_valid = 1;
    @(negedge clk);
    gap_valid = 0;
    wrote = mem_we;
    check(wrote && $signed(mem_wdata) == d, $sformatf("jitter value %0d expected %0d", $signed(mem_wdata), d));
    if (m_cnt == 0 || d > m_max) m_max = d;
    if (m_cnt == 0 || d < m_min) m_min = d;
    m_cnt++;
    m_sum += (d < 0) ? -d : d;
    repeat (70) @(negedge clk);
    check(stats.count == m_cnt, "count");
    check($signed(stats.max_j) == m_max && $signed(stats.min_j) == m_min, "max/min");
    check(stats.ppk == 32'(m_max - m_min) || (m_max - m_min > 64'hFFFFFFFF && stats.ppk == '1), "peak to peak");
    check(stats.avg_abs == 32'(m_sum / m_cnt), $sformatf("average %0d expected %0d", stats.avg_abs, m_sum / m_cnt));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    enable = 1;
    ipg_est = 32'd125000 * 16 + 7;
    clear();
    // before the estimate is valid nothing is evaluated
    gap = 124000; gap_valid = 1; @(negedge clk); gap_valid = 0;
    check(!mem_we, "no write before estimate");
    repeat (80) @(negedge clk);
    check(stats.count == 0, "no sample before estimate");
    est_valid = 1;
    for (int i = 0; i < 200; i++) give_gap(125000 + int'($urandom % 1301) - 650);
    // restart and check saturation
    clear();
    check(stats.count == 0 && stats.avg_abs == 0, "start clears");
    give_gap(125000);
    give_gap(32'hFFFF_FFFF);
    ipg_est = 32'hFFFF_FFFF;
    give_gap(1);
    ipg_est = 32'd16;
    for (int i = 0; i < 20; i++) give_gap($urandom % 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
