// tb_meas_packet_dropper: self-checking test of the measurement packet
// dropper. Sends frames of random length (60 to 300 bytes) at 1 Gb/s and
// 100 Mb/s byte rates, raising the match pulse for the chosen ones at the
// jitter unit's latency (MATCH_BYTES byte-times after the first byte, which
// for short frames is after their end), some marked bad by tuser, while the
// output is read with random back-pressure. Checks that exactly the other
// frames come out, byte for byte and in order, the drop counters, and that
// frames that do not fit in the buffer (output stalled) are lost whole.
module tb_meas_packet_dropper;
  import jm_pkg::*;
  import tb_eth_pkg::*;

  logic clk = 0, rst_n = 0;
  speed_e speed = SPEED_1G;
  logic match = 0;
  logic [7:0] s_tdata = 0;
  logic s_tvalid = 0, s_tlast = 0, s_tuser = 0, s_tready;
  logic [7:0] m_tdata;
  logic m_tvalid, m_tlast, m_tready = 0;
  logic [31:0] dropped, lost;
  int checks = 0, failures = 0;
  bytes_t expq[$];      // frames expected at the output
  bytes_t cur;
  bit ready_random = 1, ready_hold = 0;
  int out_frames = 0, n_match = 0, n_bad = 0, n_late = 0;

  meas_packet_dropper dut (.*);

  always #4 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // output monitor
  always @(negedge clk) m_tready <= ready_hold ? 1'b0 : ready_random ? 1'($urandom % 4 != 0) : 1'b1;
  always @(posedge clk) begin
    if (rst_n && m_tvalid && m_tready) begin
      cur.push_back(m_tdata);
      if (m_tlast) begin
        checks++;
        if (expq.size() == 0 || cur != expq[0]) begin
          failures++;
          $display("FAIL output frame %0d differs (length %0d)", out_frames, cur.size());
        end
        if (expq.size() != 0) void'(expq.pop_front());
        cur.delete();
        out_frames++;
      end
    end
  end

  // send a frame; pulse match at the unit's latency if meas
  task automatic send(int len, bit meas, bit badf, bit expect_out);
    bytes_t f;
    int bt = speed == SPEED_100M ? 10 : 1;
    for (int i = 0; i < len; i++) f.push_back(byte'($urandom));
    if (expect_out) expq.push_back(f);
    n_match += meas; n_bad += badf; n_late += (meas && len < 64);
    fork
      begin
        if (meas) begin
          @(negedge clk);
          repeat (64 * bt) @(negedge clk);
          match = 1; @(negedge clk); match = 0;
        end
      end
      begin
        @(negedge clk);
        foreach (f[i]) begin
          s_tdata = f[i]; s_tvalid = 1; s_tlast = (i == len - 1); s_tuser = badf && s_tlast;
          @(negedge clk);
          s_tvalid = 0; s_tlast = 0; s_tuser = 0;
          repeat (bt - 1) @(negedge clk);
        end
      end
    join
    repeat (24 * bt) @(negedge clk);     // preamble and inter-frame gap
  endtask

  initial begin
    int len;
    bit meas, badf;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int sp = 0; sp < 2; sp++) begin
      speed = sp ? SPEED_100M : SPEED_1G;
      for (int i = 0; i < 150; i++) begin
        len = 60 + int'($urandom % 241);
        meas = ($urandom % 3) == 0;
        badf = !meas && ($urandom % 10) == 0;
        send(len, meas, badf, !meas && !badf);
      end
    end
    speed = SPEED_1G;
    repeat (2000) @(negedge clk);
    check(expq.size() == 0, $sformatf("%0d expected frames missing", expq.size()));
    check(dropped == n_match && lost == n_bad, $sformatf("counters %0d/%0d expected %0d/%0d", dropped, lost, n_match, n_bad));
    // overflow: output stalled, 4096-byte buffer takes 13 frames of 300
    ready_hold = 1;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 16; i++) send(300, 0, 0, i < 13);
    send(60, 1, 0, 0);                 // a match frame still fits, and is dropped
    ready_hold = 0;
    repeat (6000) @(negedge clk);
    check(expq.size() == 0, "frames that fitted come out after the stall");
    check(lost == n_bad + 3, $sformatf("3 frames lost to overflow, lost = %0d", lost));
    check(n_late > 0 && n_match > 0 && n_bad > 0, "short matched frames, bad frames exercised");
    $display("out %0d frames, dropped %0d matched (%0d after their end), lost %0d", out_frames, dropped, n_late, lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
