// tb_packet_generator: self-checking test of the test packet generator.
// Fills the delay memory with random delays, lets the generator send a
// limited number of packets with and without jitter, and checks each frame
// (length, tlast, Ethernet/IPv4/UDP fields, a valid IPv4 header checksum,
// packet number) and the spacing of first bytes, which must be
// period + delay[k] - delay[k-1] (exactly period without jitter).
module tb_packet_generator;
  localparam int DEPTH = 1024;
  logic clk = 0, rst_n = 0, enable = 0, jitter_en = 0;
  logic [31:0] period = 0, count = 0;
  logic [15:0] frame_len = 80;
  logic [47:0] dst_mac = 48'h02_00_00_00_00_01, src_mac = 48'h02_00_00_00_00_02;
  logic [31:0] src_ip = 32'h0A00_0001, dst_ip = 32'hC0A8_0A05;
  logic [15:0] src_port = 16'd5000, dst_port = 16'd5004;
  logic dly_we = 0;
  logic [9:0] dly_addr = 0;
  logic [15:0] dly_wdata = 0;
  logic [7:0] m_tdata;
  logic m_tvalid, m_tlast, m_tready = 1;
  logic [31:0] sent;
  logic overrun;
  int checks = 0, failures = 0;
  int dly [DEPTH];
  longint cyc = 0;

  packet_generator dut (.*);

  always #4 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // collect n frames, checking contents and spacing
  task automatic collect(int n, bit jit);
    byte unsigned f[$];
    longint t0, tprev;
    int sum;
    for (int k = 0; k < n; k++) begin
      f.delete();
      while (!(m_tvalid && m_tready)) @(negedge clk);
      t0 = cyc;
      forever begin
        f.push_back(m_tdata);
        if (m_tlast) break;
        @(negedge clk);
      end
      @(negedge clk);
      check(f.size() == frame_len, $sformatf("frame length %0d", f.size()));
      check(f[12] == 8'h08 && f[13] == 8'h00 && f[14] == 8'h45 && f[23] == 17, "IPv4/UDP header");
      check({f[0], f[1], f[2], f[3], f[4], f[5]} == dst_mac, "destination MAC");
      check({f[30], f[31], f[32], f[33]} == dst_ip && {f[36], f[37]} == dst_port, "destination");
      check({f[16], f[17]} == frame_len - 14 && {f[38], f[39]} == frame_len - 34, "lengths");
      check({f[42], f[43], f[44], f[45]} == 32'(k), "packet number");
      sum = 0;
      for (int i = 14; i < 34; i += 2) sum += {f[i], f[i + 1]};
      while (sum > 16'hFFFF) sum = (sum & 16'hFFFF) + (sum >> 16);
      check(sum == 16'hFFFF, $sformatf("header checksum, sum %h", sum));
      if (k > 0) begin
        longint expd = period + (jit ? dly[k % DEPTH] - dly[(k - 1) % DEPTH] : 0);
        check(t0 - tprev == expd, $sformatf("spacing %0d expected %0d", t0 - tprev, expd));
      end
      tprev = t0;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      dly[i] = $urandom % 600;
      @(negedge clk);
      dly_we = 1; dly_addr = 10'(i); dly_wdata = 16'(dly[i]);
    end
    @(negedge clk);
    dly_we = 0;
    // without jitter
    period = 500; count = 10;
    enable = 1;
    collect(10, 0);
    repeat (2000) @(negedge clk);
    check(sent == 10 && !m_tvalid, "stops after count packets");
    enable = 0;
    repeat (5) @(negedge clk);
    // with jitter from the delay memory
    period = 1000; count = 40; jitter_en = 1; frame_len = 64;
    enable = 1;
    collect(40, 1);
    repeat (3000) @(negedge clk);
    check(sent == 40 && !overrun, "40 packets, no overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
