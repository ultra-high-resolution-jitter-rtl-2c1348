// tb_jitter_platform: end-to-end test of the whole test platform at its
// default parameters: the platform's packet generator drives its own receive
// side through a zero-jitter link, the host controls the jitter unit over
// AXI4-Lite and reads the receive stream after the measurement packet
// dropper.
//
// The phases are those of the unit's own end-to-end test:
//   A  jitter-free stream, 125000-cycle (1 ms at 125 MHz) gap, 50-packet
//      estimate;
//   B  normally distributed delays (sigma 72 cycles) on a 1000-cycle gap,
//      foreign frames in between, 4000-packet estimate, result memory wraps,
//      then frozen and read out whole;
//   C  manual gap;  D  IPv6 at 100 Mb/s.
// In addition, every frame reaching the host is checked: it must be one of
// the foreign frames, byte for byte and in order, and the dropper must have
// removed every measurement frame. Each mechanism, dropping included, is
// counted and must occur.
module tb_jitter_platform;
  import jm_pkg::*;
  import tb_eth_pkg::*;

  logic clk = 0, rst_n = 0;
  speed_e speed = SPEED_1G;
  // stream into the unit
  logic [7:0] s_tdata;
  logic s_tvalid, s_tlast, s_tuser = 0;
  logic s_tready = 1;           // a MAC receive stream never waits
  // AXI4-Lite
  logic [15:0] awaddr = 0, araddr = 0;
  logic awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic [31:0] wdata = 0, rdata;
  logic [3:0] wstrb = 4'hF;
  logic awready, wready, bvalid, arready, rvalid;
  logic [1:0] bresp, rresp;

  // packet generator
  logic g_enable = 0, g_jitter = 0, g_dly_we = 0, g_overrun;
  logic [31:0] g_period = 1000, g_count = 0, g_sent;
  logic [9:0] g_dly_addr = 0;
  logic [15:0] g_dly_wdata = 0;
  logic [7:0] g_tdata;
  logic g_tvalid, g_tlast;
  // frames injected by the testbench
  logic [7:0] i_tdata = 0;
  logic i_tvalid = 0, i_tlast = 0;

  localparam logic [31:0] MEAS_IP = 32'hC0A8_0A05;
  localparam logic [15:0] MEAS_PORT = 16'd5004;
  localparam logic [127:0] IP6 = 128'h2001_0db8_0000_0000_0000_0000_0000_0042;

  logic [7:0] host_tdata;
  logic host_tvalid, host_tlast, host_tready = 1;
  logic [31:0] host_dropped, host_lost;

  jitter_platform dut (
    .clk, .rst_n, .speed,
    .rx_tdata(s_tdata), .rx_tvalid(s_tvalid), .rx_tlast(s_tlast), .rx_tuser(s_tuser),
    .host_tdata, .host_tvalid, .host_tlast, .host_tready, .host_dropped, .host_lost,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid),
    .s_axil_wready(wready), .s_axil_bresp(bresp), .s_axil_bvalid(bvalid),
    .s_axil_bready(bready), .s_axil_araddr(araddr), .s_axil_arvalid(arvalid),
    .s_axil_arready(arready), .s_axil_rdata(rdata), .s_axil_rresp(rresp),
    .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .g_enable, .g_jitter_en(g_jitter), .g_period, .g_count, .g_frame_len(16'd64),
    .g_dst_mac(48'h02_00_00_00_00_01), .g_src_mac(48'h02_00_00_00_00_02),
    .g_src_ip(32'h0A00_0001), .g_dst_ip(MEAS_IP),
    .g_src_port(16'd5000), .g_dst_port(MEAS_PORT),
    .g_dly_we, .g_dly_addr, .g_dly_wdata,
    .g_tdata, .g_tvalid, .g_tlast, .g_tready(1'b1), .g_sent, .g_overrun
  );

  // host side: every frame must be the next expected foreign frame
  bytes_t host_exp[$];
  bytes_t host_cur;
  int host_frames = 0, host_bad = 0;
  always @(posedge clk) begin
    if (rst_n && host_tvalid && host_tready) begin
      host_cur.push_back(host_tdata);
      if (host_tlast) begin
        if (host_exp.size() == 0 || host_cur != host_exp[0]) host_bad++;
        if (host_exp.size() != 0) void'(host_exp.pop_front());
        host_cur.delete();
        host_frames++;
      end
    end
  end

  // the link: generator frames and injected frames never overlap
  assign s_tdata  = i_tvalid ? i_tdata : g_tdata;
  assign s_tvalid = i_tvalid | g_tvalid;
  assign s_tlast  = i_tvalid ? i_tlast : g_tlast;

  always #4 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  // first-byte cycles of measurement frames, as the unit receives them
  longint sof[$];
  bit in_frame = 0, meas_frame = 0;
  int collisions = 0;
  int words[$];
  int n_estimate = 0, n_manual = 0, n_reject = 0, n_ipv6 = 0, n_100m = 0,
      n_wrap = 0, n_freeze = 0, n_eval = 0, n_drop = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (i_tvalid && g_tvalid) collisions <= collisions + 1;
    if (!rst_n) in_frame <= 0;
    else if (s_tvalid && s_tready) begin
      if (!in_frame && (g_tvalid || meas_frame)) sof.push_back(cyc);
      in_frame <= !s_tlast;
    end
  end

  initial begin
    #400ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ AXI4-Lite
  task automatic axi_write(logic [15:0] a, logic [31:0] d);
    @(negedge clk);
    awaddr = a; awvalid = 1; wdata = d; wvalid = 1; bready = 1;
    #1;
    while (!(awready && wready)) begin @(negedge clk); #1; end
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
    @(negedge clk);
    bready = 0;
  endtask

  task automatic axi_read(logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1; rready = 1;
    #1;
    while (!arready) begin @(negedge clk); #1; end
    @(negedge clk);
    arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = rdata;
    @(negedge clk);
    rready = 0;
  endtask

  // ------------------------------------------------------------- stimulus
  // inject one frame, one byte every bt cycles
  task automatic inject(bytes_t f, int bt, bit meas);
    if (!meas) host_exp.push_back(f);
    @(negedge clk);
    meas_frame = meas;
    foreach (f[i]) begin
      i_tdata = f[i]; i_tvalid = 1; i_tlast = (i == f.size() - 1);
      @(negedge clk);
      i_tvalid = 0; i_tlast = 0;
      repeat (bt - 1) @(negedge clk);
    end
    meas_frame = 0;
  endtask

  // a roughly normal delay (sum of 12 uniforms), mean 400, sigma s cycles
  function automatic int normal_delay(int s);
    int acc = 0;
    for (int i = 0; i < 12; i++) acc += int'($urandom % 1001);
    acc = 400 + ((acc - 6000) * s) / 1000;  // sd of the sum is 1000
    return acc < 0 ? 0 : acc > 800 ? 800 : acc;
  endfunction

  // model of the unit over the recorded first-byte cycles
  longint gaps[$];
  function automatic void make_gaps();
    gaps.delete();
    for (int i = 1; i < sof.size(); i++) gaps.push_back(sof[i] - sof[i - 1]);
  endfunction

  // expected estimate from gaps [0, n)
  function automatic longint model_est(int n);
    longint s = 0;
    for (int i = 0; i < n; i++) s += gaps[i];
    return (s * 16 + n / 2) / n;
  endfunction

  // compare statistics registers with the jitter of gaps [first, size)
  task automatic check_stats(longint est, int first, string ph);
    longint d, mx, mn, sa;
    int n = 0;
    logic [31:0] r;
    sa = 0;
    for (int i = first; i < gaps.size(); i++) begin
      d = est - 16 * gaps[i];
      if (n == 0 || d > mx) mx = d;
      if (n == 0 || d < mn) mn = d;
      sa += d < 0 ? -d : d;
      n++;
    end
    axi_read(REG_SAMPLES, r); check(r == n, $sformatf("%s samples %0d expected %0d", ph, r, n));
    n_eval += (n > 0);
    if (n == 0) return;
    axi_read(REG_JIT_AVG, r); check(r == sa / n, $sformatf("%s average %0d expected %0d", ph, r, sa / n));
    axi_read(REG_JIT_MAX, r); check($signed(r) == mx, $sformatf("%s max %0d expected %0d", ph, $signed(r), mx));
    axi_read(REG_JIT_MIN, r); check($signed(r) == mn, $sformatf("%s min %0d expected %0d", ph, $signed(r), mn));
    axi_read(REG_JIT_PPK, r); check(r == mx - mn, $sformatf("%s peak-to-peak %0d expected %0d", ph, r, mx - mn));
    $display("%s: estimate %0d/16 cycles, %0d samples, mean |jitter| %0d/16, peak-to-peak %0d/16 cycles",
             ph, est, n, sa / n, mx - mn);
  endtask

  task automatic wait_sent(int n);
    while (g_sent < n) @(negedge clk);
    repeat (200) @(negedge clk);
  endtask

  logic [31:0] r, wp0;
  longint est;
  int nb;

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    axi_write(REG_IP0, MEAS_IP);
    axi_write(REG_UDP_PORT, 32'(MEAS_PORT));

    // ---------------- A: no jitter, 1 ms gap, estimate from 50 packets
    sof.delete();
    axi_write(REG_EST_N, 50);
    axi_write(REG_CTRL, 32'h31);                      // enable, IPv4, IP+port filter
    axi_read(REG_STATUS, r); check(r[0] && !r[1], "A estimating");
    g_period = 125000; g_count = 60; g_jitter = 0; g_enable = 1;
    wait_sent(60);
    g_enable = 0;
    make_gaps();
    axi_read(REG_STATUS, r); check(r[1], "A evaluating");
    axi_read(REG_IPG_EST, r);
    check(r == 125000 * 16 && model_est(50) == r, $sformatf("A estimate %0d", r));
    n_estimate += (r == 125000 * 16);
    check_stats(longint'(r), 50, "A");
    axi_read(REG_JIT_PPK, r); check(r == 0, "A zero peak-to-peak");
    axi_write(REG_CTRL, 32'h30);

    // ---------------- B: jitter, estimate from 4000 packets, memory wraps
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      g_dly_we = 1; g_dly_addr = 10'(i); g_dly_wdata = 16'(normal_delay(72));
    end
    @(negedge clk);
    g_dly_we = 0;
    sof.delete();
    axi_write(REG_EST_N, 4000);
    axi_write(REG_CTRL, 32'h31);
    g_period = 1000; g_count = 12400; g_jitter = 1; g_enable = 1;
    nb = 0;
    fork
      wait_sent(12300);
      // foreign frames between measurement frames
      while (g_sent < 12250) begin
        while (!(g_tvalid && g_tlast)) @(negedge clk);
        repeat (20) @(negedge clk);
        if (nb % 2 == 0) inject(build_udp_frame(0, 128'(MEAS_IP), 16'd5006), 1, 0);
        else             inject(build_udp_frame(0, 128'(MEAS_IP), MEAS_PORT, 18, 5, 8'd6), 1, 0);
        nb++;
      end
    join
    // freeze the memory while the stream goes on
    axi_write(REG_CTRL, 32'h35);
    axi_read(REG_WR_PTR, wp0);
    axi_read(REG_STATUS, r); check(r[2], "B memory wrapped");
    n_wrap += r[2];
    wait_sent(12400);
    g_enable = 0;
    make_gaps();
    axi_read(REG_WR_PTR, r); check(r == wp0, "B write pointer frozen");
    axi_read(REG_SAMPLES, r); check(r == gaps.size() - 4000, "B samples keep counting when frozen");
    n_freeze += (r == gaps.size() - 4000 && r > 12300 - 4000);
    axi_read(REG_MATCHES, r);
    check(r == 12400 && nb > 100, $sformatf("B matches %0d of %0d frames", r, 12400 + nb));
    n_reject += (nb > 100 && r == 12400);
    est = model_est(4000);
    axi_read(REG_IPG_EST, r); check(r == est, $sformatf("B estimate %0d expected %0d", r, est));
    n_estimate++;
    check_stats(est, 4000, "B");
    // read out the frozen memory, oldest first
    begin
      automatic int bad = 0;
      automatic real m = 0, v = 0, x;
      words.delete();
      for (int k = 0; k < 8192; k++) begin
        logic [31:0] word;
        axi_read(16'h8000 + 16'(((wp0 + k) % 8192) * 4), word);
        x = $itor($signed(word));
        if (x < 0) x = -x;                    // statistics of |jitter|
        m += x; v += x * x;
        words.push_back($signed(word));
      end
      // the stored block must be a run of consecutive expected values
      begin
        automatic int first = -1;
        for (int g = 4000; g + 8192 <= gaps.size(); g++)
          if (est - 16 * gaps[g] == words[0] && est - 16 * gaps[g + 1] == words[1] &&
              est - 16 * gaps[g + 2] == words[2] && est - 16 * gaps[g + 8191] == words[8191]) begin
            first = g;
            break;
          end
        check(first >= 0, "B memory block found in the expected sequence");
        if (first >= 0)
          for (int k = 0; k < 8192; k++) if (est - 16 * gaps[first + k] != words[k]) bad++;
        check(bad == 0, $sformatf("B %0d memory words differ", bad));
      end
      m /= 8192.0; v = v / 8192.0 - m * m;
      // values are in 1/16 cycle = 0.5 ns at 125 MHz
      $display("B last 8K samples of |jitter|: mean %0.1f ns, std dev %0.1f ns", m * 0.5, $sqrt(v) * 0.5);
    end
    axi_write(REG_CTRL, 32'h30);
    check(!g_overrun && collisions == 0, "generator on time, no collisions");

    // ---------------- C: manual gap
    sof.delete();
    axi_write(REG_MANUAL_IPG, 1000 * 16 + 5);
    axi_write(REG_CTRL, 32'h33);
    axi_read(REG_STATUS, r); check(r[1] && !r[0], "C evaluating at once");
    n_manual += r[1];
    g_count = 30; g_enable = 1;
    wait_sent(30);
    g_enable = 0;
    make_gaps();
    axi_read(REG_IPG_EST, r); check(r == 1000 * 16 + 5, "C manual estimate");
    check_stats(1000 * 16 + 5, 0, "C");
    axi_write(REG_CTRL, 32'h30);

    // ---------------- D: IPv6 at 100 Mb/s, manual gap
    speed = SPEED_100M;
    sof.delete();
    axi_write(REG_IP0, IP6[31:0]);  axi_write(REG_IP1, IP6[63:32]);
    axi_write(REG_IP2, IP6[95:64]); axi_write(REG_IP3, IP6[127:96]);
    axi_write(REG_MANUAL_IPG, 3000 * 16);
    axi_write(REG_CTRL, 32'h3B);                      // enable, manual, IPv6, filters
    for (int k = 0; k < 12; k++) begin
      automatic longint t0 = cyc;
      inject(build_udp_frame(1, IP6, MEAS_PORT), 10, 1);
      if (k == 5) inject(build_udp_frame(1, IP6 ^ 128'h1, MEAS_PORT), 10, 0);
      while (cyc < t0 + 3000 + (k % 3) * 7) @(negedge clk);
    end
    repeat (2000) @(negedge clk);
    make_gaps();
    axi_read(REG_MATCHES, r); check(r == 12, $sformatf("D matches %0d", r));
    n_ipv6 += (r == 12); n_100m += (r == 12);
    check_stats(3000 * 16, 0, "D");

    // ---------------- host stream: foreign frames only
    repeat (3000) @(negedge clk);
    check(host_exp.size() == 0 && host_bad == 0 && host_frames == nb + 1,
          $sformatf("host got %0d frames (%0d wrong, %0d missing), expected %0d",
                    host_frames, host_bad, host_exp.size(), nb + 1));
    check(host_dropped == 60 + 12400 + 30 + 12 && host_lost == 0,
          $sformatf("dropper removed %0d measurement frames, lost %0d", host_dropped, host_lost));
    n_drop += (host_dropped == 60 + 12400 + 30 + 12);

    // ---------------- every mechanism must have happened
    check(n_estimate >= 2, "estimation phase");
    check(n_eval >= 4, "evaluation phase");
    check(n_manual >= 1, "manual gap");
    check(n_reject >= 1, "foreign frames rejected");
    check(n_ipv6 >= 1, "IPv6 filter");
    check(n_100m >= 1, "100 Mb/s stream");
    check(n_wrap >= 1, "result memory wrap");
    check(n_freeze >= 1, "result memory freeze");
    check(n_drop >= 1, "measurement packets dropped before the host");
    $display("mechanisms: estimate %0d evaluate %0d manual %0d reject %0d ipv6 %0d 100M %0d wrap %0d freeze %0d drop %0d",
             n_estimate, n_eval, n_manual, n_reject, n_ipv6, n_100m, n_wrap, n_freeze, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
