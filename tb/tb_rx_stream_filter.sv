// tb_rx_stream_filter: self-checking test of the RX stream filter.
// Sends IPv4 and IPv6 UDP frames, matching and not matching in EtherType,
// protocol, IP address and UDP port, with IPv4 options, at 1000, 100 and
// 10 Mb/s byte rates. For every frame it checks whether a match pulse comes
// and that it comes exactly 64 byte-times after the first byte.
module tb_rx_stream_filter;
  import jm_pkg::*;
  import tb_eth_pkg::*;

  logic clk = 0, rst_n = 0;
  speed_e speed = SPEED_1G;
  filter_cfg_t cfg;
  logic [7:0] s_tdata = 0;
  logic s_tvalid = 0, s_tready = 1, s_tlast = 0;
  logic match;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint match_cyc[$];

  rx_stream_filter dut (.*);

  always #4 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (match) match_cyc.push_back(cyc);
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int byte_time(speed_e s);
    return s == SPEED_10M ? 100 : s == SPEED_100M ? 10 : 1;
  endfunction

  // send a frame; one valid byte every byte_time cycles
  task automatic send(bytes_t f, bit expect_match, string what);
    longint first;
    int bt = byte_time(speed);
    match_cyc.delete();
    @(negedge clk);
    first = cyc;
    foreach (f[i]) begin
      s_tdata = f[i]; s_tvalid = 1; s_tlast = (i == f.size() - 1);
      @(negedge clk);
      s_tvalid = 0; s_tlast = 0;
      repeat (bt - 1) @(negedge clk);
    end
    // preamble + inter-frame gap, and wait out the latency window
    repeat (24 * bt) @(negedge clk);
    while (cyc < first + 64 * bt + 4) @(negedge clk);
    checks++;
    // the first byte is taken at the edge where cyc == first; match is set
    // 64 byte-times later and seen by the next edge
    if (expect_match) begin
      if (match_cyc.size() != 1 || match_cyc[0] != first + 64 * bt + 1) begin
        failures++;
        $display("FAIL %s: expected match at %0d, got %p", what, first + 64 * bt, match_cyc);
      end
    end else if (match_cyc.size() != 0) begin
      failures++;
      $display("FAIL %s: unexpected match", what);
    end
  endtask

  localparam logic [127:0] IP4 = 128'hC0A8_0A05;
  localparam logic [127:0] IP6 = 128'h2001_0db8_0000_0000_0000_0000_0000_0042;

  initial begin
    cfg = '{ipv6: 0, ip_en: 1, port_en: 1, ip_addr: IP4, udp_port: 16'd5004};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int sp = 0; sp < 3; sp++) begin
      speed = (sp == 0) ? SPEED_1G : (sp == 1) ? SPEED_100M : SPEED_10M;
      cfg.ipv6 = 0; cfg.ip_addr = IP4; cfg.ip_en = 1; cfg.port_en = 1;
      send(build_udp_frame(0, IP4, 16'd5004), 1, "ipv4 match");
      send(build_udp_frame(0, IP4, 16'd5005), 0, "ipv4 wrong port");
      send(build_udp_frame(0, IP4 ^ 1, 16'd5004), 0, "ipv4 wrong ip");
      send(build_udp_frame(0, IP4, 16'd5004, 18, 5, 8'd6), 0, "ipv4 tcp");
      send(build_udp_frame(0, IP4, 16'd5004, 30, 7), 1, "ipv4 options");
      send(build_udp_frame(1, IP6, 16'd5004), 0, "ipv6 frame in ipv4 mode");
      cfg.port_en = 0;
      send(build_udp_frame(0, IP4, 16'd9), 1, "ipv4 any port");
      cfg.ip_en = 0; cfg.port_en = 1;
      send(build_udp_frame(0, 128'h0A000001, 16'd5004), 1, "ipv4 any ip");
      cfg.ipv6 = 1; cfg.ip_addr = IP6; cfg.ip_en = 1;
      send(build_udp_frame(1, IP6, 16'd5004), 1, "ipv6 match");
      send(build_udp_frame(1, IP6 ^ (128'h1 << 100), 16'd5004), 0, "ipv6 wrong ip");
      send(build_udp_frame(1, IP6, 16'd4004), 0, "ipv6 wrong port");
      send(build_udp_frame(0, IP4, 16'd5004), 0, "ipv4 frame in ipv6 mode");
    end
    // short frame ending before the UDP port: no match
    begin
      bytes_t f;
      f = build_udp_frame(0, IP4, 16'd5004);
      speed = SPEED_1G; cfg.ipv6 = 0; cfg.ip_addr = IP4;
      f = f[0:35];
      send(f, 0, "truncated frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
