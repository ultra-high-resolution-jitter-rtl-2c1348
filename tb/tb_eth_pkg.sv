// tb_eth_pkg: frame builder shared by the testbenches.
//
// build_udp_frame returns the bytes of an Ethernet II frame (no preamble, no
// FCS, as an AXI4-Stream MAC delivers it) carrying a UDP datagram over IPv4
// (with ihl 32-bit header words) or IPv6, padded to the 60-byte minimum.
// Header checksums are left zero: the unit under test does not check them.
package tb_eth_pkg;

  typedef byte unsigned bytes_t[$];

  function automatic bytes_t build_udp_frame(bit ipv6, logic [127:0] dst_ip,
                                             logic [15:0] dst_port,
                                             int payload_len = 18,
                                             int ihl = 5, byte unsigned proto = 8'd17);
    bytes_t f;
    // MAC addresses
    for (int i = 0; i < 6; i++) f.push_back(8'h02);
    for (int i = 0; i < 6; i++) f.push_back(byte'(4 + i));
    if (!ipv6) begin
      f.push_back(8'h08); f.push_back(8'h00);
      f.push_back(byte'(64 + ihl)); f.push_back(8'h00);
      f.push_back(byte'((ihl * 4 + 8 + payload_len) >> 8));
      f.push_back(byte'(ihl * 4 + 8 + payload_len));
      f.push_back(8'h12); f.push_back(8'h34); f.push_back(8'h40); f.push_back(8'h00);
      f.push_back(8'h40); f.push_back(proto); f.push_back(8'h00); f.push_back(8'h00);
      f.push_back(8'd10); f.push_back(8'd0); f.push_back(8'd0); f.push_back(8'd1);
      for (int i = 3; i >= 0; i--) f.push_back(dst_ip[8*i +: 8]);
      for (int i = 5; i < ihl; i++) repeat (4) f.push_back(8'h01);   // options
    end else begin
      f.push_back(8'h86); f.push_back(8'hDD);
      f.push_back(8'h60); f.push_back(8'h00); f.push_back(8'h00); f.push_back(8'h00);
      f.push_back(byte'((8 + payload_len) >> 8)); f.push_back(byte'(8 + payload_len));
      f.push_back(proto); f.push_back(8'd64);
      for (int i = 0; i < 16; i++) f.push_back(byte'(32 + i));    // source
      for (int i = 15; i >= 0; i--) f.push_back(dst_ip[8*i +: 8]);
    end
    // UDP header
    f.push_back(8'h13); f.push_back(8'h88);
    f.push_back(dst_port[15:8]); f.push_back(dst_port[7:0]);
    f.push_back(byte'((8 + payload_len) >> 8)); f.push_back(byte'(8 + payload_len));
    f.push_back(8'h00); f.push_back(8'h00);
    for (int i = 0; i < payload_len; i++) f.push_back(byte'(i));
    while (f.size() < 60) f.push_back(8'h00);
    return f;
  endfunction

endpackage
