// jitter_platform: the jitter measurement test platform around the unit.
//
// Receive side, as it sits behind an Ethernet MAC: the MAC's AXI4-Stream
// receive bytes go through the jitter measurement unit (which only watches
// them) and then through the measurement packet dropper, which removes the
// measurement packets so the host only sees the rest of the traffic. The
// host configures the unit and reads its results over AXI4-Lite.
//
// Transmit side, standing beside it with its own ports: the test packet
// generator, which in the measurement set-up feeds a second, directly linked
// MAC and so produces a stream of known jitter for the receive side. The two
// sides share only the clock and reset; nothing connects them inside.
//
// Interfaces: see jitter_unit (stream, AXI4-Lite), meas_packet_dropper (host
// stream) and packet_generator (g_* ports). The MAC, the host CPU and the
// PHY are outside. This arrangement follows the document's test platform;
// the port naming is this design's.
module jitter_platform
  import jm_pkg::*;
#(
  parameter int unsigned MATCH_BYTES = 64,
  parameter int unsigned MEM_DEPTH   = 8192,
  parameter int unsigned BUF_BYTES   = 4096,
  parameter int unsigned DELAY_DEPTH = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  speed_e      speed,
  // receive stream from the MAC
  input  logic [7:0]  rx_tdata,
  input  logic        rx_tvalid,
  input  logic        rx_tlast,
  input  logic        rx_tuser,
  // stream to the host, measurement packets removed
  output logic [7:0]  host_tdata,
  output logic        host_tvalid,
  output logic        host_tlast,
  input  logic        host_tready,
  output logic [31:0] host_dropped,
  output logic [31:0] host_lost,
  // AXI4-Lite slave of the jitter unit
  input  logic [15:0] s_axil_awaddr,
  input  logic        s_axil_awvalid,
  output logic        s_axil_awready,
  input  logic [31:0] s_axil_wdata,
  input  logic [3:0]  s_axil_wstrb,
  input  logic        s_axil_wvalid,
  output logic        s_axil_wready,
  output logic [1:0]  s_axil_bresp,
  output logic        s_axil_bvalid,
  input  logic        s_axil_bready,
  input  logic [15:0] s_axil_araddr,
  input  logic        s_axil_arvalid,
  output logic        s_axil_arready,
  output logic [31:0] s_axil_rdata,
  output logic [1:0]  s_axil_rresp,
  output logic        s_axil_rvalid,
  input  logic        s_axil_rready,
  // packet generator
  input  logic        g_enable,
  input  logic        g_jitter_en,
  input  logic [31:0] g_period,
  input  logic [31:0] g_count,
  input  logic [15:0] g_frame_len,
  input  logic [47:0] g_dst_mac,
  input  logic [47:0] g_src_mac,
  input  logic [31:0] g_src_ip,
  input  logic [31:0] g_dst_ip,
  input  logic [15:0] g_src_port,
  input  logic [15:0] g_dst_port,
  input  logic        g_dly_we,
  input  logic [$clog2(DELAY_DEPTH)-1:0] g_dly_addr,
  input  logic [15:0] g_dly_wdata,
  output logic [7:0]  g_tdata,
  output logic        g_tvalid,
  output logic        g_tlast,
  input  logic        g_tready,
  output logic [31:0] g_sent,
  output logic        g_overrun
);

  logic [7:0] u_tdata;
  logic       u_tvalid, u_tlast, u_tuser, u_tready, rx_tready;
  logic       packet_match;

  jitter_unit #(.MATCH_BYTES(MATCH_BYTES), .MEM_DEPTH(MEM_DEPTH)) u_unit (
    .clk, .rst_n, .speed,
    .s_axis_tdata(rx_tdata), .s_axis_tvalid(rx_tvalid), .s_axis_tlast(rx_tlast),
    .s_axis_tuser(rx_tuser), .s_axis_tready(rx_tready),
    .m_axis_tdata(u_tdata), .m_axis_tvalid(u_tvalid), .m_axis_tlast(u_tlast),
    .m_axis_tuser(u_tuser), .m_axis_tready(u_tready),
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready, .s_axil_wdata, .s_axil_wstrb,
    .s_axil_wvalid, .s_axil_wready, .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready, .s_axil_rdata, .s_axil_rresp,
    .s_axil_rvalid, .s_axil_rready,
    .packet_match
  );

  meas_packet_dropper #(.BUF_BYTES(BUF_BYTES), .MATCH_BYTES(MATCH_BYTES)) u_drop (
    .clk, .rst_n, .speed,
    .match   (packet_match),
    .s_tdata (u_tdata), .s_tvalid(u_tvalid), .s_tlast(u_tlast), .s_tuser(u_tuser),
    .s_tready(u_tready),
    .m_tdata (host_tdata), .m_tvalid(host_tvalid), .m_tlast(host_tlast), .m_tready(host_tready),
    .dropped (host_dropped),
    .lost    (host_lost)
  );

  packet_generator #(.DELAY_DEPTH(DELAY_DEPTH), .DELAY_W(16)) u_gen (
    .clk, .rst_n,
    .enable(g_enable), .jitter_en(g_jitter_en), .period(g_period), .count(g_count),
    .frame_len(g_frame_len), .dst_mac(g_dst_mac), .src_mac(g_src_mac),
    .src_ip(g_src_ip), .dst_ip(g_dst_ip), .src_port(g_src_port), .dst_port(g_dst_port),
    .dly_we(g_dly_we), .dly_addr(g_dly_addr), .dly_wdata(g_dly_wdata),
    .m_tdata(g_tdata), .m_tvalid(g_tvalid), .m_tlast(g_tlast), .m_tready(g_tready),
    .sent(g_sent), .overrun(g_overrun)
  );

  // the MAC receive stream cannot be stalled; the dropper always accepts
  logic unused;
  assign unused = rx_tready;

endmodule
