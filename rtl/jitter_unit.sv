// jitter_unit: network jitter measurement unit for an Ethernet receive path.
//
// Sits between the Ethernet MAC's AXI4-Stream receive output and the rest of
// the design. The stream passes straight through (wires only, no added
// latency); the unit watches it. Measurement packets, a UDP stream of
// equally spaced packets, are recognised by the RX stream filter, which
// gives a match pulse at a constant latency from each packet's first byte.
// The gap timer measures the clock cycles between matches. A measurement
// (started by setting CTRL.ENABLE over AXI4-Lite) has two phases:
//   estimation - the inter-packet gap estimate block averages the first N
//                gaps (or takes a gap set by software, skipping the phase);
//   evaluation - the jitter evaluation block computes, for every further
//                gap, jitter = estimate - gap, keeps the mean of |jitter|,
//                the maximum, minimum and peak-to-peak, and writes each value
//                to the circular result memory.
// All configuration and results, and the result memory, are reached over the
// AXI4-Lite slave (map in jm_pkg and axil_regs). Resolution is one clock
// period of the MAC clock, 8 ns at 125 MHz for 1G Ethernet; the estimate
// carries jm_pkg::FRAC_BITS fractional bits.
//
// The four-block structure (filter, estimate, evaluation, result memory),
// the two phases and the AXI interfaces follow the document; reset is
// synchronous and active low, and everything runs in the MAC clock domain.
// The m_axis outputs and s_axis_tready are plain wires from the inputs and
// the AXI4-Lite responses are always OKAY, so a synthesis report shows them
// as outputs without logic; that is intended.
module jitter_unit
  import jm_pkg::*;
#(
  parameter int unsigned MATCH_BYTES = 64,
  parameter int unsigned MEM_DEPTH   = 8192,
  localparam int unsigned MEM_AW     = $clog2(MEM_DEPTH)
) (
  input  logic        clk,           // MAC receive clock
  input  logic        rst_n,
  input  speed_e      speed,         // link speed from the MAC
  // AXI4-Stream from the MAC
  input  logic [7:0]  s_axis_tdata,
  input  logic        s_axis_tvalid,
  input  logic        s_axis_tlast,
  input  logic        s_axis_tuser,
  output logic        s_axis_tready,
  // AXI4-Stream to the rest of the design (unchanged)
  output logic [7:0]  m_axis_tdata,
  output logic        m_axis_tvalid,
  output logic        m_axis_tlast,
  output logic        m_axis_tuser,
  input  logic        m_axis_tready,
  // AXI4-Lite slave
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
  // packet match pulse, for a downstream filter that drops measurement packets
  output logic        packet_match
);

  // pass-through stream
  assign m_axis_tdata  = s_axis_tdata;
  assign m_axis_tvalid = s_axis_tvalid;
  assign m_axis_tlast  = s_axis_tlast;
  assign m_axis_tuser  = s_axis_tuser;
  assign s_axis_tready = m_axis_tready;

  logic              enable, start, manual, freeze;
  filter_cfg_t       filt_cfg;
  logic [31:0]       est_n;
  logic [VAL_W-1:0]  manual_ipg, ipg_est;
  logic              match;
  logic              gap_valid;
  logic [31:0]       gap;
  logic              estimating, est_valid;
  logic [31:0]       gaps_taken;
  logic              mem_we;
  logic [VAL_W-1:0]  mem_wdata;
  jit_stats_t        stats;
  logic [MEM_AW-1:0] mem_rd_addr, wr_ptr;
  logic [31:0]       mem_rd_data;
  logic              wrapped;

  assign packet_match = match;

  rx_stream_filter #(.MATCH_BYTES(MATCH_BYTES)) u_filter (
    .clk, .rst_n, .speed,
    .cfg      (filt_cfg),
    .s_tdata  (s_axis_tdata),
    .s_tvalid (s_axis_tvalid),
    .s_tready (m_axis_tready),
    .s_tlast  (s_axis_tlast),
    .match    (match)
  );

  gap_timer #(.GAP_W(32)) u_gap (
    .clk, .rst_n,
    .run       (enable && !start),
    .match     (match),
    .gap_valid (gap_valid),
    .gap       (gap)
  );

  ipg_estimator u_est (
    .clk, .rst_n, .enable, .start, .manual,
    .manual_ipg, .est_n, .gap_valid, .gap,
    .estimating, .est_valid, .ipg_est, .gaps_taken
  );

  jitter_eval u_eval (
    .clk, .rst_n, .enable, .start, .est_valid, .ipg_est,
    .gap_valid, .gap, .mem_we, .mem_wdata, .stats
  );

  result_memory #(.DEPTH(MEM_DEPTH), .DATA_W(VAL_W)) u_mem (
    .clk, .rst_n,
    .clear   (start),
    .freeze  (freeze),
    .we      (mem_we),
    .wdata   (mem_wdata),
    .rd_addr (mem_rd_addr),
    .rd_data (mem_rd_data),
    .wr_ptr  (wr_ptr),
    .wrapped (wrapped)
  );

  axil_regs #(.MEM_AW(MEM_AW)) u_regs (
    .clk, .rst_n,
    .s_awaddr (s_axil_awaddr),  .s_awvalid(s_axil_awvalid), .s_awready(s_axil_awready),
    .s_wdata  (s_axil_wdata),   .s_wstrb  (s_axil_wstrb),   .s_wvalid (s_axil_wvalid),
    .s_wready (s_axil_wready),  .s_bresp  (s_axil_bresp),   .s_bvalid (s_axil_bvalid),
    .s_bready (s_axil_bready),  .s_araddr (s_axil_araddr),  .s_arvalid(s_axil_arvalid),
    .s_arready(s_axil_arready), .s_rdata  (s_axil_rdata),   .s_rresp  (s_axil_rresp),
    .s_rvalid (s_axil_rvalid),  .s_rready (s_axil_rready),
    .enable, .start, .manual, .freeze, .filt_cfg, .est_n, .manual_ipg,
    .estimating, .est_valid, .ipg_est, .stats, .wr_ptr, .wrapped,
    .match, .mem_rd_addr, .mem_rd_data
  );

  logic unused;
  assign unused = ^gaps_taken;

endmodule
