// tb_axil_regs: self-checking test of the AXI4-Lite register block.
// Acts as an AXI4-Lite master: writes and reads back every writable register
// (with partial byte strobes), checks the configuration outputs, the start
// pulse on ENABLE 0->1 only, the status and result registers, the match
// counter, reads from the result-memory window through a one-cycle RAM
// model, and the response timing (BVALID one cycle and RVALID three cycles
// after the address handshake), including a master that delays READY.
module tb_axil_regs;
  import jm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [15:0] s_awaddr = 0, s_araddr = 0;
  logic s_awvalid = 0, s_wvalid = 0, s_bready = 0, s_arvalid = 0, s_rready = 0;
  logic [31:0] s_wdata = 0;
  logic [3:0] s_wstrb = 0;
  logic s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [1:0] s_bresp, s_rresp;
  logic [31:0] s_rdata;
  logic enable, start, manual, freeze;
  filter_cfg_t filt_cfg;
  logic [31:0] est_n;
  logic [VAL_W-1:0] manual_ipg;
  logic estimating = 0, est_valid = 0, wrapped = 0, match = 0;
  logic [VAL_W-1:0] ipg_est = 0;
  jit_stats_t stats = '0;
  logic [12:0] wr_ptr = 0, mem_rd_addr;
  logic [31:0] mem_rd_data;
  int checks = 0, failures = 0, starts = 0;

  axil_regs dut (.*);

  always #4 clk = ~clk;
  // result memory model: word i holds i * 3 + 1, one cycle of latency
  always_ff @(posedge clk) mem_rd_data <= 32'(mem_rd_addr) * 3 + 1;
  always_ff @(posedge clk) if (rst_n && start) starts <= starts + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic axi_write(logic [15:0] a, logic [31:0] d, logic [3:0] strb = 4'hF);
    int n = 0;
    @(negedge clk);
    s_awaddr = a; s_awvalid = 1; s_wdata = d; s_wstrb = strb; s_wvalid = 1;
    #1;  // let the combinational READY settle before sampling it
    while (!(s_awready && s_wready)) begin @(negedge clk); #1; end
    @(negedge clk);
    s_awvalid = 0; s_wvalid = 0;
    check(s_bvalid && s_bresp == 2'b00, "write response one cycle after handshake");
    repeat ($urandom % 3) @(negedge clk);
    check(s_bvalid, "BVALID held until BREADY");
    s_bready = 1;
    @(negedge clk);
    s_bready = 0;
  endtask

  task automatic axi_read(logic [15:0] a, output logic [31:0] d);
    int lat = 0;
    @(negedge clk);
    s_araddr = a; s_arvalid = 1;
    #1;
    while (!s_arready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_arvalid = 0;
    lat = 1;
    while (!s_rvalid) begin @(negedge clk); lat++; end
    check(lat == 3, $sformatf("read latency %0d", lat));
    repeat ($urandom % 3) @(negedge clk);
    check(s_rvalid && s_rresp == 2'b00, "RVALID held until RREADY");
    d = s_rdata;
    s_rready = 1;
    @(negedge clk);
    s_rready = 0;
  endtask

  task automatic wr_rd(logic [15:0] a, logic [31:0] d, string name);
    logic [31:0] r;
    axi_write(a, d);
    axi_read(a, r);
    check(r == d, $sformatf("%s read back %h expected %h", name, r, d));
  endtask

  logic [31:0] r;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    axi_read(REG_EST_N, r);
    check(r == 50, "EST_N reset value");
    wr_rd(REG_EST_N, 32'd4000, "EST_N");
    check(est_n == 4000, "est_n output");
    wr_rd(REG_MANUAL_IPG, 32'd2000000, "MANUAL_IPG");
    check(manual_ipg == 2000000, "manual_ipg output");
    wr_rd(REG_UDP_PORT, 32'd5004, "UDP_PORT");
    wr_rd(REG_IP0, 32'h0000_0042, "IP0");
    wr_rd(REG_IP1, 32'h1111_2222, "IP1");
    wr_rd(REG_IP2, 32'h3333_4444, "IP2");
    wr_rd(REG_IP3, 32'h2001_0db8, "IP3");
    check(filt_cfg.ip_addr == 128'h2001_0db8_3333_4444_1111_2222_0000_0042 &&
          filt_cfg.udp_port == 16'd5004, "filter address and port outputs");
    // byte strobes
    axi_write(REG_IP1, 32'hAAAA_BBBB, 4'b0101);
    axi_read(REG_IP1, r);
    check(r == 32'h11AA_22BB, "byte strobes");
    // CTRL and the start pulse
    check(starts == 0, "no start yet");
    axi_write(REG_CTRL, 32'h3E);               // all but enable
    check(manual && freeze && filt_cfg.ipv6 && filt_cfg.ip_en && filt_cfg.port_en && !enable,
          "ctrl outputs");
    axi_write(REG_CTRL, 32'h31);               // enable, ipv4, filters
    check(enable && !manual && !freeze && !filt_cfg.ipv6 && starts == 1, "enable starts");
    axi_write(REG_CTRL, 32'h35);               // enable stays high: no new start
    check(starts == 1, "no start while enabled");
    // read-only registers ignore writes
    axi_write(REG_IPG_EST, 32'hFFFF_FFFF);
    // results
    estimating = 1; est_valid = 0; wrapped = 1;
    ipg_est = 32'd2000003;
    stats = '{avg_abs: 32'd1296, ppk: 32'd10448, max_j: 32'd5000, min_j: -32'sd5448, count: 32'd777};
    wr_ptr = 13'd4321;
    axi_read(REG_STATUS, r);  check(r == 32'b101, "STATUS");
    axi_read(REG_IPG_EST, r); check(r == 2000003, "IPG_EST");
    axi_read(REG_JIT_AVG, r); check(r == 1296, "JIT_AVG");
    axi_read(REG_JIT_PPK, r); check(r == 10448, "JIT_PPK");
    axi_read(REG_JIT_MAX, r); check(r == 5000, "JIT_MAX");
    axi_read(REG_JIT_MIN, r); check($signed(r) == -5448, "JIT_MIN");
    axi_read(REG_SAMPLES, r); check(r == 777, "SAMPLES");
    axi_read(REG_WR_PTR, r);  check(r == 4321, "WR_PTR");
    axi_read(16'h0100, r);    check(r == 0, "unmapped reads zero");
    // match counter
    repeat (5) begin @(negedge clk); match = 1; @(negedge clk); match = 0; end
    axi_read(REG_MATCHES, r); check(r == 5, "MATCHES");
    // result memory window
    for (int i = 0; i < 20; i++) begin
      automatic int w = (i < 10) ? i : int'($urandom % 8192);
      axi_read(16'h8000 + 16'(w * 4), r);
      check(r == 32'(w) * 3 + 1, $sformatf("memory word %0d", w));
    end
    // restart: disable then enable gives a second start and clears MATCHES
    axi_write(REG_CTRL, 32'h30);
    axi_write(REG_CTRL, 32'h31);
    check(starts == 2, "second start");
    axi_read(REG_MATCHES, r); check(r == 0, "MATCHES cleared by start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
