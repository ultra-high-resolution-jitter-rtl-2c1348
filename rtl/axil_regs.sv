// axil_regs: AXI4-Lite slave for configuration and results.
//
// 32-bit registers at the byte addresses of jm_pkg (REG_*), plus the result
// memory mapped from address 0x8000 upwards, one jitter value per 32-bit word
// (word i of the circular buffer at 0x8000 + 4*i). Writable: CTRL, EST_N,
// MANUAL_IPG, UDP_PORT, IP0..IP3, with byte strobes. Read-only: STATUS
// (bit0 estimating, bit1 evaluating, bit2 buffer wrapped), IPG_EST, JIT_AVG,
// JIT_PPK, JIT_MAX, JIT_MIN, SAMPLES, WR_PTR and MATCHES (packet match_cnt since
// start). Writes to read-only or unmapped addresses are ignored; unmapped
// reads return 0. Responses are always OKAY.
//
// Timing: a write is taken when AWVALID and WVALID are both high and no
// response is outstanding (AWREADY = WREADY in that cycle); BVALID follows one
// cycle later. A read address is taken when no read is in flight; RVALID
// follows three cycles later, the same for registers and memory (one cycle to
// present the address to the RAM, one for its read latency, one to register
// the data). Writing CTRL with ENABLE going from 0 to 1 emits a one-cycle
// start pulse the next cycle, which begins a new measurement.
//
// That configuration and results go over AXI4-Lite, and that the result
// memory is readable while being written, follow the document; the register
// map and the handshake timing are this design's.
module axil_regs
  import jm_pkg::*;
#(
  parameter int unsigned MEM_AW = 13
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
  input  logic [15:0]       s_awaddr,
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [31:0]       s_wdata,
  input  logic [3:0]        s_wstrb,
  input  logic              s_wvalid,
  output logic              s_wready,
  output logic [1:0]        s_bresp,
  output logic              s_bvalid,
  input  logic              s_bready,
  input  logic [15:0]       s_araddr,
  input  logic              s_arvalid,
  output logic              s_arready,
  output logic [31:0]       s_rdata,
  output logic [1:0]        s_rresp,
  output logic              s_rvalid,
  input  logic              s_rready,
  // configuration
  output logic              enable,
  output logic              start,
  output logic              manual,
  output logic              freeze,
  output filter_cfg_t       filt_cfg,
  output logic [31:0]       est_n,
  output logic [VAL_W-1:0]  manual_ipg,
  // results
  input  logic              estimating,
  input  logic              est_valid,
  input  logic [VAL_W-1:0]  ipg_est,
  input  jit_stats_t        stats,
  input  logic [MEM_AW-1:0] wr_ptr,
  input  logic              wrapped,
  input  logic              match,
  output logic [MEM_AW-1:0] mem_rd_addr,
  input  logic [31:0]       mem_rd_data
);

  logic [31:0] ctrl, udp_reg;
  logic [31:0] ip_reg [4];
  logic [31:0] match_cnt;
  logic        wr_fire, rd_fire;
  logic [15:0] rd_addr_q;
  logic [1:0]  rd_stage;     // 0 idle, 1 address to RAM, 2 RAM data valid
  logic [31:0] reg_rdata;

  function automatic logic [31:0] apply_strb(logic [31:0] old, logic [31:0] wd,
                                             logic [3:0] strb);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = strb[b] ? wd[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  // ---------------------------------------------------------------- writes
  assign wr_fire   = s_awvalid && s_wvalid && !s_bvalid;
  assign s_awready = wr_fire;
  assign s_wready  = wr_fire;
  assign s_bresp   = 2'b00;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ctrl       <= '0;
      est_n      <= 32'd50;
      manual_ipg <= '0;
      udp_reg    <= '0;
      ip_reg     <= '{default: '0};
      s_bvalid   <= 1'b0;
      start      <= 1'b0;
    end else begin
      start <= 1'b0;
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (wr_fire) begin
        s_bvalid <= 1'b1;
        unique case ({s_awaddr[15:2], 2'b00})
          REG_CTRL: begin
            ctrl  <= apply_strb(ctrl, s_wdata, s_wstrb);
            start <= s_wstrb[0] && s_wdata[CTRL_ENABLE] && !ctrl[CTRL_ENABLE];
          end
          REG_EST_N:      est_n      <= apply_strb(est_n, s_wdata, s_wstrb);
          REG_MANUAL_IPG: manual_ipg <= apply_strb(manual_ipg, s_wdata, s_wstrb);
          REG_UDP_PORT:   udp_reg    <= apply_strb(udp_reg, s_wdata, s_wstrb);
          REG_IP0:        ip_reg[0]  <= apply_strb(ip_reg[0], s_wdata, s_wstrb);
          REG_IP1:        ip_reg[1]  <= apply_strb(ip_reg[1], s_wdata, s_wstrb);
          REG_IP2:        ip_reg[2]  <= apply_strb(ip_reg[2], s_wdata, s_wstrb);
          REG_IP3:        ip_reg[3]  <= apply_strb(ip_reg[3], s_wdata, s_wstrb);
          default: ;
        endcase
      end
    end
  end

  assign enable           = ctrl[CTRL_ENABLE];
  assign manual           = ctrl[CTRL_MANUAL];
  assign freeze           = ctrl[CTRL_FREEZE];
  assign filt_cfg.ipv6    = ctrl[CTRL_IPV6];
  assign filt_cfg.ip_en   = ctrl[CTRL_IP_EN];
  assign filt_cfg.port_en = ctrl[CTRL_PORT_EN];
  assign filt_cfg.ip_addr = {ip_reg[3], ip_reg[2], ip_reg[1], ip_reg[0]};
  assign filt_cfg.udp_port = udp_reg[15:0];

  // match_cnt since the last start
  always_ff @(posedge clk) begin
    if (!rst_n || start) match_cnt <= '0;
    else if (match && enable) match_cnt <= match_cnt + 32'd1;
  end

  // ----------------------------------------------------------------- reads
  assign s_arready = (rd_stage == 2'd0) && !s_rvalid;
  assign rd_fire   = s_arvalid && s_arready;
  assign s_rresp   = 2'b00;
  assign mem_rd_addr = rd_addr_q[MEM_AW+1:2];

  always_comb begin
    unique case ({rd_addr_q[15:2], 2'b00})
      REG_CTRL:       reg_rdata = ctrl;
      REG_STATUS:     reg_rdata = {29'd0, wrapped, est_valid, estimating};
      REG_EST_N:      reg_rdata = est_n;
      REG_MANUAL_IPG: reg_rdata = manual_ipg;
      REG_UDP_PORT:   reg_rdata = udp_reg;
      REG_IP0:        reg_rdata = ip_reg[0];
      REG_IP1:        reg_rdata = ip_reg[1];
      REG_IP2:        reg_rdata = ip_reg[2];
      REG_IP3:        reg_rdata = ip_reg[3];
      REG_IPG_EST:    reg_rdata = ipg_est;
      REG_JIT_AVG:    reg_rdata = stats.avg_abs;
      REG_JIT_PPK:    reg_rdata = stats.ppk;
      REG_JIT_MAX:    reg_rdata = stats.max_j;
      REG_JIT_MIN:    reg_rdata = stats.min_j;
      REG_SAMPLES:    reg_rdata = stats.count;
      REG_WR_PTR:     reg_rdata = 32'(wr_ptr);
      REG_MATCHES:    reg_rdata = match_cnt;
      default:        reg_rdata = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_addr_q <= '0;
      rd_stage  <= 2'd0;
      s_rvalid  <= 1'b0;
      s_rdata   <= '0;
    end else begin
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      unique case (rd_stage)
        2'd0: if (rd_fire) begin
          rd_addr_q <= s_araddr;
          rd_stage  <= 2'd1;
        end
        2'd1: rd_stage <= 2'd2;
        default: begin
          rd_stage <= 2'd0;
          s_rvalid <= 1'b1;
          s_rdata  <= rd_addr_q[15] ? mem_rd_data : reg_rdata;
        end
      endcase
    end
  end

  // byte-lane bits of the addresses: accesses are whole 32-bit words
  logic unused_addr;
  assign unused_addr = ^{s_awaddr[1:0], rd_addr_q[1:0]};

  // --------------------------------------------------------- handshake rules
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_bvalid && !s_bready |=> s_bvalid) else $error("BVALID dropped before BREADY");
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata)) else $error("RVALID/RDATA changed before RREADY");
  a_one_read: assert property (@(posedge clk) disable iff (!rst_n)
    rd_fire |-> !s_rvalid) else $error("read accepted while a response is pending");

endmodule
