// jm_pkg: constants and types shared by the jitter measurement unit.
//
// Time is counted in cycles of the MAC's receive clock (125 MHz for 1G
// Ethernet, 8 ns per cycle). Gap estimates and jitter values are fixed-point
// numbers of clock cycles with FRAC_BITS fractional bits; the fraction lets
// the estimated gap, being a mean of many gaps, carry more resolution than
// one clock period. The fraction width and the register map are this
// design's own choices.
package jm_pkg;

  // Fractional bits of the gap estimate and of every jitter value.
  localparam int unsigned FRAC_BITS = 4;

  // Width of gaps, estimates and jitter values (fixed point, see above).
  localparam int unsigned VAL_W = 32;

  // Ethernet link speed as reported by the MAC. The byte stream then carries
  // one valid byte every 100, 10 or 1 clock cycles.
  typedef enum logic [1:0] {
    SPEED_10M  = 2'b00,
    SPEED_100M = 2'b01,
    SPEED_1G   = 2'b10
  } speed_e;

  // Measurement phase of the unit.
  typedef enum logic [1:0] {
    PH_IDLE     = 2'b00,  // measurement disabled
    PH_ESTIMATE = 2'b01,  // inter-packet gap being estimated
    PH_EVALUATE = 2'b10   // jitter being evaluated against the estimate
  } phase_e;

  // Packet filter configuration.
  typedef struct packed {
    logic         ipv6;      // 1: match IPv6/UDP packets, 0: IPv4/UDP
    logic         ip_en;     // compare the destination IP address
    logic         port_en;   // compare the destination UDP port
    logic [127:0] ip_addr;   // IPv4 address in bits [31:0]
    logic [15:0]  udp_port;
  } filter_cfg_t;

  // Statistics of the evaluation phase.
  typedef struct packed {
    logic [VAL_W-1:0] avg_abs;   // mean of |jitter|
    logic [VAL_W-1:0] ppk;       // max(jitter) - min(jitter)
    logic [VAL_W-1:0] max_j;     // largest jitter (signed)
    logic [VAL_W-1:0] min_j;     // smallest jitter (signed)
    logic [31:0]      count;     // evaluated samples
  } jit_stats_t;

  // AXI4-Lite register map (byte addresses). Addresses with bit 15 set read
  // the result memory, one 32-bit jitter value per word.
  localparam logic [15:0] REG_CTRL       = 16'h0000;
  localparam logic [15:0] REG_STATUS     = 16'h0004;
  localparam logic [15:0] REG_EST_N      = 16'h0008;
  localparam logic [15:0] REG_MANUAL_IPG = 16'h000C;
  localparam logic [15:0] REG_UDP_PORT   = 16'h0010;
  localparam logic [15:0] REG_IP0        = 16'h0014;  // IP address bits [31:0]
  localparam logic [15:0] REG_IP1        = 16'h0018;
  localparam logic [15:0] REG_IP2        = 16'h001C;
  localparam logic [15:0] REG_IP3        = 16'h0020;  // IP address bits [127:96]
  localparam logic [15:0] REG_IPG_EST    = 16'h0024;
  localparam logic [15:0] REG_JIT_AVG    = 16'h0028;
  localparam logic [15:0] REG_JIT_PPK    = 16'h002C;
  localparam logic [15:0] REG_JIT_MAX    = 16'h0030;
  localparam logic [15:0] REG_JIT_MIN    = 16'h0034;
  localparam logic [15:0] REG_SAMPLES    = 16'h0038;
  localparam logic [15:0] REG_WR_PTR     = 16'h003C;
  localparam logic [15:0] REG_MATCHES    = 16'h0040;

  // CTRL register bits.
  localparam int unsigned CTRL_ENABLE  = 0;  // 0->1 starts a new measurement
  localparam int unsigned CTRL_MANUAL  = 1;  // use MANUAL_IPG, skip estimation
  localparam int unsigned CTRL_FREEZE  = 2;  // block result memory writes
  localparam int unsigned CTRL_IPV6    = 3;
  localparam int unsigned CTRL_IP_EN   = 4;
  localparam int unsigned CTRL_PORT_EN = 5;

endpackage
