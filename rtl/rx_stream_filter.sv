// rx_stream_filter: picks the measurement packets out of the received byte
// stream and flags each one with a "packet match" pulse.
//
// The filter only watches the MAC's AXI4-Stream receive bus (8-bit bytes, one
// frame per tlast); it never stalls or changes it, so the data path gains no
// latency. Bytes are parsed as they go past: EtherType (0x0800 IPv4 or 0x86DD
// IPv6, as selected), IP version, next protocol = UDP (17), destination IP
// address (optional compare) and destination UDP port (optional compare). For
// IPv4 the UDP header position follows the IHL field; IPv6 extension headers
// and VLAN tags are not handled.
//
// Timing: match is a one-cycle pulse set by the clock edge that comes exactly
// MATCH_BYTES byte-times after the edge accepting the frame's first byte,
// whatever the content of the frame, so every matched packet is marked with
// the same latency and gaps between pulses equal gaps between first bytes.
// One byte-time is 1, 10 or 100 clock cycles at 1000, 100 or 10 Mb/s (the
// MAC's clock enable pattern), giving a latency of 64, 640 or 6400 cycles at
// the default MATCH_BYTES = 64. The decision must be complete before then:
// a frame whose UDP port lies beyond byte MATCH_BYTES-1, or that ends before
// it, never matches. Since a frame plus preamble and inter-frame gap lasts at
// least 84 byte-times, the latency window of one frame never overlaps the
// next one.
//
// The constant-latency rule and the IPv4/IPv6 and 10/100/1000 Mb/s support
// follow the document; the byte-serial parser, the fixed 64-byte latency and
// the choice of destination (not source) address and port are this design's.
module rx_stream_filter
  import jm_pkg::*;
#(
  parameter int unsigned MATCH_BYTES = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  speed_e      speed,
  input  filter_cfg_t cfg,
  // observed receive stream
  input  logic [7:0]  s_tdata,
  input  logic        s_tvalid,
  input  logic        s_tready,
  input  logic        s_tlast,
  // one-cycle pulse per measurement packet
  output logic        match
);

  localparam int unsigned LAT_W = $clog2(MATCH_BYTES * 100 + 1);

  logic             beat;
  logic             in_frame;     // a frame has started and not yet ended
  logic [7:0]       byte_idx;     // index of the next byte (saturates)
  logic [7:0]       idx;          // index of the current byte
  logic [3:0]       ihl;
  logic             ok, done;     // frame still matches / decision complete
  logic             fail_now, done_now;
  logic [7:0]       udp_start;
  logic [LAT_W-1:0] lat_cnt;
  logic             lat_run;
  logic [LAT_W-1:0] latency;

  assign beat = s_tvalid && s_tready;
  assign idx  = in_frame ? byte_idx : 8'd0;
  assign udp_start = cfg.ipv6 ? 8'd54 : (8'd14 + {2'b00, ihl, 2'b00});

  always_comb begin
    unique case (speed)
      SPEED_10M:  latency = LAT_W'(MATCH_BYTES * 100);
      SPEED_100M: latency = LAT_W'(MATCH_BYTES * 10);
      default:    latency = LAT_W'(MATCH_BYTES);
    endcase
  end

  // Byte-by-byte header checks.
  always_comb begin
    fail_now = 1'b0;
    done_now = 1'b0;
    if (idx == 8'd12) fail_now = s_tdata != (cfg.ipv6 ? 8'h86 : 8'h08);
    if (idx == 8'd13) fail_now = s_tdata != (cfg.ipv6 ? 8'hDD : 8'h00);
    if (idx == 8'd14) begin
      if (cfg.ipv6) fail_now = s_tdata[7:4] != 4'd6;
      else          fail_now = (s_tdata[7:4] != 4'd4) || (s_tdata[3:0] < 4'd5);
    end
    if (!cfg.ipv6 && idx == 8'd23) fail_now = s_tdata != 8'd17;
    if (cfg.ipv6 && idx == 8'd20)  fail_now = s_tdata != 8'd17;
    if (cfg.ip_en) begin
      if (!cfg.ipv6 && idx >= 8'd30 && idx <= 8'd33)
        fail_now = s_tdata != cfg.ip_addr[8*(33 - idx) +: 8];
      if (cfg.ipv6 && idx >= 8'd38 && idx <= 8'd53)
        fail_now = s_tdata != cfg.ip_addr[8*(53 - idx) +: 8];
    end
    if (idx == udp_start + 8'd2)
      fail_now = cfg.port_en && (s_tdata != cfg.udp_port[15:8]);
    if (idx == udp_start + 8'd3) begin
      fail_now = cfg.port_en && (s_tdata != cfg.udp_port[7:0]);
      done_now = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_frame <= 1'b0;
      byte_idx <= '0;
      ihl      <= 4'd5;
      ok       <= 1'b0;
      done     <= 1'b0;
      lat_cnt  <= '0;
      lat_run  <= 1'b0;
      match    <= 1'b0;
    end else begin
      match <= 1'b0;
      if (beat) begin
        in_frame <= !s_tlast;
        byte_idx <= (idx == 8'hFF) ? idx : idx + 8'd1;
        if (idx == 8'd14) ihl <= s_tdata[3:0];
        if (!in_frame) begin
          // first byte of a frame: restart the parse and the latency timer
          ok      <= !fail_now;
          done    <= 1'b0;
          lat_run <= 1'b1;
          lat_cnt <= latency - LAT_W'(1);
        end else begin
          if (fail_now) ok <= 1'b0;
          if (done_now) done <= 1'b1;
        end
      end
      if (lat_run && !(beat && !in_frame)) begin
        if (lat_cnt == '0) begin
          // issued from the registered flags: a decision completing in this
          // very cycle is too late
          lat_run <= 1'b0;
          match   <= ok && done;
        end else begin
          lat_cnt <= lat_cnt - LAT_W'(1);
        end
      end
    end
  end

  // The next frame must not start inside the latency window of the previous.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    (beat && !in_frame) |-> !lat_run || lat_cnt == '0)
    else $error("rx_stream_filter: frame started inside the match latency window");

endmodule
