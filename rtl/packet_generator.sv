// packet_generator: test source of equally spaced UDP packets with a
// controlled jitter.
//
// Sends IPv4/UDP frames of frame_len bytes (Ethernet header to end of
// payload, as an AXI4-Stream byte stream to a MAC transmitter, one byte per
// cycle when m_tready is high). Packet k is due at k*period clock cycles
// after enable rises, nominally; when jitter_en is set it is held back by a
// further delay[k mod DELAY_DEPTH] cycles, read from a delay memory that
// software fills beforehand (dly_we/dly_addr/dly_wdata). With jitter_en low
// the stream has no jitter at all. count packets are sent (0: no limit);
// sent counts them. The payload starts with the 32-bit packet number, which
// is also the IPv4 identification; the IPv4 header checksum is computed, the
// optional UDP checksum is left 0.
//
// Timing: the first byte of packet k goes out k*period + delay[k] cycles
// after that of packet 0 less delay[0], provided the previous frame has
// finished; otherwise it leaves as soon as it has, and overrun is set (also
// when a delay exceeds the period). period must exceed frame_len plus the
// largest delay difference for the jitter to be exact.
//
// The document's generator sends packets at a programmed gap and delays
// them by values from a normal distribution stored in FPGA memory; the frame
// layout, the delay memory size and the interface are this design's.
module packet_generator #(
  parameter int unsigned DELAY_DEPTH = 1024,
  parameter int unsigned DELAY_W     = 16,
  localparam int unsigned DAW        = $clog2(DELAY_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enable,
  input  logic               jitter_en,
  input  logic [31:0]        period,
  input  logic [31:0]        count,
  input  logic [15:0]        frame_len,
  input  logic [47:0]        dst_mac,
  input  logic [47:0]        src_mac,
  input  logic [31:0]        src_ip,
  input  logic [31:0]        dst_ip,
  input  logic [15:0]        src_port,
  input  logic [15:0]        dst_port,
  // delay memory write port
  input  logic               dly_we,
  input  logic [DAW-1:0]     dly_addr,
  input  logic [DELAY_W-1:0] dly_wdata,
  // AXI4-Stream transmit
  output logic [7:0]         m_tdata,
  output logic               m_tvalid,
  output logic               m_tlast,
  input  logic               m_tready,
  output logic [31:0]        sent,
  output logic               overrun
);

  logic [DELAY_W-1:0] dly_mem [DELAY_DEPTH];
  logic [DELAY_W-1:0] dly_q;
  logic [DAW-1:0]     dly_idx;
  logic               en_q;
  logic [31:0]        pcnt;          // position in the nominal period
  logic               wait_run;
  logic [DELAY_W-1:0] wait_cnt;
  logic               launch_pend;   // packet due, waiting for the link
  logic               sending;
  logic [15:0]        bidx;
  logic [31:0]        seq;
  logic               all_due;       // count packets scheduled
  logic [31:0]        scheduled;
  logic [15:0]        ip_len, udp_len;
  logic [7:0]         hdr_byte;
  logic [19:0]        csum_acc;
  logic [15:0]        csum_fold, ip_csum;

  always_ff @(posedge clk) begin
    if (dly_we) dly_mem[dly_addr] <= dly_wdata;
    dly_q <= dly_mem[dly_idx];
  end

  assign ip_len  = frame_len - 16'd14;
  assign udp_len = frame_len - 16'd34;

  // IPv4 header checksum: one's complement of the one's complement sum
  assign csum_acc = 20'h4500 + 20'(ip_len) + 20'(seq[15:0]) + 20'h4000 + 20'h4011 +
                    20'(src_ip[31:16]) + 20'(src_ip[15:0]) +
                    20'(dst_ip[31:16]) + 20'(dst_ip[15:0]);
  assign csum_fold = 16'(csum_acc[15:0] + 20'(csum_acc[19:16]));
  assign ip_csum   = ~(csum_fold + 16'(csum_fold < csum_acc[15:0] ? 1 : 0));

  always_comb begin
    hdr_byte = 8'h00;
    unique case (bidx)
      16'd0, 16'd1, 16'd2, 16'd3, 16'd4, 16'd5:
        hdr_byte = dst_mac[8*(5 - bidx) +: 8];
      16'd6, 16'd7, 16'd8, 16'd9, 16'd10, 16'd11:
        hdr_byte = src_mac[8*(11 - bidx) +: 8];
      16'd12: hdr_byte = 8'h08;
      16'd13: hdr_byte = 8'h00;
      16'd14: hdr_byte = 8'h45;
      16'd16: hdr_byte = ip_len[15:8];
      16'd17: hdr_byte = ip_len[7:0];
      16'd18: hdr_byte = seq[15:8];
      16'd19: hdr_byte = seq[7:0];
      16'd20: hdr_byte = 8'h40;
      16'd22: hdr_byte = 8'd64;
      16'd23: hdr_byte = 8'd17;
      16'd24: hdr_byte = ip_csum[15:8];
      16'd25: hdr_byte = ip_csum[7:0];
      16'd26, 16'd27, 16'd28, 16'd29:
        hdr_byte = src_ip[8*(29 - bidx) +: 8];
      16'd30, 16'd31, 16'd32, 16'd33:
        hdr_byte = dst_ip[8*(33 - bidx) +: 8];
      16'd34: hdr_byte = src_port[15:8];
      16'd35: hdr_byte = src_port[7:0];
      16'd36: hdr_byte = dst_port[15:8];
      16'd37: hdr_byte = dst_port[7:0];
      16'd38: hdr_byte = udp_len[15:8];
      16'd39: hdr_byte = udp_len[7:0];
      16'd42, 16'd43, 16'd44, 16'd45:
        hdr_byte = seq[8*(45 - bidx) +: 8];
      default: hdr_byte = 8'h00;
    endcase
  end

  assign m_tdata  = hdr_byte;
  assign m_tvalid = sending;
  assign m_tlast  = sending && (bidx == frame_len - 16'd1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      en_q        <= 1'b0;
      pcnt        <= '0;
      wait_run    <= 1'b0;
      wait_cnt    <= '0;
      launch_pend <= 1'b0;
      sending     <= 1'b0;
      bidx        <= '0;
      seq         <= '0;
      sent        <= '0;
      scheduled   <= '0;
      all_due     <= 1'b0;
      dly_idx     <= '0;
      overrun     <= 1'b0;
    end else begin
      en_q <= enable;
      if (!enable) begin
        pcnt        <= '0;
        wait_run    <= 1'b0;
        launch_pend <= 1'b0;
        scheduled   <= '0;
        all_due     <= 1'b0;
        dly_idx     <= '0;
        if (!sending) begin
          seq  <= '0;
          sent <= '0;
        end
      end else begin
        // nominal schedule
        pcnt <= (pcnt == period - 32'd1) ? '0 : pcnt + 32'd1;
        if (pcnt == '0 && !all_due && en_q) begin
          wait_run  <= 1'b1;
          wait_cnt  <= jitter_en ? dly_q : '0;
          dly_idx   <= (dly_idx == DAW'(DELAY_DEPTH - 1)) ? '0 : dly_idx + DAW'(1);
          scheduled <= scheduled + 32'd1;
          if (count != '0 && scheduled + 32'd1 == count) all_due <= 1'b1;
          if (wait_run) overrun <= 1'b1;
        end else if (wait_run) begin
          if (wait_cnt == '0) begin
            wait_run    <= 1'b0;
            launch_pend <= 1'b1;
          end else begin
            wait_cnt <= wait_cnt - DELAY_W'(1);
          end
        end
      end
      // frame transmission; a packet due while a frame is still going out
      // is late
      if (launch_pend && sending) overrun <= 1'b1;
      if (!sending && launch_pend && enable) begin
        sending     <= 1'b1;
        bidx        <= '0;
        launch_pend <= 1'b0;
      end else if (sending && m_tready) begin
        if (bidx == frame_len - 16'd1) begin
          sending <= 1'b0;
          seq     <= seq + 32'd1;
          sent    <= sent + 32'd1;
        end else begin
          bidx <= bidx + 16'd1;
        end
      end
    end
  end

endmodule
