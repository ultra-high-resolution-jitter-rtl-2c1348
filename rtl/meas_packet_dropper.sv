// meas_packet_dropper: removes the measurement packets from the receive
// stream before it reaches the host CPU.
//
// The jitter unit flags a measurement packet only MATCH_BYTES byte-times
// after its first byte, which can be after the frame has ended, so the
// dropper stores each frame in a buffer of BUF_BYTES bytes before passing it
// on. A frame is released to the output when it has ended and its decision
// window (MATCH_BYTES byte-times plus two cycles from the first byte, the
// same latency as the jitter unit's match pulse) has passed without a
// match. A frame that is matched, that the MAC marks bad (tuser with tlast)
// or that does not fit in the buffer is discarded by moving the write
// pointer back to its first byte. The input never stalls (s_tready is 1, a
// MAC receive stream cannot wait); the output is a normal AXI4-Stream with
// back-pressure, read combinationally from the buffer (distributed RAM).
// dropped counts discarded measurement frames, lost the frames discarded
// for being bad or not fitting.
//
// That a filter after the unit drops the measurement packets follows the
// document's test platform; store-and-forward, the buffer size and dropping
// bad frames are this design's choices.
module meas_packet_dropper
  import jm_pkg::*;
#(
  parameter int unsigned BUF_BYTES   = 4096,
  parameter int unsigned MATCH_BYTES = 64,
  localparam int unsigned AW         = $clog2(BUF_BYTES)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  speed_e      speed,
  input  logic        match,
  // stream from the jitter unit
  input  logic [7:0]  s_tdata,
  input  logic        s_tvalid,
  input  logic        s_tlast,
  input  logic        s_tuser,
  output logic        s_tready,
  // stream to the host
  output logic [7:0]  m_tdata,
  output logic        m_tvalid,
  output logic        m_tlast,
  input  logic        m_tready,
  output logic [31:0] dropped,
  output logic [31:0] lost
);

  localparam int unsigned WIN_W = $clog2(MATCH_BYTES * 100 + 3);

  typedef enum logic [1:0] {S_IDLE, S_RECV, S_DECIDE} state_e;

  logic [8:0]       buf_mem [BUF_BYTES];   // {tlast, byte}
  logic [AW:0]      wr_ptr, frame_start, commit_ptr, rd_ptr;
  state_e           state;
  logic             is_meas, bad;
  logic [WIN_W-1:0] win_cnt;
  logic             win_open;
  logic [WIN_W-1:0] window;
  logic             beat, sof, full;
  logic             decide, drop_now, write_en;
  logic [AW:0]      base;

  assign s_tready = 1'b1;
  assign beat     = s_tvalid;
  assign sof      = beat && (state != S_RECV);

  always_comb begin
    unique case (speed)
      SPEED_10M:  window = WIN_W'(MATCH_BYTES * 100 + 2);
      SPEED_100M: window = WIN_W'(MATCH_BYTES * 10 + 2);
      default:    window = WIN_W'(MATCH_BYTES + 2);
    endcase
  end

  // A frame that has ended is settled once it is matched, known bad, out of
  // its window, or when the next frame starts.
  assign decide   = (state == S_DECIDE) && (match || is_meas || bad || !win_open || sof);
  assign drop_now = decide && (match || is_meas || bad);
  assign base     = drop_now ? frame_start : wr_ptr;
  assign full     = (base - rd_ptr) == (AW + 1)'(BUF_BYTES);
  assign write_en = beat && !full && (sof || !bad);

  always_ff @(posedge clk) begin
    if (write_en) buf_mem[base[AW-1:0]] <= {s_tlast, s_tdata};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      wr_ptr      <= '0;
      frame_start <= '0;
      commit_ptr  <= '0;
      is_meas     <= 1'b0;
      bad         <= 1'b0;
      win_cnt     <= '0;
      win_open    <= 1'b0;
      dropped     <= '0;
      lost        <= '0;
    end else begin
      if (win_open) begin
        if (win_cnt == '0) win_open <= 1'b0;
        else               win_cnt  <= win_cnt - WIN_W'(1);
      end
      if (match && state != S_IDLE) is_meas <= 1'b1;

      if (decide) begin
        if (match || is_meas)  dropped    <= dropped + 32'd1;
        else if (bad)          lost       <= lost + 32'd1;
        else                   commit_ptr <= wr_ptr;
        state <= S_IDLE;
      end

      wr_ptr <= write_en ? base + (AW + 1)'(1) : base;

      if (beat) begin
        if (sof) begin
          frame_start <= base;
          is_meas     <= 1'b0;
          bad         <= full;
          win_cnt     <= window - WIN_W'(1);
          win_open    <= 1'b1;
        end else if (!write_en) begin
          bad <= 1'b1;                     // buffer full: frame is lost
        end
        if (s_tlast) begin
          state <= S_DECIDE;
          if (s_tuser) bad <= 1'b1;
        end else begin
          state <= S_RECV;
        end
      end
    end
  end

  // buffer read
  assign m_tvalid = rd_ptr != commit_ptr;
  assign m_tdata  = buf_mem[rd_ptr[AW-1:0]][7:0];
  assign m_tlast  = buf_mem[rd_ptr[AW-1:0]][8];

  always_ff @(posedge clk) begin
    if (!rst_n)                    rd_ptr <= '0;
    else if (m_tvalid && m_tready) rd_ptr <= rd_ptr + (AW + 1)'(1);
  end

endmodule
