// result_memory: circular buffer of the latest jitter values.
//
// A simple dual-port RAM of DEPTH words (default 8192 x 32 bits = 32 KB, an
// inferred block RAM). The jitter evaluation writes each new value at wr_ptr,
// which then advances and wraps, so the buffer always holds the DEPTH most
// recent values; wrapped tells that it has been filled once, after which the
// oldest value is the one at wr_ptr. The host reads any word concurrently
// through rd_addr/rd_data, with one cycle of read latency.
//
// While freeze is high, writes are dropped and wr_ptr stands still, so a
// host reading out the buffer gets a consistent, time-continuous block of
// values instead of one overwritten during the read-out. clear (start of a
// measurement) resets wr_ptr and wrapped; the RAM contents are not cleared.
//
// The circular buffer, the concurrent access and the write disable follow
// the document, as does the 32 KB size of its test setup; the word width and
// the pointer interface are this design's.
module result_memory #(
  parameter int unsigned DEPTH  = 8192,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              freeze,
  input  logic              we,
  input  logic [DATA_W-1:0] wdata,
  input  logic [AW-1:0]     rd_addr,
  output logic [DATA_W-1:0] rd_data,
  output logic [AW-1:0]     wr_ptr,
  output logic              wrapped
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && !freeze && !clear) mem[wr_ptr] <= wdata;
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      wr_ptr  <= '0;
      wrapped <= 1'b0;
    end else if (we && !freeze) begin
      wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + AW'(1);
      if (wr_ptr == AW'(DEPTH - 1)) wrapped <= 1'b1;
    end
  end

endmodule
