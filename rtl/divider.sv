// divider: sequential unsigned division unit, quotient = dividend / divisor.
//
// A restoring shift-and-subtract divider that produces one quotient bit per
// clock cycle, most significant first. A start pulse loads the operands;
// done pulses for one cycle exactly DIVIDEND_W + 1 cycles later, with
// quotient and remainder valid from then until the next start. busy is high
// in between; a start while busy is ignored. The divisor must not be zero
// (the result is then meaningless); callers guarantee this.
//
// The document names a division unit for the gap estimate but does not say
// how it is built; one bit per cycle is the smallest form and is fast
// enough, since packets are at least 84 clock cycles apart at 1 Gb/s.
module divider #(
  parameter int unsigned DIVIDEND_W = 52,
  parameter int unsigned DIVISOR_W  = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [DIVIDEND_W-1:0] dividend,
  input  logic [DIVISOR_W-1:0]  divisor,
  output logic                  busy,
  output logic                  done,
  output logic [DIVIDEND_W-1:0] quotient,
  output logic [DIVISOR_W-1:0]  remainder
);

  localparam int unsigned CNT_W = $clog2(DIVIDEND_W + 1);

  logic [DIVISOR_W-1:0] rem;      // partial remainder, always < divisor
  logic [DIVISOR_W-1:0] dsr;
  logic [DIVIDEND_W-1:0] q;       // dividend bits shift out, quotient in
  logic [CNT_W-1:0]     cnt;
  logic [DIVISOR_W:0]   trial;
  logic [DIVISOR_W:0]   diff;

  assign trial = {rem, q[DIVIDEND_W-1]};
  assign diff  = trial - {1'b0, dsr};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      rem  <= '0;
      dsr  <= '0;
      q    <= '0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        rem  <= '0;
        dsr  <= divisor;
        q    <= dividend;
        cnt  <= CNT_W'(DIVIDEND_W);
      end else if (busy) begin
        if (diff[DIVISOR_W]) begin
          rem <= trial[DIVISOR_W-1:0];                // does not fit
          q   <= {q[DIVIDEND_W-2:0], 1'b0};
        end else begin
          rem <= diff[DIVISOR_W-1:0];                 // subtract
          q   <= {q[DIVIDEND_W-2:0], 1'b1};
        end
        cnt <= cnt - CNT_W'(1);
        if (cnt == CNT_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient  = q;
  assign remainder = rem;

endmodule
