// ipg_estimator: the inter-packet gap estimate block.
//
// Estimates the source's inter-packet gap Ts as the mean of the first N
// received gaps (the sample mean of the Interarrival Histograms method), or
// hands on a gap set by software. A clock accumulator sums the gap lengths,
// a packet accumulator counts them, and once N gaps have been taken the
// accumulation stops and the division unit forms
//     ipg_est = round(clock_acc * 2^FRAC_BITS / N)
// a fixed-point value in clock cycles with FRAC_BITS fractional bits, which
// stays fixed for the rest of the measurement.
//
// Interface: start (one cycle, with enable high) begins a measurement; with
// manual set, manual_ipg (same fixed-point format) is taken at once, else the
// estimation phase begins. gap_valid/gap come from the gap timer. est_valid
// rises when the estimate is ready, DIVIDEND_W+3 cycles after the N-th gap
// (one cycle after start in manual mode), and holds until enable falls or the
// next start. est_n = 0 is treated as 1. A mean above the 32-bit range
// saturates.
//
// The accumulators, the division and the stop after N packets follow the
// document; the rounding, the fixed-point format and the widths are this
// design's choices.
module ipg_estimator
  import jm_pkg::*;
#(
  parameter int unsigned ACC_W = 48
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic             start,
  input  logic             manual,
  input  logic [VAL_W-1:0] manual_ipg,
  input  logic [31:0]      est_n,
  input  logic             gap_valid,
  input  logic [31:0]      gap,
  output logic             estimating,
  output logic             est_valid,
  output logic [VAL_W-1:0] ipg_est,
  output logic [31:0]      gaps_taken
);

  localparam int unsigned DIVIDEND_W = ACC_W + FRAC_BITS;

  logic [ACC_W-1:0]      clk_acc;
  logic [31:0]           n_eff;
  logic                  div_start, div_busy, div_done;
  logic [DIVIDEND_W-1:0] dividend, quotient;
  logic [31:0]           remainder;

  assign n_eff    = (est_n == '0) ? 32'd1 : est_n;
  assign dividend = {clk_acc, FRAC_BITS'(0)} + DIVIDEND_W'(n_eff >> 1);

  divider #(.DIVIDEND_W(DIVIDEND_W), .DIVISOR_W(32)) u_div (
    .clk, .rst_n,
    .start    (div_start),
    .dividend (dividend),
    .divisor  (n_eff),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (quotient),
    .remainder(remainder)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      clk_acc    <= '0;
      gaps_taken <= '0;
      estimating <= 1'b0;
      est_valid  <= 1'b0;
      ipg_est    <= '0;
      div_start  <= 1'b0;
    end else begin
      div_start <= 1'b0;
      if (!enable) begin
        estimating <= 1'b0;
        est_valid  <= 1'b0;
      end else if (start) begin
        clk_acc    <= '0;
        gaps_taken <= '0;
        est_valid  <= manual;
        estimating <= !manual;
        if (manual) ipg_est <= manual_ipg;
      end else begin
        if (estimating && gap_valid) begin
          clk_acc    <= clk_acc + ACC_W'(gap);
          gaps_taken <= gaps_taken + 32'd1;
          if (gaps_taken + 32'd1 >= n_eff) begin
            estimating <= 1'b0;     // N gaps taken: stop accumulating
            div_start  <= 1'b1;
          end
        end
        if (div_done && !estimating && !est_valid) begin
          est_valid <= 1'b1;
          ipg_est   <= (quotient > DIVIDEND_W'({VAL_W{1'b1}})) ? '1 : quotient[VAL_W-1:0];
        end
      end
    end
  end

  // remainder and the divider's busy flag are not needed here
  logic unused;
  assign unused = ^{remainder, div_busy};

endmodule
