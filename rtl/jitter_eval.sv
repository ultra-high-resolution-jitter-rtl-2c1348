// jitter_eval: the jitter evaluation block.
//
// For every received gap Tr (clock cycles, from the gap timer) once the gap
// estimate Ts is valid, computes the jitter
//     D = Ts - Tr * 2^FRAC_BITS
// as a signed fixed-point number of clock cycles (saturated to 32 bits), and
//   * writes it to the result memory (mem_we/mem_wdata, one cycle after
//     gap_valid),
//   * counts it, and tracks the largest and smallest value and their
//     difference, the peak-to-peak jitter,
//   * adds |D| to a 64-bit sum; a division unit turns sum/count into the
//     average jitter after each sample (DIVIDEND 64 bits: 66 cycles later; a
//     sample arriving meanwhile is folded into the next division).
// start clears all statistics; nothing is evaluated while enable is low or
// the estimate is not valid.
//
// The document gives the difference of estimate and measured gap, the
// averaging and the peak-to-peak measurement. That "average jitter" is the
// mean of |D| is read from its results (a signed mean is zero by
// construction when Ts is itself the mean gap); the fixed-point format is
// this design's choice.
module jitter_eval
  import jm_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic             start,
  input  logic             est_valid,
  input  logic [VAL_W-1:0] ipg_est,
  input  logic             gap_valid,
  input  logic [31:0]      gap,
  output logic             mem_we,
  output logic [VAL_W-1:0] mem_wdata,
  output jit_stats_t       stats
);

  localparam int unsigned W = 32 + FRAC_BITS + 3;  // D without overflow

  logic signed [W-1:0]     d_full;
  logic signed [VAL_W-1:0] d_sat;
  logic [VAL_W-1:0]        d_abs;
  logic signed [VAL_W-1:0] max_r, min_r;
  logic [63:0]             sum_abs;
  logic [31:0]             count;
  logic                    pending;
  logic                    div_start, div_busy, div_done;
  logic [63:0]             quotient;
  logic [31:0]             remainder;
  logic signed [VAL_W:0]   ppk_full;

  localparam logic signed [W-1:0] DMAX = W'({1'b0, {(VAL_W-1){1'b1}}});
  localparam logic signed [W-1:0] DMIN = -DMAX - W'(1);

  assign d_full = $signed(W'(ipg_est)) - $signed(W'({gap, FRAC_BITS'(0)}));
  assign d_sat  = (d_full > DMAX) ? DMAX[VAL_W-1:0] :
                  (d_full < DMIN) ? DMIN[VAL_W-1:0] : d_full[VAL_W-1:0];
  assign d_abs  = d_sat[VAL_W-1] ? (~d_sat + VAL_W'(1)) : d_sat;  // 2^31 fits unsigned

  divider #(.DIVIDEND_W(64), .DIVISOR_W(32)) u_avg_div (
    .clk, .rst_n,
    .start    (div_start),
    .dividend (sum_abs),
    .divisor  (count),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (quotient),
    .remainder(remainder)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mem_we    <= 1'b0;
      mem_wdata <= '0;
      max_r     <= '0;
      min_r     <= '0;
      sum_abs   <= '0;
      count     <= '0;
      pending   <= 1'b0;
      div_start <= 1'b0;
      stats.avg_abs <= '0;
    end else begin
      mem_we    <= 1'b0;
      div_start <= 1'b0;
      if (start) begin
        max_r   <= '0;
        min_r   <= '0;
        sum_abs <= '0;
        count   <= '0;
        pending <= 1'b0;
        stats.avg_abs <= '0;
      end else begin
        if (enable && est_valid && gap_valid) begin
          mem_we    <= 1'b1;
          mem_wdata <= d_sat;
          count     <= count + 32'd1;
          sum_abs   <= sum_abs + 64'(d_abs);
          if (count == '0 || d_sat > max_r) max_r <= d_sat;
          if (count == '0 || d_sat < min_r) min_r <= d_sat;
          pending   <= 1'b1;
        end else if (pending && !div_busy && !div_start) begin
          pending   <= 1'b0;
          div_start <= 1'b1;
        end
        if (div_done) stats.avg_abs <= (quotient[63:VAL_W] != '0) ? '1 : quotient[VAL_W-1:0];
      end
    end
  end

  assign ppk_full    = {max_r[VAL_W-1], max_r} - {min_r[VAL_W-1], min_r};
  assign stats.ppk   = ppk_full[VAL_W] ? '1 : ppk_full[VAL_W-1:0];
  assign stats.max_j = max_r;
  assign stats.min_j = min_r;
  assign stats.count = count;

  logic unused;
  assign unused = ^{remainder, d_full[W-1:VAL_W+1]};

endmodule
