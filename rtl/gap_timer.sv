// gap_timer: the clock counter that measures received inter-packet gaps.
//
// Counts clock cycles between consecutive packet-match pulses. On every match
// after the first one since run went high, gap_valid pulses for one cycle
// (the cycle after the match) with gap = number of cycles from the previous
// match to this one. The counter saturates at all ones, so a lost stream
// shows as a maximal gap instead of wrapping. While run is low nothing is
// measured and the next match only restarts the count.
//
// Measuring gaps with a clock counter is the document's method; sharing one
// counter between the estimation and evaluation phases is this design's.
module gap_timer #(
  parameter int unsigned GAP_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  input  logic             match,
  output logic             gap_valid,
  output logic [GAP_W-1:0] gap
);

  logic [GAP_W-1:0] cnt;
  logic             have_prev;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      have_prev <= 1'b0;
      gap_valid <= 1'b0;
      gap       <= '0;
    end else begin
      gap_valid <= 1'b0;
      if (!run) begin
        have_prev <= 1'b0;
        cnt       <= '0;
      end else if (match) begin
        have_prev <= 1'b1;
        gap_valid <= have_prev;
        gap       <= cnt;
        cnt       <= GAP_W'(1);
      end else if (cnt != '1) begin
        cnt <= cnt + GAP_W'(1);
      end
    end
  end

endmodule
