// tb_divider: self-checking test of the sequential divider.
// Divides random and corner-case operands, compares quotient and remainder
// with the / and % operators, and checks that done comes DIVIDEND_W + 1
// cycles after start.
module tb_divider;
  localparam int DW = 52, VW = 32;
  logic clk = 0, rst_n = 0, start = 0;
  logic [DW-1:0] dividend, quotient;
  logic [VW-1:0] divisor, remainder;
  logic busy, done;
  int checks = 0, failures = 0;

  divider dut (.*);   // default widths: 52-bit dividend, 32-bit divisor

  always #4 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [DW-1:0] a, logic [VW-1:0] b);
    int cyc = 0;
    @(negedge clk);
    dividend = a; divisor = b; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 3;
    if (quotient !== a / DW'(b)) begin failures++; $display("q %0d/%0d got %0d", a, b, quotient); end
    if (remainder !== VW'(a % DW'(b))) begin failures++; $display("r %0d%%%0d got %0d", a, b, remainder); end
    if (cyc != DW + 1) begin failures++; $display("latency %0d", cyc); end
  endtask

  initial begin
    dividend = '0; divisor = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(52'd125000 * 50, 32'd50);
    run(52'd7, 32'd9);
    run('1, 32'd1);
    run('1, '1);
    run(52'd0, 32'd3);
    for (int i = 0; i < 300; i++)
      run({$urandom, $urandom} >> ($urandom % 40), ($urandom >> ($urandom % 31)) | 32'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
