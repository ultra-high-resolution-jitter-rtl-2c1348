// tb_result_memory: self-checking test of the circular result buffer at its
// full 8192-word size. Writes more than one buffer's worth of values, some
// while frozen, and compares every word read back (one cycle read latency),
// the write pointer and the wrapped flag with a reference model; checks that
// clear restarts the pointer.
module tb_result_memory;
  localparam int DEPTH = 8192;
  logic clk = 0, rst_n = 0, clear = 0, freeze = 0, we = 0;
  logic [31:0] wdata = 0, rd_data;
  logic [12:0] rd_addr = 0, wr_ptr;
  logic wrapped;
  int checks = 0, failures = 0;
  logic [31:0] model [DEPTH];
  int m_ptr = 0;
  bit m_wrapped = 0;

  result_memory dut (.*);

  always #4 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic write(logic [31:0] v);
    @(negedge clk);
    wdata = v; we = 1;
    @(negedge clk);
    we = 0;
    if (!freeze) begin
      model[m_ptr] = v;
      if (m_ptr == DEPTH - 1) m_wrapped = 1;
      m_ptr = (m_ptr + 1) % DEPTH;
    end
    check(wr_ptr == 13'(m_ptr) && wrapped == m_wrapped, "pointer");
  endtask

  task automatic read_all(int from, int n);
    for (int i = from; i < from + n; i++) begin
      @(negedge clk);
      rd_addr = 13'(i);
      @(negedge clk);
      check(rd_data == model[i], $sformatf("word %0d: %h expected %h", i, rd_data, model[i]));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(wr_ptr == 0 && !wrapped, "reset state");
    for (int i = 0; i < 100; i++) write($urandom);
    read_all(0, 100);
    freeze = 1;
    for (int i = 0; i < 10; i++) write($urandom);
    read_all(0, 100);
    freeze = 0;
    for (int i = 0; i < DEPTH + 50; i++) write($urandom);
    check(wrapped, "wrapped after a full buffer");
    read_all(0, DEPTH);
    // a read concurrent with a write sees the old word, then the new one
    @(negedge clk);
    rd_addr = 13'(m_ptr); wdata = 32'hDEAD_BEEF; we = 1;
    @(negedge clk);
    we = 0;
    check(rd_data == model[m_ptr], "read during write returns old value");
    model[m_ptr] = 32'hDEAD_BEEF; m_ptr++;
    @(negedge clk);
    check(rd_data == 32'hDEAD_BEEF, "then the new value");
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    m_ptr = 0; m_wrapped = 0;
    check(wr_ptr == 0 && !wrapped, "clear");
    write(32'h1234_5678);
    read_all(0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
