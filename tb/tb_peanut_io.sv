// tb_peanut_io: self-checking test of the I/O unit.
//
// The processor side offers random characters at random times; the user
// side withholds ready at random. A queue here records every character the
// unit accepted; each one the user receives must be the next in the queue.
// Also checked: put_ready equals "buffer empty or being emptied", a
// character offered to an empty buffer is visible in the next cycle, and
// put_count equals the number of characters delivered.
module tb_peanut_io;
  import peanut_pkg::*;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              put_valid = 1'b0, put_ready;
  logic [CHAR_W-1:0] put_data = '0;
  logic              out_valid, out_ready = 1'b0;
  logic [CHAR_W-1:0] out_data;
  logic [15:0]       put_count;
  logic [CHAR_W-1:0] q [$];
  int checks = 0, failures = 0, delivered = 0, stalls = 0;

  peanut_io dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    check(put_ready == (!out_valid || out_ready), "put_ready");
    if (out_valid && out_ready) begin
      check(q.size() > 0 && out_data == q[0], "delivered character order");
      if (q.size() > 0) void'(q.pop_front());
      delivered++;
    end
    if (put_valid && put_ready) q.push_back(put_data);
    if (put_valid && !put_ready) stalls++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // empty buffer: character appears in the next cycle
    put_valid <= 1'b1; put_data <= 8'h48;
    @(posedge clk);
    put_valid <= 1'b0;
    #1 check(out_valid && out_data == 8'h48, "one-cycle delivery");
    out_ready <= 1'b1;
    @(posedge clk);
    out_ready <= 1'b0;
    for (int i = 0; i < 3000; i++) begin
      put_valid <= ($urandom_range(0, 1) == 1);
      put_data  <= CHAR_W'($urandom);
      out_ready <= ($urandom_range(0, 2) != 0);
      @(posedge clk);
    end
    put_valid <= 1'b0;
    out_ready <= 1'b1;
    repeat (3) @(posedge clk);
    check(q.size() == 0, "all characters delivered");
    check(int'(put_count) == delivered, $sformatf("put_count %0d vs %0d", put_count, delivered));
    check(stalls > 0, "processor side was made to wait");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
