// tb_peanut_exception: self-checking test of the exception unit.
//
// Looks up every 10-bit trap number (1 must halt, 3 must put, all others
// are undefined), then checks the stop recording: put does not stop, halt
// stops with cause halt, an undefined trap and an illegal word stop with
// their causes, a stopped unit keeps its first cause, and clear restarts.
module tb_peanut_exception;
  import peanut_pkg::*;

  logic              clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic              trap_req = 1'b0, illegal_req = 1'b0;
  logic [TRAP_W-1:0] trap_num = '0;
  trap_act_e         action;
  logic              stopped;
  stop_e             stop_cause;
  int checks = 0, failures = 0;

  peanut_exception dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic pulse_trap(input int n);
    trap_req <= 1'b1; trap_num <= TRAP_W'(n);
    @(posedge clk);
    trap_req <= 1'b0;
    @(posedge clk);
  endtask

  task automatic do_clear();
    clear <= 1'b1;
    @(posedge clk);
    clear <= 1'b0;
    @(posedge clk);
    check(!stopped && stop_cause == STOP_NONE, "clear");
  endtask

  initial begin
    for (int n = 0; n < 1024; n++) begin
      trap_num = TRAP_W'(n);
      #1;
      check(action == ((n == 1) ? ACT_HALT : (n == 3) ? ACT_PUT : ACT_UNDEF),
            $sformatf("table entry %0d", n));
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(!stopped && stop_cause == STOP_NONE, "after reset");
    pulse_trap(3);
    check(!stopped, "put does not stop");
    pulse_trap(1);
    check(stopped && stop_cause == STOP_HALT, "halt stops");
    illegal_req <= 1'b1;
    @(posedge clk);
    illegal_req <= 1'b0;
    @(posedge clk);
    check(stop_cause == STOP_HALT, "first cause is kept");
    do_clear();
    pulse_trap(700);
    check(stopped && stop_cause == STOP_BADTRAP, "undefined trap stops");
    do_clear();
    illegal_req <= 1'b1;
    @(posedge clk);
    illegal_req <= 1'b0;
    @(posedge clk);
    check(stopped && stop_cause == STOP_ILLEGAL, "illegal word stops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
