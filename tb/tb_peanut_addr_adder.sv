// tb_peanut_addr_adder: self-checking test of the address adder in front
// of MAR. Every base and offset select is tried with random register
// values; the expected address is the 10-bit sum computed here.
module tb_peanut_addr_adder;
  import peanut_pkg::*;

  addr_base_e base_sel;
  addr_off_e  off_sel;
  addr_t      pc, addr;
  word_t      ci, mdr, xr, sp;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  peanut_addr_adder dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int b, o, e;
      b = $urandom_range(0, 2);
      o = $urandom_range(0, 2);
      base_sel = addr_base_e'(b);
      off_sel  = addr_off_e'(o);
      pc  = addr_t'($urandom);
      ci  = word_t'($urandom);
      mdr = word_t'($urandom);
      xr  = word_t'($urandom);
      sp  = word_t'($urandom);
      #1;
      e = (b == 0) ? int'(pc) : (b == 1) ? int'(ci) % 1024 : int'(mdr) % 1024;
      e += (o == 0) ? 0 : (o == 1) ? int'(xr) : int'(sp);
      e = e % 1024;
      checks++;
      if (int'(addr) != e) begin
        failures++;
        $display("FAIL: base=%0d off=%0d addr=%0d want %0d", b, o, addr, e);
      end
    end
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
