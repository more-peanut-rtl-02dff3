// tb_peanut_alu: self-checking test of the PeANUt ALU.
//
// Applies the operand pairs of the worked example programs (4 + 5, 5 + 14, 20 - 30, the
// and of 0x001C and 0xAAAA) and then random operands for every operation,
// and compares result and flags with a reference computed here with
// integer arithmetic.
module tb_peanut_alu;
  import peanut_pkg::*;

  alu_op_e op;
  word_t   a, b, y;
  cc_t     flags;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  peanut_alu dut (.*);

  always #5 clk = ~clk;

  task automatic try(input alu_op_e o, input word_t aa, input word_t bb);
    int sa, sb, r;
    word_t ey;
    cc_t ef;
    op = o; a = aa; b = bb;
    #1;
    sa = int'($signed(aa));
    sb = int'($signed(bb));
    ef = '0;
    case (o)
      ALU_PASS: ey = bb;
      ALU_ADD: begin
        r    = sa + sb;
        ey   = word_t'(r);
        ef.v = (r > 32767) || (r < -32768);
        ef.c = (int'(aa) + int'(bb)) > 65535;
      end
      ALU_SUB: begin
        r    = sa - sb;
        ey   = word_t'(r);
        ef.v = (r > 32767) || (r < -32768);
        ef.c = int'(aa) >= int'(bb);
      end
      default: ey = aa & bb;
    endcase
    ef.n = ey[15];
    ef.z = (ey == 0);
    checks++;
    if (y !== ey || flags !== ef) begin
      failures++;
      $display("FAIL: op=%s a=%h b=%h y=%h/%h flags=%b/%b", o.name(), aa, bb, y, ey, flags, ef);
    end
  endtask

  initial begin
    try(ALU_ADD, 16'd4, 16'd5);
    checks++; if (y != 16'd9) failures++;
    try(ALU_ADD, 16'd5, 16'd14);
    checks++; if (y != 16'd19) failures++;
    try(ALU_SUB, 16'd20, 16'd30);
    checks++; if (y != 16'hFFF6) failures++;   // -10
    try(ALU_AND, 16'h001C, 16'hAAAA);
    checks++; if (y != 16'h0008) failures++;
    try(ALU_PASS, 16'd1, 16'd5);
    try(ALU_SUB, 16'h8000, 16'd1);            // overflow
    try(ALU_ADD, 16'h7FFF, 16'd1);            // overflow
    try(ALU_ADD, 16'hFFFF, 16'd1);            // carry, zero
    for (int i = 0; i < 4000; i++)
      try(alu_op_e'($urandom_range(0, 3)), word_t'($urandom), word_t'($urandom));
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
