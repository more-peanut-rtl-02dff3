// peanut_alu: the arithmetic and logic unit of the PeANUt.
//
// Combinational. The accumulator AC is operand a; operand b is either the
// memory data register MDR or the immediate field of the instruction, as
// selected by the datapath. The operations are the ones the instruction set
// uses: pass b (load), a + b (add), a - b (sub) and a & b (and), on 16-bit
// two's complement words. The flags n, z, v, c for the condition code
// register are this design's own choice: the condition code register exists
// in the machine, but its contents are not defined here by the instruction
// set, so the usual negative/zero/overflow/carry set is produced. For sub,
// c is 1 when no borrow occurs (a >= b unsigned). v and c are 0 for pass
// and and.
module peanut_alu
  import peanut_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y,
  output cc_t     flags
);

  logic [WORD_W:0] sum;

  always_comb begin
    sum     = '0;
    flags   = '0;
    unique case (op)
      ALU_PASS: y = b;
      ALU_ADD: begin
        sum     = {1'b0, a} + {1'b0, b};
        y       = sum[WORD_W-1:0];
        flags.c = sum[WORD_W];
        flags.v = (a[WORD_W-1] == b[WORD_W-1]) && (y[WORD_W-1] != a[WORD_W-1]);
      end
      ALU_SUB: begin
        sum     = {1'b0, a} + {1'b0, ~b} + {{WORD_W{1'b0}}, 1'b1};
        y       = sum[WORD_W-1:0];
        flags.c = sum[WORD_W];
        flags.v = (a[WORD_W-1] != b[WORD_W-1]) && (y[WORD_W-1] != a[WORD_W-1]);
      end
      ALU_AND: y = a & b;
      default: y = b;
    endcase
    flags.n = y[WORD_W-1];
    flags.z = (y == '0);
  end

endmodule
