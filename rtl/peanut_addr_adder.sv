// peanut_addr_adder: the adder in front of the memory address register.
//
// Combinational. It forms the 10-bit address that the control unit loads
// into MAR: a base (PC for instruction fetch, CI[9..0] for an operand
// address, MDR[9..0] for the second step of an indirect access) plus an
// offset (zero, the index register XR or the stack pointer SP). The sum
// wraps modulo the 1024-word memory. The adder itself and its inputs from
// PC, CI, XR and SP appear in the block diagram of the machine; the exact
// select set and the wrap-around are this design's own choices.
module peanut_addr_adder
  import peanut_pkg::*;
(
  input  addr_base_e base_sel,
  input  addr_off_e  off_sel,
  input  addr_t      pc,
  input  word_t      ci,
  input  word_t      mdr,
  input  word_t      xr,
  input  word_t      sp,
  output addr_t      addr
);

  addr_t base, off;

  always_comb begin
    unique case (base_sel)
      BASE_PC:  base = pc;
      BASE_CI:  base = ci[ADDR_W-1:0];
      BASE_MDR: base = mdr[ADDR_W-1:0];
      default:  base = pc;
    endcase
    unique case (off_sel)
      OFF_ZERO: off = '0;
      OFF_XR:   off = xr[ADDR_W-1:0];
      OFF_SP:   off = sp[ADDR_W-1:0];
      default:  off = '0;
    endcase
    addr = base + off;
  end

endmodule
