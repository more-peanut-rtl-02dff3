// peanut_datapath: the registers of the PeANUt processor and the transfers
// between them.
//
// Registers: CI (current instruction), PC (program counter), CC (condition
// code), SP (stack pointer), XR (index register), AC (accumulator), MAR
// (memory address register) and MDR (memory data register). The control
// unit drives one ctrl_t word per cycle naming the transfers of that cycle;
// all registers load at the same clock edge, so a transfer reads the value
// a register had at the start of the cycle. The available transfers are
// the ones the instruction walk-throughs use:
//   MAR <- address adder (PC, CI[9..0] or MDR[9..0], plus 0, XR or SP)
//   MDR <- memory data, or MDR <- AC
//   CI  <- MDR,  PC <- PC + 1
//   AC  <- ALU(AC, MDR or immediate), CC <- ALU flags
// MAR drives the memory address and MDR the memory write data. init sets
// PC to start_pc and every other register to zero, the starting state of a
// program. The immediate operand is CI[9..0] sign-extended to 16 bits, and
// no transfer writes SP or XR, which therefore stay zero: these two are this
// design's own choices, since no instruction that sets them is defined.
module peanut_datapath
  import peanut_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  ctrl_t ctrl,
  input  addr_t start_pc,
  input  word_t mem_rdata,
  output addr_t mem_addr,
  output word_t mem_wdata,
  output word_t ci,
  output addr_t pc,
  output cc_t   cc,
  output word_t sp,
  output word_t xr,
  output word_t ac,
  output word_t mdr
);

  addr_t mar, adder_out;
  word_t alu_b, alu_y, imm;
  cc_t   alu_flags;

  assign imm = {{(WORD_W-ADDR_W){ci[ADDR_W-1]}}, ci[ADDR_W-1:0]};
  assign alu_b = (ctrl.alu_b == ALUB_IMM) ? imm : mdr;

  peanut_addr_adder u_adder (
    .base_sel (ctrl.addr_base),
    .off_sel  (ctrl.addr_off),
    .pc       (pc),
    .ci       (ci),
    .mdr      (mdr),
    .xr       (xr),
    .sp       (sp),
    .addr     (adder_out)
  );

  peanut_alu u_alu (
    .op    (ctrl.alu_op),
    .a     (ac),
    .b     (alu_b),
    .y     (alu_y),
    .flags (alu_flags)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ci  <= '0;
      pc  <= '0;
      cc  <= '0;
      sp  <= '0;
      xr  <= '0;
      ac  <= '0;
      mar <= '0;
      mdr <= '0;
    end else if (ctrl.init) begin
      ci  <= '0;
      pc  <= start_pc;
      cc  <= '0;
      sp  <= '0;
      xr  <= '0;
      ac  <= '0;
      mar <= '0;
      mdr <= '0;
    end else begin
      if (ctrl.mar_ld) mar <= adder_out;
      if (ctrl.mdr_ld) mdr <= (ctrl.mdr_src == MDR_FROM_AC) ? ac : mem_rdata;
      if (ctrl.ci_ld)  ci  <= mdr;
      if (ctrl.pc_inc) pc  <= pc + 1'b1;
      if (ctrl.ac_ld)  ac  <= alu_y;
      if (ctrl.cc_ld)  cc  <= alu_flags;
    end
  end

  assign mem_addr  = mar;
  assign mem_wdata = mdr;

endmodule
