// tb_peanut_datapath: self-checking test of the PeANUt registers and their
// transfers.
//
// First walks the transfer sequence of "sub mem[mem[a10]]" after "load
// 20" by hand (fetch, immediate load, indirect operand, subtraction,
// store preparation) and checks each register against the values of that
// example. Then drives random control words for many cycles and compares
// every register with a reference model kept here.
module tb_peanut_datapath;
  import peanut_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  ctrl_t ctrl = '0;
  addr_t start_pc = '0;
  word_t mem_rdata = '0;
  addr_t mem_addr, pc;
  word_t mem_wdata, ci, sp, xr, ac, mdr;
  cc_t   cc;
  int checks = 0, failures = 0;

  peanut_datapath dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one cycle with control word c
  task automatic step(input ctrl_t c);
    ctrl <= c;
    @(posedge clk);
    ctrl <= '0;
    #1;
  endtask

  function automatic ctrl_t mk();
    return '0;
  endfunction

  // reference model
  word_t m_ci, m_ac, m_mdr;
  addr_t m_pc, m_mar;
  cc_t   m_cc;

  initial begin
    ctrl_t c;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    start_pc <= 10'o100;
    c = mk(); c.init = 1'b1; step(c);
    check(pc == 10'o100 && ac == 0 && ci == 0 && mdr == 0 && cc == 0, "init");
    // fetch "load 20"
    c = mk(); c.mar_ld = 1'b1; c.addr_base = BASE_PC; step(c);
    check(mem_addr == 10'o100, "MAR <- PC");
    mem_rdata <= 16'b000_001_0000010100;
    c = mk(); c.mdr_ld = 1'b1; c.mdr_src = MDR_FROM_MEM; step(c);
    check(mdr == 16'b000_001_0000010100, "MDR <- memory");
    c = mk(); c.ci_ld = 1'b1; c.pc_inc = 1'b1; step(c);
    check(ci == 16'b000_001_0000010100 && pc == 10'o101, "CI <- MDR, PC+1");
    c = mk(); c.ac_ld = 1'b1; c.cc_ld = 1'b1; c.alu_op = ALU_PASS; c.alu_b = ALUB_IMM; step(c);
    check(ac == 16'd20, "AC <- CI[9..0]");
    // fetch "sub mem[mem[a10]]"
    mem_rdata <= 16'b010_100_0000001000;
    c = mk(); c.mdr_ld = 1'b1; step(c);
    c = mk(); c.ci_ld = 1'b1; c.pc_inc = 1'b1; step(c);
    c = mk(); c.mar_ld = 1'b1; c.addr_base = BASE_CI; step(c);
    check(mem_addr == 10'o10, "MAR <- CI[9..0]");
    mem_rdata <= 16'o52;
    c = mk(); c.mdr_ld = 1'b1; step(c);
    c = mk(); c.mar_ld = 1'b1; c.addr_base = BASE_MDR; step(c);
    check(mem_addr == 10'o52, "MAR <- MDR[9..0]");
    mem_rdata <= 16'o36;
    c = mk(); c.mdr_ld = 1'b1; step(c);
    c = mk(); c.ac_ld = 1'b1; c.cc_ld = 1'b1; c.alu_op = ALU_SUB; c.alu_b = ALUB_MDR; step(c);
    check(ac == 16'hFFF6 && cc.n && !cc.z, "AC <- AC - MDR = -10");
    c = mk(); c.mdr_ld = 1'b1; c.mdr_src = MDR_FROM_AC; step(c);
    check(mem_wdata == 16'hFFF6, "MDR <- AC");
    // negative immediate is sign-extended
    mem_rdata <= 16'b000_001_1111111111;
    c = mk(); c.mdr_ld = 1'b1; step(c);
    c = mk(); c.ci_ld = 1'b1; step(c);
    c = mk(); c.ac_ld = 1'b1; c.alu_b = ALUB_IMM; step(c);
    check(ac == 16'hFFFF, "immediate sign extension");

    // random control words against the model
    m_ci = ci; m_ac = ac; m_mdr = mdr; m_pc = pc; m_mar = mem_addr; m_cc = cc;
    for (int i = 0; i < 5000; i++) begin
      word_t b, y, imm, rd;
      addr_t ad;
      int s;
      c = ctrl_t'($urandom);
      c.init = ($urandom_range(0, 50) == 0);
      c.alu_op = alu_op_e'($urandom_range(0, 3));
      c.addr_base = addr_base_e'($urandom_range(0, 2));
      c.addr_off = OFF_ZERO;
      rd = word_t'($urandom);
      mem_rdata <= rd;
      start_pc <= addr_t'($urandom);
      @(negedge clk);
      if (c.init) begin
        m_ci = 0; m_ac = 0; m_mdr = 0; m_mar = 0; m_cc = 0; m_pc = start_pc;
      end else begin
        imm = {{6{m_ci[9]}}, m_ci[9:0]};
        b = (c.alu_b == ALUB_IMM) ? imm : m_mdr;
        case (c.alu_op)
          ALU_PASS: y = b;
          ALU_ADD:  y = m_ac + b;
          ALU_SUB:  y = m_ac - b;
          default:  y = m_ac & b;
        endcase
        ad = (c.addr_base == BASE_PC) ? m_pc : (c.addr_base == BASE_CI) ? m_ci[9:0] : m_mdr[9:0];
        if (c.cc_ld) begin
          m_cc.n = y[15];
          m_cc.z = (y == 0);
          s = int'($signed(m_ac)) + ((c.alu_op == ALU_SUB) ? -int'($signed(b)) : int'($signed(b)));
          m_cc.v = (c.alu_op inside {ALU_ADD, ALU_SUB}) && (s > 32767 || s < -32768);
          m_cc.c = (c.alu_op == ALU_ADD) ? (int'(m_ac) + int'(b) > 65535) :
                   (c.alu_op == ALU_SUB) ? (int'(m_ac) >= int'(b)) : 1'b0;
        end
        if (c.ci_ld)  m_ci = m_mdr;
        if (c.mdr_ld) m_mdr = (c.mdr_src == MDR_FROM_AC) ? m_ac : rd;
        if (c.ac_ld)  m_ac = y;
        if (c.mar_ld) m_mar = ad;
        if (c.pc_inc) m_pc = m_pc + 1'b1;
      end
      ctrl <= c;
      @(posedge clk);
      #1;
      check(ci == m_ci && ac == m_ac && mdr == m_mdr && pc == m_pc && mem_addr == m_mar &&
            cc == m_cc && sp == 0 && xr == 0, $sformatf("random cycle %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
