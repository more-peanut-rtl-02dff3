// tb_peanut_control: self-checking test of the control unit.
//
// Plays a program to the control unit by presenting each instruction word
// on ci from the start of its fetch. For every instruction it counts the
// cycles until the next fetch and the transfers issued (memory reads and
// writes, AC loads with their ALU operation and operand, indirect MAR
// loads, MAR offsets, MDR <- AC, put requests) and compares them with the
// sequence expected for that instruction and addressing mode. Put is run
// once with the I/O unit refusing for three cycles. Halt, an undefined trap
// and an undecodable word must each stop the machine; go restarts it.
module tb_peanut_control;
  import peanut_pkg::*;

  logic              clk = 1'b0, rst_n = 1'b0, go = 1'b0;
  word_t             ci = '0;
  logic              trap_req, illegal_req, put_valid, put_ready;
  logic [TRAP_W-1:0] trap_num;
  trap_act_e         trap_action;
  ctrl_t             ctrl;
  logic              running, instr_start;
  int checks = 0, failures = 0;

  peanut_control dut (.*);

  always #5 clk = ~clk;

  // trap table as the exception unit has it
  assign trap_action = (trap_num == 1) ? ACT_HALT : (trap_num == 3) ? ACT_PUT : ACT_UNDEF;
  int refuse = 0;
  assign put_ready = (refuse == 0);
  always @(posedge clk) if (put_valid && refuse > 0) refuse <= refuse - 1;

  typedef struct {
    int cycles, rd, wr, acld, ind, mdr_ac, puts, xr, sp, imm;
    alu_op_e op;
  } obs_t;

  obs_t cur, done_q [$];

  always @(posedge clk) if (rst_n) begin
    if (instr_start) begin
      if (cur.cycles > 0) done_q.push_back(cur);
      cur = '{default: 0, op: ALU_PASS};
    end
    if (running || cur.cycles > 0) cur.cycles++;
    if (ctrl.mem_rd) cur.rd++;
    if (ctrl.mem_wr) cur.wr++;
    if (ctrl.ac_ld) begin
      cur.acld++;
      cur.op = ctrl.alu_op;
      if (ctrl.alu_b == ALUB_IMM) cur.imm++;
    end
    if (ctrl.mar_ld && ctrl.addr_base == BASE_MDR) cur.ind++;
    if (ctrl.mar_ld && ctrl.addr_off == OFF_XR) cur.xr++;
    if (ctrl.mar_ld && ctrl.addr_off == OFF_SP) cur.sp++;
    if (ctrl.mdr_ld && ctrl.mdr_src == MDR_FROM_AC) cur.mdr_ac++;
    if (put_valid && put_ready) cur.puts++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Runs one instruction word, presented while its fetch is under way;
  // returns what was observed.
  task automatic exec(input word_t w, output obs_t o);
    int n = done_q.size();
    ci <= w;
    @(posedge clk);
    while (done_q.size() == n && running) @(posedge clk);
    if (done_q.size() > n) o = done_q[$];
    else begin
      o = cur;
    end
  endtask

  task automatic expect_ins(input string name, input word_t w, input int cycles,
                            input int rd, input int wr, input int acld, input alu_op_e op,
                            input int imm, input int ind, input int mdr_ac, input int puts);
    obs_t o;
    exec(w, o);
    check(o.cycles == cycles, $sformatf("%s: %0d cycles, want %0d", name, o.cycles, cycles));
    check(o.rd == rd && o.wr == wr, $sformatf("%s: reads %0d writes %0d", name, o.rd, o.wr));
    check(o.acld == acld && (acld == 0 || o.op == op) && o.imm == imm,
          $sformatf("%s: AC loads %0d op %s imm %0d", name, o.acld, o.op.name(), o.imm));
    check(o.ind == ind && o.mdr_ac == mdr_ac && o.puts == puts,
          $sformatf("%s: ind %0d mdr<-ac %0d puts %0d", name, o.ind, o.mdr_ac, o.puts));
  endtask

  task automatic start();
    @(posedge clk);
    go <= 1'b1;
    @(posedge clk);
    go <= 1'b0;
    @(posedge clk);   // first fetch cycle: the previous program's last
    #1;               // instruction is now closed
  endtask

  initial begin
    obs_t o;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(!running, "idle after reset");
    start();
    check(running, "running after go");
    //          name            word                     cyc rd wr ac op        imm ind mdr pt
    expect_ins("load imm",  16'b000_001_0000000101,  5, 1, 0, 1, ALU_PASS, 1, 0, 0, 0);
    expect_ins("add imm",   16'b000_011_0000001110,  5, 1, 0, 1, ALU_ADD,  1, 0, 0, 0);
    expect_ins("load dir",  16'b001_001_0000000001,  8, 2, 0, 1, ALU_PASS, 0, 0, 0, 0);
    expect_ins("add dir",   16'b001_011_0000000010,  8, 2, 0, 1, ALU_ADD,  0, 0, 0, 0);
    expect_ins("and dir",   16'b101110_0000001111,   8, 2, 0, 1, ALU_AND,  0, 0, 0, 0);
    expect_ins("sub ind",   16'b010_100_0000001000, 11, 3, 0, 1, ALU_SUB,  0, 1, 0, 0);
    expect_ins("store dir", 16'b001_010_0000000011,  6, 1, 1, 0, ALU_PASS, 0, 0, 1, 0);
    expect_ins("store ind", 16'b010_010_0000000011,  9, 2, 1, 0, ALU_PASS, 0, 1, 1, 0);
    expect_ins("load idx",  16'b011_001_0000000011,  8, 2, 0, 1, ALU_PASS, 0, 0, 0, 0);
    check(done_q[$].xr == 1, "indexed uses XR");
    expect_ins("load stk",  16'b100_001_0000000011,  8, 2, 0, 1, ALU_PASS, 0, 0, 0, 0);
    check(done_q[$].sp == 1, "stack uses SP");
    expect_ins("put",       16'b110101_0000000011,   6, 1, 0, 0, ALU_PASS, 0, 0, 1, 1);
    refuse = 3;
    expect_ins("put, 3 waits", 16'b110101_0000000011, 9, 1, 0, 0, ALU_PASS, 0, 0, 1, 1);
    // halt
    exec(16'b110101_0000000001, o);
    check(!running, "halt stops");
    check(o.rd == 1 && o.wr == 0 && o.acld == 0, "halt issues only the fetch");
    start();
    exec(16'b110101_0000000010, o);
    check(!running, "undefined trap stops");
    start();
    exec(16'b000_010_0000000011, o);
    check(!running, "store immediate is illegal");
    start();
    exec(16'b111_000_0000000000, o);
    check(!running, "undecodable word stops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (illegal_req && trap_req) begin
    checks++; failures++;
    $display("FAIL: illegal and trap requests together");
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
