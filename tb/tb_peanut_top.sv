// tb_peanut_top: end-to-end test of the PeANUt computer at its default size.
//
// Loads each example program through the image records, lets it run to its
// halt and checks the memory cells it writes, the characters it prints and
// the number of cycles it runs. The programs are the machine's standard
// examples: addition in direct and immediate mode, logical and in direct
// mode, subtraction in indirect mode, and printing a word with trap 3
// while the user side withholds ready at random. Three faulty cases
// follow: an undecodable word, an undefined trap and an image with two
// START lines. Expected values are worked out by hand from the programs.
// Each mechanism (immediate, direct, indirect operand, add, sub, and,
// store, put, output stall, halt, illegal word, undefined trap, image
// error) is counted, and one that never happened is a failure.
module tb_peanut_top;
  import peanut_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              rec_valid = 1'b0;
  rec_e              rec_kind = REC_END;
  word_t             rec_value = '0;
  logic              rec_ready, load_error;
  logic              out_valid, out_ready;
  logic [CHAR_W-1:0] out_data;
  logic              running, stopped, instr_start;
  stop_e             stop_cause;
  addr_t             pc;
  word_t             ac, sp, xr;
  cc_t               cc;
  logic [15:0]       put_count;

  int checks = 0, failures = 0;
  int run_cycles = 0;
  bit stall_user = 1'b0;
  string printed = "";

  // mechanism counters
  int n_imm = 0, n_memop = 0, n_ind = 0, n_add = 0, n_sub = 0, n_and = 0;
  int n_store = 0, n_put = 0, n_stall = 0, n_halt = 0, n_illegal = 0;
  int n_badtrap = 0, n_loaderr = 0;

  peanut_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // user side
  always_ff @(posedge clk) begin
    out_ready <= stall_user ? ($urandom_range(0, 2) == 0) : 1'b1;
    if (out_valid && out_ready) begin
      printed = {printed, string'(out_data)};
      n_put++;
    end
  end

  always_ff @(posedge clk) begin
    if (running) run_cycles++;
    if (dut.ctrl.ac_ld && dut.ctrl.alu_b == ALUB_IMM) n_imm++;
    if (dut.ctrl.ac_ld && dut.ctrl.alu_b == ALUB_MDR) n_memop++;
    if (dut.ctrl.mar_ld && dut.ctrl.addr_base == BASE_MDR) n_ind++;
    if (dut.ctrl.ac_ld && dut.ctrl.alu_op == ALU_ADD) n_add++;
    if (dut.ctrl.ac_ld && dut.ctrl.alu_op == ALU_SUB) n_sub++;
    if (dut.ctrl.ac_ld && dut.ctrl.alu_op == ALU_AND) n_and++;
    if (dut.ctrl.mem_wr) n_store++;
    if (dut.put_valid && !dut.put_ready) n_stall++;
  end

  task automatic send(input rec_e kind, input word_t value);
    rec_valid <= 1'b1;
    rec_kind  <= kind;
    rec_value <= value;
    @(posedge clk);
    while (!rec_ready) @(posedge clk);
    if (kind == REC_END)
      rec_valid <= 1'b0;
  endtask

  // Runs the program loaded so far (after REC_END) to its end.
  task automatic run_to_stop(output int cycles);
    int guard = 0;
    run_cycles = 0;
    @(posedge clk);
    @(posedge clk);
    while (!stopped && guard < 5000) begin
      @(posedge clk);
      guard++;
    end
    @(posedge clk);
    cycles = run_cycles;
    case (stop_cause)
      STOP_HALT:    n_halt++;
      STOP_ILLEGAL: n_illegal++;
      STOP_BADTRAP: n_badtrap++;
      default: ;
    endcase
  endtask

  function automatic word_t mem(input int a);
    return dut.u_memory.mem[a];
  endfunction

  // instruction words: {mode, op, operand}
  function automatic word_t ins(input logic [2:0] mode, input logic [2:0] op,
                                input int operand);
    return {mode, op, 10'(operand)};
  endfunction
  function automatic word_t ins6(input logic [5:0] opc, input int operand);
    return {opc, 10'(operand)};
  endfunction

  localparam word_t HALT = 16'b110101_0000000001;
  localparam word_t PUT  = 16'b110101_0000000011;

  int cyc;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // 1. addition, direct mode: mem[a3] <- mem[a1] + mem[a2] with 4 and 5.
    send(REC_START, 'o10);
    send(REC_AT, 'o1);
    send(REC_DATA, 16'd4);
    send(REC_DATA, 16'd5);
    send(REC_AT, 'o10);
    send(REC_DATA, ins(3'b001, 3'b001, 'o1));   // load mem[a1]
    send(REC_DATA, ins(3'b001, 3'b011, 'o2));   // add mem[a2]
    send(REC_DATA, ins(3'b001, 3'b010, 'o3));   // store mem[a3]
    send(REC_DATA, HALT);
    send(REC_END, '0);
    run_to_stop(cyc);
    check(stop_cause == STOP_HALT, "addition: halted");
    check(mem('o3) == 16'd9, $sformatf("addition: mem[a3]=%0d, want 9", mem('o3)));
    check(ac == 16'd9, "addition: AC=9");
    check(cyc == 8 + 8 + 6 + 5, $sformatf("addition: %0d cycles, want 27", cyc));
    check(pc == 10'('o14), $sformatf("addition: PC=%o after halt, want 14", pc));
    check(!load_error, "addition: image accepted");

    // 2. addition, immediate mode: mem[a35] <- 5 + 14.
    send(REC_START, 'o10);
    send(REC_AT, 'o10);
    send(REC_DATA, ins(3'b000, 3'b001, 5));     // load 5
    send(REC_DATA, ins(3'b000, 3'b011, 14));    // add 14
    send(REC_DATA, ins(3'b001, 3'b010, 'o35));  // store mem[a35]
    send(REC_DATA, HALT);
    send(REC_END, '0);
    run_to_stop(cyc);
    check(mem('o35) == 16'd19, $sformatf("immediate: mem[a35]=%0d, want 19", mem('o35)));
    check(cyc == 5 + 5 + 6 + 5, $sformatf("immediate: %0d cycles, want 21", cyc));

    // 3. logical and, direct mode: mem[a1] <- mem[a63] AND mem[a17].
    send(REC_START, 'o100);
    send(REC_AT, 'o17);
    send(REC_DATA, 16'b1010101010101010);
    send(REC_AT, 'o63);
    send(REC_DATA, 16'b0000000000011100);
    send(REC_AT, 'o100);
    send(REC_DATA, ins(3'b001, 3'b001, 'o63));  // load mem[a63]
    send(REC_DATA, ins6(6'b101110, 'o17));      // and mem[a17]
    send(REC_DATA, ins(3'b001, 3'b010, 'o1));   // store mem[a1]
    send(REC_DATA, HALT);
    send(REC_END, '0);
    run_to_stop(cyc);
    check(mem('o1) == 16'b0000000000001000,
          $sformatf("and: mem[a1]=%b, want ..001000", mem('o1)));
    check(cyc == 8 + 8 + 6 + 5, $sformatf("and: %0d cycles, want 27", cyc));

    // 4. subtraction, indirect mode: mem[a23] <- 20 - mem[mem[a10]].
    send(REC_START, 'o100);
    send(REC_AT, 'o10);
    send(REC_DATA, 16'o52);
    send(REC_AT, 'o52);
    send(REC_DATA, 16'o36);
    send(REC_AT, 'o100);
    send(REC_DATA, ins(3'b000, 3'b001, 20));    // load 20
    send(REC_DATA, ins(3'b010, 3'b100, 'o10));  // sub mem[mem[a10]]
    send(REC_DATA, ins(3'b001, 3'b010, 'o23));  // store mem[a23]
    send(REC_DATA, HALT);
    send(REC_END, '0);
    run_to_stop(cyc);
    check(mem('o23) == 16'hFFF6, $sformatf("sub: mem[a23]=%0d, want -10", $signed(mem('o23))));
    check(cc.n && !cc.z, "sub: CC negative");
    check(cyc == 5 + 11 + 6 + 5, $sformatf("sub: %0d cycles, want 27", cyc));

    // 5. print a word, first with a user that is always ready, then with one
    //    that holds ready low at random.
    for (int pass = 0; pass < 2; pass++) begin
      string word;
      word = "HELLO\n";
      stall_user = (pass == 1);
      printed = "";
      send(REC_START, 'o10);
      send(REC_AT, 'o10);
      for (int i = 0; i < word.len(); i++) begin
        send(REC_DATA, ins(3'b000, 3'b001, int'(word[i])));
        send(REC_DATA, PUT);
      end
      send(REC_DATA, HALT);
      send(REC_END, '0);
      run_to_stop(cyc);
      repeat (5) @(posedge clk);
      check(printed == word, $sformatf("print pass %0d: got \"%s\"", pass, printed));
      if (pass == 0)
        check(cyc == 6 * 5 + 6 * 6 + 5, $sformatf("print: %0d cycles, want 71", cyc));
      else
        check(cyc >= 71, $sformatf("print with stalls: %0d cycles", cyc));
    end
    stall_user = 1'b0;
    check(put_count == 16'd12, $sformatf("put_count=%0d, want 12", put_count));

    // 6. an undecodable word stops the machine.
    send(REC_START, 'o10);
    send(REC_AT, 'o10);
    send(REC_DATA, ins(3'b000, 3'b001, 7));
    send(REC_DATA, 16'b111000_0000000000);
    send(REC_DATA, HALT);
    send(REC_END, '0);
    run_to_stop(cyc);
    check(stop_cause == STOP_ILLEGAL, "illegal word: stop cause");
    check(pc == 10'('o12), "illegal word: stopped after fetching it");

    // 7. an undefined trap stops the machine.
    send(REC_START, 'o10);
    send(REC_AT, 'o10);
    send(REC_DATA, 16'b110101_0000000010);      // trap 2
    send(REC_END, '0);
    run_to_stop(cyc);
    check(stop_cause == STOP_BADTRAP, "undefined trap: stop cause");

    // 8. an image with two START lines is refused and not run.
    send(REC_START, 'o10);
    send(REC_START, 'o20);
    send(REC_AT, 'o10);
    send(REC_DATA, HALT);
    send(REC_END, '0);
    repeat (5) @(posedge clk);
    check(load_error, "two STARTs: image error");
    check(!running, "two STARTs: not started");
    if (load_error) n_loaderr++;

    // every mechanism must have happened
    check(n_imm > 0,     "mechanism: immediate operand");
    check(n_memop > 0,   "mechanism: memory operand");
    check(n_ind > 0,     "mechanism: indirect address");
    check(n_add > 0,     "mechanism: add");
    check(n_sub > 0,     "mechanism: sub");
    check(n_and > 0,     "mechanism: and");
    check(n_store > 0,   "mechanism: store");
    check(n_put > 0,     "mechanism: put");
    check(n_stall > 0,   "mechanism: output stall");
    check(n_halt > 0,    "mechanism: halt");
    check(n_illegal > 0, "mechanism: illegal word");
    check(n_badtrap > 0, "mechanism: undefined trap");
    check(n_loaderr > 0, "mechanism: image error");
    $display("mechanisms: imm=%0d memop=%0d indirect=%0d add=%0d sub=%0d and=%0d store=%0d put=%0d stall=%0d halt=%0d illegal=%0d badtrap=%0d loaderr=%0d",
             n_imm, n_memop, n_ind, n_add, n_sub, n_and, n_store, n_put, n_stall,
             n_halt, n_illegal, n_badtrap, n_loaderr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
