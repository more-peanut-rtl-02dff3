// tb_peanut_loader: self-checking test of the image loader.
//
// Sends the records of the direct-mode addition program (START a10, data
// at a1 and a10) and checks every memory write and the go pulse with the
// start address. Then sends images breaking each image rule (two STARTs,
// overlapping AT, AT out of order, data before any AT, no START, data past
// the last cell, an address beyond memory) and checks that each raises
// error and gives no go, and that a clean image afterwards starts again.
// Also checks that no record is taken while enable is low.
module tb_peanut_loader;
  import peanut_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, enable = 1'b1;
  logic  rec_valid = 1'b0, rec_ready;
  rec_e  rec_kind = REC_END;
  word_t rec_value = '0;
  logic  mem_we, go, error;
  addr_t mem_addr, start_pc;
  word_t mem_wdata;
  int checks = 0, failures = 0, gos = 0;
  addr_t wa [$];
  word_t wd [$];

  peanut_loader dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (mem_we) begin
      wa.push_back(mem_addr);
      wd.push_back(mem_wdata);
    end
    if (go) gos++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send(input rec_e kind, input int value);
    rec_valid <= 1'b1;
    rec_kind  <= kind;
    rec_value <= word_t'(value);
    @(posedge clk);
    while (!rec_ready) @(posedge clk);
    if (kind == REC_END) rec_valid <= 1'b0;
  endtask

  // Ends an image and reports whether it started.
  task automatic finish_image(input bit want_go, input string what);
    int g0 = gos;
    send(REC_END, 0);
    repeat (2) @(posedge clk);
    check((gos - g0 == 1) == want_go, {what, ": go"});
    check(error == !want_go, {what, ": error"});
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    send(REC_START, 'o10);
    send(REC_AT, 'o1);
    send(REC_DATA, 4);
    send(REC_DATA, 5);
    send(REC_AT, 'o10);
    send(REC_DATA, 16'o022001);
    send(REC_DATA, 16'o026002);
    send(REC_DATA, 16'o024003);
    send(REC_DATA, 16'o152001);
    finish_image(1'b1, "addition image");
    check(start_pc == 10'o10, "start address");
    check(wa.size() == 6, $sformatf("%0d writes, want 6", wa.size()));
    if (wa.size() == 6) begin
      check(wa[0] == 1 && wd[0] == 4 && wa[1] == 2 && wd[1] == 5, "data block at a1");
      check(wa[2] == 8 && wd[2] == 16'o022001 && wa[5] == 11 && wd[5] == 16'o152001,
            "program block at a10");
    end

    send(REC_START, 1); send(REC_START, 2); send(REC_AT, 0); send(REC_DATA, 1);
    finish_image(1'b0, "two STARTs");
    send(REC_START, 1); send(REC_AT, 4); send(REC_DATA, 1); send(REC_DATA, 1);
    send(REC_AT, 5);
    finish_image(1'b0, "overlapping AT");
    send(REC_START, 1); send(REC_AT, 20); send(REC_DATA, 1); send(REC_AT, 10);
    finish_image(1'b0, "AT out of order");
    send(REC_START, 1); send(REC_DATA, 1);
    finish_image(1'b0, "data before AT");
    send(REC_AT, 0); send(REC_DATA, 1);
    finish_image(1'b0, "no START");
    send(REC_START, 1); send(REC_AT, 1023); send(REC_DATA, 1); send(REC_DATA, 2);
    finish_image(1'b0, "past the last cell");
    send(REC_START, 1024);
    finish_image(1'b0, "START beyond memory");
    send(REC_START, 3); send(REC_AT, 3); send(REC_DATA, 1);
    send(REC_AT, 4); send(REC_DATA, 2);
    finish_image(1'b1, "adjacent blocks");

    enable <= 1'b0;
    @(posedge clk);
    #1 check(!rec_ready, "not ready while disabled");
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
