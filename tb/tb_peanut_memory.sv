// tb_peanut_memory: self-checking test of the 1024-word memory.
//
// Fills every cell through the load port, then mixes random reads and
// writes on the processor port, and load-port writes, against a model
// array. Checks the one-cycle read latency and that a processor write wins
// over a load-port write to the same cell.
module tb_peanut_memory;
  import peanut_pkg::*;

  logic  clk = 1'b0;
  addr_t addr = '0, ld_addr = '0;
  logic  rd = 1'b0, wr = 1'b0, ld_we = 1'b0;
  word_t wdata = '0, rdata, ld_data = '0;
  word_t model [MEM_WORDS];
  int checks = 0, failures = 0;

  peanut_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < MEM_WORDS; i++) begin
      model[i] = word_t'($urandom);
      ld_we   <= 1'b1;
      ld_addr <= addr_t'(i);
      ld_data <= model[i];
      @(posedge clk);
    end
    ld_we <= 1'b0;
    for (int i = 0; i < 5000; i++) begin
      int kind;
      addr_t a;
      word_t d;
      kind = $urandom_range(0, 2);
      a = addr_t'($urandom);
      d = word_t'($urandom);
      rd <= 1'b0; wr <= 1'b0; ld_we <= 1'b0;
      if (kind == 0) begin
        rd <= 1'b1; addr <= a;
        @(posedge clk);
        rd <= 1'b0;
        @(posedge clk);
        checks++;
        if (rdata !== model[a]) begin
          failures++;
          $display("FAIL: read %0d got %h want %h", a, rdata, model[a]);
        end
      end else if (kind == 1) begin
        wr <= 1'b1; addr <= a; wdata <= d;
        // a load-port write to the same cell in the same cycle loses
        ld_we <= 1'b1; ld_addr <= a; ld_data <= ~d;
        model[a] = d;
        @(posedge clk);
      end else begin
        ld_we <= 1'b1; ld_addr <= a; ld_data <= d;
        model[a] = d;
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
