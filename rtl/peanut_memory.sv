// peanut_memory: the PeANUt main memory, 1024 words of 16 bits.
//
// Port A belongs to the processor. It is addressed by MAR. With rd
// (Read, Enable) the word at addr appears on rdata after the next clock
// edge, where the processor copies it into MDR; with wr (Write, Enable)
// wdata, the contents of MDR, is written at the clock edge. Port B is a
// write-only port used by the loader to place a program image in memory
// before the program runs; if both ports write the same cycle, port A wins.
// WORDS is at most 1024; a smaller memory repeats in the 10-bit address
// space. The size is the machine's; the one-cycle synchronous read and the
// separate load port are this design's own choices. The cells are not
// cleared by reset: the image defines the memory state.
module peanut_memory
  import peanut_pkg::*;
#(
  parameter int unsigned WORDS = MEM_WORDS
) (
  input  logic  clk,
  // processor port
  input  addr_t addr,
  input  logic  rd,
  input  logic  wr,
  input  word_t wdata,
  output word_t rdata,
  // load port
  input  logic  ld_we,
  input  addr_t ld_addr,
  input  word_t ld_data
);

  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr)
      mem[addr[AW-1:0]] <= wdata;
    else if (ld_we)
      mem[ld_addr[AW-1:0]] <= ld_data;
    if (rd)
      rdata <= mem[addr[AW-1:0]];
  end

  // A single port cannot both read and write in one cycle.
  a_no_rd_wr: assert property (@(posedge clk) !(rd && wr));

endmodule
