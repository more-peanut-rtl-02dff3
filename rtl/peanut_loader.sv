// peanut_loader: initialises the PeANUt from a program image.
//
// A machine is started by defining its state: the memory contents, the
// program counter, and all other registers at zero. An initialisation file
// holds one START line giving the first PC value, and blocks of data
// values, each block starting at the address given by an AT line. This
// unit applies such an image, delivered as a stream of records, one per
// line: REC_START (value = start address), REC_AT (value = block address),
// REC_DATA (value = 16-bit word, written at the current address, which
// then advances by one) and REC_END (end of image). A record is taken in a
// cycle where rec_valid and rec_ready are both high; rec_ready follows the
// enable input, which the top holds low while a program runs. Data words
// go to memory through mem_we/mem_addr/mem_wdata in the same cycle.
//
// The image rules are checked: only one START; AT blocks must come in
// ascending order without overlapping the data already placed; data must
// follow an AT; no address may pass the end of memory; an image needs a
// START. A record breaking a rule is dropped and sets error. REC_END
// gives a one-cycle go pulse with start_pc when the image was clean, and
// in any case clears the rule state for the next image; error stays set
// until the next image's first record. The record stream itself (one
// record per line, comments already removed) and the checks' reactions are
// this design's own choices.
module peanut_loader
  import peanut_pkg::*;
#(
  parameter int unsigned WORDS = MEM_WORDS
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  enable,
  input  logic  rec_valid,
  input  rec_e  rec_kind,
  input  word_t rec_value,
  output logic  rec_ready,
  output logic  mem_we,
  output addr_t mem_addr,
  output word_t mem_wdata,
  output logic  go,
  output addr_t start_pc,
  output logic  error
);

  logic          start_seen, at_seen, in_image;
  logic [ADDR_W:0] ptr;          // next address to write; MSB = past the end
  logic          take, bad;

  assign rec_ready = enable;
  assign take      = rec_valid && rec_ready;

  // Rule check of the record on the inputs.
  always_comb begin
    bad = 1'b0;
    unique case (rec_kind)
      REC_START: bad = start_seen || (rec_value >= word_t'(WORDS));
      REC_AT:    bad = (rec_value >= word_t'(WORDS)) ||
                       (at_seen && ((ADDR_W+1)'(rec_value) < ptr));
      REC_DATA:  bad = !at_seen || (ptr >= (ADDR_W+1)'(WORDS));
      REC_END:   bad = !start_seen;
      default:   bad = 1'b1;
    endcase
  end

  assign mem_we    = take && rec_kind == REC_DATA && !bad;
  assign mem_addr  = ptr[ADDR_W-1:0];
  assign mem_wdata = rec_value;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_seen <= 1'b0;
      at_seen    <= 1'b0;
      in_image   <= 1'b0;
      ptr        <= '0;
      start_pc   <= '0;
      go         <= 1'b0;
      error      <= 1'b0;
    end else begin
      go <= 1'b0;
      if (take) begin
        in_image <= rec_kind != REC_END;
        if (!in_image)
          error <= bad;              // first record of a new image
        else if (bad)
          error <= 1'b1;
        unique case (rec_kind)
          REC_START: if (!bad) begin
            start_seen <= 1'b1;
            start_pc   <= rec_value[ADDR_W-1:0];
          end
          REC_AT: if (!bad) begin
            at_seen <= 1'b1;
            ptr     <= (ADDR_W+1)'(rec_value);
          end
          REC_DATA: if (!bad)
            ptr <= ptr + 1'b1;
          REC_END: begin
            go         <= !bad && !(in_image && error);
            start_seen <= 1'b0;
            at_seen    <= 1'b0;
            ptr        <= '0;
          end
          default: ;
        endcase
      end
    end
  end

endmodule
