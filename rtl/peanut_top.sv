// peanut_top: the PeANUt computer.
//
// A 16-bit accumulator machine: the processor (control unit plus the
// datapath of CI, PC, CC, SP, XR, AC, the ALU, the address adder, MAR and
// MDR), a 1024-word memory addressed through MAR and MDR, an exception
// unit that decides what each trap does, and an I/O unit that passes
// characters to the user. A loader places a program image in memory and
// starts the processor at the image's START address with every other
// register at zero.
//
// Interface:
//   rec_*        program image records (see peanut_loader); accepted only
//                while no program runs
//   load_error   the last image broke an image rule and was not started
//   out_*        character stream to the user (valid/ready), from trap 3
//   running      a program is executing
//   stopped, stop_cause  the program ended and why (halt, illegal word,
//                undefined trap)
//   pc, ac, cc, sp, xr  architectural state, for observation
//   instr_start  high in the first cycle of each instruction fetch
//   put_count    characters delivered to the user since reset
// Timing: see peanut_control; the loader takes one record per cycle.
module peanut_top
  import peanut_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // program image
  input  logic              rec_valid,
  input  rec_e              rec_kind,
  input  word_t             rec_value,
  output logic              rec_ready,
  output logic              load_error,
  // user output
  output logic              out_valid,
  output logic [CHAR_W-1:0] out_data,
  input  logic              out_ready,
  // status
  output logic              running,
  output logic              stopped,
  output stop_e             stop_cause,
  output addr_t             pc,
  output word_t             ac,
  output cc_t               cc,
  output word_t             sp,
  output word_t             xr,
  output logic              instr_start,
  output logic [15:0]       put_count
);

  ctrl_t             ctrl;
  word_t             ci, mdr;
  addr_t             mem_addr, ld_addr, start_pc;
  word_t             mem_wdata, mem_rdata, ld_data;
  logic              ld_we, go;
  logic              trap_req, illegal_req, put_valid, put_ready;
  logic [TRAP_W-1:0] trap_num;
  trap_act_e         trap_action;

  peanut_loader u_loader (
    .clk       (clk),
    .rst_n     (rst_n),
    .enable    (!running),
    .rec_valid (rec_valid),
    .rec_kind  (rec_kind),
    .rec_value (rec_value),
    .rec_ready (rec_ready),
    .mem_we    (ld_we),
    .mem_addr  (ld_addr),
    .mem_wdata (ld_data),
    .go        (go),
    .start_pc  (start_pc),
    .error     (load_error)
  );

  peanut_control u_control (
    .clk         (clk),
    .rst_n       (rst_n),
    .go          (go),
    .ci          (ci),
    .trap_req    (trap_req),
    .trap_num    (trap_num),
    .illegal_req (illegal_req),
    .trap_action (trap_action),
    .put_valid   (put_valid),
    .put_ready   (put_ready),
    .ctrl        (ctrl),
    .running     (running),
    .instr_start (instr_start)
  );

  peanut_datapath u_datapath (
    .clk       (clk),
    .rst_n     (rst_n),
    .ctrl      (ctrl),
    .start_pc  (start_pc),
    .mem_rdata (mem_rdata),
    .mem_addr  (mem_addr),
    .mem_wdata (mem_wdata),
    .ci        (ci),
    .pc        (pc),
    .cc        (cc),
    .sp        (sp),
    .xr        (xr),
    .ac        (ac),
    .mdr       (mdr)
  );

  peanut_memory u_memory (
    .clk     (clk),
    .addr    (mem_addr),
    .rd      (ctrl.mem_rd),
    .wr      (ctrl.mem_wr),
    .wdata   (mem_wdata),
    .rdata   (mem_rdata),
    .ld_we   (ld_we),
    .ld_addr (ld_addr),
    .ld_data (ld_data)
  );

  peanut_exception u_exception (
    .clk         (clk),
    .rst_n       (rst_n),
    .clear       (go),
    .trap_req    (trap_req),
    .trap_num    (trap_num),
    .illegal_req (illegal_req),
    .action      (trap_action),
    .stopped     (stopped),
    .stop_cause  (stop_cause)
  );

  peanut_io u_io (
    .clk       (clk),
    .rst_n     (rst_n),
    .put_valid (put_valid),
    .put_data  (mdr[CHAR_W-1:0]),
    .put_ready (put_ready),
    .out_valid (out_valid),
    .out_data  (out_data),
    .out_ready (out_ready),
    .put_count (put_count)
  );

endmodule
