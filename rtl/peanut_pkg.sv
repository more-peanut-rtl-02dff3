// peanut_pkg: types and constants shared by the PeANUt computer.
//
// The PeANUt is a 16-bit accumulator machine with a 1024-word memory.
// An instruction word is read from the top:
//   [15:13] addressing mode (000 immediate, 001 direct, 010 indirect,
//           011 indexed, 100 stack) for the memory-reference group
//   [12:10] operation of that group (001 load, 010 store, 011 add, 100 sub)
//   [9:0]   operand: an immediate value or a memory address
// Words whose top three bits are 101, 110 or 111 carry a 6-bit opcode in
// [15:10]; the two known ones are 101110 (and, direct) and 110101 (trap).
// These encodings are the ones printed in the machine-code examples. The
// control-word layout, the condition-flag set, the trap table and the
// loader record kinds are this design's own choices.
package peanut_pkg;

  localparam int unsigned WORD_W    = 16;
  localparam int unsigned ADDR_W    = 10;
  localparam int unsigned MEM_WORDS = 1 << ADDR_W;   // 1024, cells 0..1023
  localparam int unsigned TRAP_W    = 10;
  localparam int unsigned CHAR_W    = 8;

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // Addressing modes, instruction bits [15:13].
  typedef enum logic [2:0] {
    MODE_IMM  = 3'b000,
    MODE_DIR  = 3'b001,
    MODE_IND  = 3'b010,
    MODE_IDX  = 3'b011,
    MODE_STK  = 3'b100,
    MODE_G5   = 3'b101,
    MODE_G6   = 3'b110,
    MODE_G7   = 3'b111
  } mode_e;

  // Memory-reference operations, instruction bits [12:10].
  localparam logic [2:0] OP_LOAD  = 3'b001;
  localparam logic [2:0] OP_STORE = 3'b010;
  localparam logic [2:0] OP_ADD   = 3'b011;
  localparam logic [2:0] OP_SUB   = 3'b100;

  // Six-bit opcodes, instruction bits [15:10].
  localparam logic [5:0] OPC_AND_DIR = 6'b101110;
  localparam logic [5:0] OPC_TRAP    = 6'b110101;

  // Trap numbers.
  localparam logic [TRAP_W-1:0] TRAP_HALT = 10'd1;
  localparam logic [TRAP_W-1:0] TRAP_PUT  = 10'd3;

  typedef enum logic [1:0] {
    ALU_PASS = 2'd0,   // y = b            (load)
    ALU_ADD  = 2'd1,   // y = a + b
    ALU_SUB  = 2'd2,   // y = a - b
    ALU_AND  = 2'd3    // y = a & b
  } alu_op_e;

  // Condition code register contents.
  typedef struct packed {
    logic n;   // result negative
    logic z;   // result zero
    logic v;   // signed overflow
    logic c;   // carry out (add) / no borrow (sub)
  } cc_t;

  // Address adder: base and offset selects.
  typedef enum logic [1:0] {
    BASE_PC  = 2'd0,
    BASE_CI  = 2'd1,
    BASE_MDR = 2'd2
  } addr_base_e;

  typedef enum logic [1:0] {
    OFF_ZERO = 2'd0,
    OFF_XR   = 2'd1,
    OFF_SP   = 2'd2
  } addr_off_e;

  // Second ALU operand.
  typedef enum logic {
    ALUB_MDR = 1'b0,
    ALUB_IMM = 1'b1
  } alu_b_e;

  // MDR source.
  typedef enum logic {
    MDR_FROM_MEM = 1'b0,
    MDR_FROM_AC  = 1'b1
  } mdr_src_e;

  // One cycle's register transfers, driven by the control unit.
  typedef struct packed {
    logic       init;       // start of a program: PC <- start, others <- 0
    logic       mar_ld;     // MAR <- address adder
    addr_base_e addr_base;
    addr_off_e  addr_off;
    logic       mdr_ld;     // MDR <- memory data or AC
    mdr_src_e   mdr_src;
    logic       ci_ld;      // CI <- MDR
    logic       pc_inc;     // PC <- PC + 1
    logic       ac_ld;      // AC <- ALU result
    logic       cc_ld;      // CC <- ALU flags
    alu_op_e    alu_op;
    alu_b_e     alu_b;
    logic       mem_rd;     // Read, Enable
    logic       mem_wr;     // Write, Enable
  } ctrl_t;

  // Actions the exception unit's table can give.
  typedef enum logic [1:0] {
    ACT_UNDEF = 2'd0,
    ACT_HALT  = 2'd1,
    ACT_PUT   = 2'd2
  } trap_act_e;

  // Why the machine stopped.
  typedef enum logic [1:0] {
    STOP_NONE    = 2'd0,   // still running, or never started
    STOP_HALT    = 2'd1,   // trap 1
    STOP_ILLEGAL = 2'd2,   // undefined instruction word
    STOP_BADTRAP = 2'd3    // trap number with no table entry
  } stop_e;

  // Loader record kinds: one record per line of an initialisation file.
  typedef enum logic [1:0] {
    REC_START = 2'd0,   // START <address>
    REC_AT    = 2'd1,   // AT <address>
    REC_DATA  = 2'd2,   // one 16-bit data value
    REC_END   = 2'd3    // end of the image: run the program
  } rec_e;

endpackage
