// peanut_control: the control unit of the PeANUt, a fetch-decode-execute
// state machine.
//
// Every instruction starts with a fetch: MAR <- PC; Read, Enable;
// MDR <- memory; CI <- MDR and PC <- PC + 1. The decode cycle then starts
// the transfers of the instruction, following the register-transfer
// sequences of the instruction set:
//   immediate load/add/sub   AC <- ALU(AC, CI[9..0])
//   direct (and indexed, stack) load/add/sub/and
//                            MAR <- CI[9..0] (+XR, +SP); Read, Enable;
//                            MDR <- memory; AC <- ALU(AC, MDR)
//   indirect                 as direct, then MAR <- MDR[9..0]; Read,
//                            Enable; MDR <- memory; AC <- ALU(AC, MDR)
//   store                    MAR <- effective address; MDR <- AC;
//                            Write, Enable
//   trap                     the exception unit looks the number up:
//                            halt stops, put sends AC to the I/O unit
//                            through MDR and waits until it is taken
// An undecodable word is reported to the exception unit, which stops the
// machine. A go pulse from the loader starts a program: all registers are
// initialised (PC from the image) and fetching begins.
//
// Timing (cycles from the fetch of one instruction to the next): immediate
// 5, direct or indexed or stack operand 8, indirect operand 11, direct store
// 6, indirect store 9, put 6 plus any wait for the user. The cycle split is
// this design's own choice: one register transfer step per cycle, with
// MAR and MDR loads that do not depend on each other merged in one cycle.
// Condition flags are written by every load, add, sub and and. Indexed
// and stack addresses as CI[9..0] + XR and CI[9..0] + SP are also this
// design's reading of the mode names.
module peanut_control
  import peanut_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              go,
  input  word_t             ci,
  // exception unit
  output logic              trap_req,
  output logic [TRAP_W-1:0] trap_num,
  output logic              illegal_req,
  input  trap_act_e         trap_action,
  // I/O unit
  output logic              put_valid,
  input  logic              put_ready,
  // datapath
  output ctrl_t             ctrl,
  // status
  output logic              running,
  output logic              instr_start
);

  typedef enum logic [3:0] {
    S_IDLE, S_F_MAR, S_F_RD, S_F_MDR, S_F_CI, S_DECODE,
    S_OP_RD, S_OP_MDR, S_IND_MAR, S_EXEC, S_ST_WR, S_PUT, S_STOP
  } state_e;

  state_e state, state_n;
  logic   ind_pending, ind_pending_n;

  // Decode of the current instruction.
  mode_e     mode;
  logic [2:0] op;
  logic      d_illegal, d_trap, d_store, d_imm, d_ind;
  alu_op_e   d_alu;
  addr_off_e d_off;

  always_comb begin
    mode      = mode_e'(ci[15:13]);
    op        = ci[12:10];
    d_illegal = 1'b0;
    d_trap    = 1'b0;
    d_store   = 1'b0;
    d_imm     = 1'b0;
    d_ind     = 1'b0;
    d_alu     = ALU_PASS;
    d_off     = OFF_ZERO;
    if (ci[15:10] == OPC_AND_DIR) begin
      d_alu = ALU_AND;
    end else if (ci[15:10] == OPC_TRAP) begin
      d_trap = 1'b1;
    end else if (mode inside {MODE_IMM, MODE_DIR, MODE_IND, MODE_IDX, MODE_STK}) begin
      d_imm = (mode == MODE_IMM);
      d_ind = (mode == MODE_IND);
      d_off = (mode == MODE_IDX) ? OFF_XR :
              (mode == MODE_STK) ? OFF_SP : OFF_ZERO;
      unique case (op)
        OP_LOAD:  d_alu = ALU_PASS;
        OP_ADD:   d_alu = ALU_ADD;
        OP_SUB:   d_alu = ALU_SUB;
        OP_STORE: begin
          d_store   = 1'b1;
          d_illegal = (mode == MODE_IMM);
        end
        default:  d_illegal = 1'b1;
      endcase
    end else begin
      d_illegal = 1'b1;
    end
  end

  assign trap_num = ci[TRAP_W-1:0];

  always_comb begin
    ctrl          = '0;
    ctrl.alu_op   = d_alu;
    state_n       = state;
    ind_pending_n = ind_pending;
    trap_req      = 1'b0;
    illegal_req   = 1'b0;
    put_valid     = 1'b0;
    unique case (state)
      S_IDLE, S_STOP: if (go) begin
        ctrl.init = 1'b1;
        state_n   = S_F_MAR;
      end
      S_F_MAR: begin
        ctrl.mar_ld    = 1'b1;
        ctrl.addr_base = BASE_PC;
        ctrl.addr_off  = OFF_ZERO;
        state_n        = S_F_RD;
      end
      S_F_RD: begin
        ctrl.mem_rd = 1'b1;
        state_n     = S_F_MDR;
      end
      S_F_MDR: begin
        ctrl.mdr_ld  = 1'b1;
        ctrl.mdr_src = MDR_FROM_MEM;
        state_n      = S_F_CI;
      end
      S_F_CI: begin
        ctrl.ci_ld  = 1'b1;
        ctrl.pc_inc = 1'b1;
        state_n     = S_DECODE;
      end
      S_DECODE: begin
        if (d_illegal) begin
          illegal_req = 1'b1;
          state_n     = S_STOP;
        end else if (d_trap) begin
          trap_req = 1'b1;
          if (trap_action == ACT_PUT) begin
            ctrl.mdr_ld  = 1'b1;
            ctrl.mdr_src = MDR_FROM_AC;
            state_n      = S_PUT;
          end else begin
            state_n = S_STOP;
          end
        end else if (d_imm) begin
          ctrl.ac_ld = 1'b1;
          ctrl.cc_ld = 1'b1;
          ctrl.alu_b = ALUB_IMM;
          state_n    = S_F_MAR;
        end else begin
          ctrl.mar_ld    = 1'b1;
          ctrl.addr_base = BASE_CI;
          ctrl.addr_off  = d_off;
          ind_pending_n  = d_ind;
          if (d_store && !d_ind) begin
            ctrl.mdr_ld  = 1'b1;
            ctrl.mdr_src = MDR_FROM_AC;
            state_n      = S_ST_WR;
          end else begin
            state_n = S_OP_RD;
          end
        end
      end
      S_OP_RD: begin
        ctrl.mem_rd = 1'b1;
        state_n     = S_OP_MDR;
      end
      S_OP_MDR: begin
        ctrl.mdr_ld  = 1'b1;
        ctrl.mdr_src = MDR_FROM_MEM;
        state_n      = ind_pending ? S_IND_MAR : S_EXEC;
      end
      S_IND_MAR: begin
        ctrl.mar_ld    = 1'b1;
        ctrl.addr_base = BASE_MDR;
        ctrl.addr_off  = OFF_ZERO;
        ind_pending_n  = 1'b0;
        if (d_store) begin
          ctrl.mdr_ld  = 1'b1;
          ctrl.mdr_src = MDR_FROM_AC;
          state_n      = S_ST_WR;
        end else begin
          state_n = S_OP_RD;
        end
      end
      S_EXEC: begin
        ctrl.ac_ld = 1'b1;
        ctrl.cc_ld = 1'b1;
        ctrl.alu_b = ALUB_MDR;
        state_n    = S_F_MAR;
      end
      S_ST_WR: begin
        ctrl.mem_wr = 1'b1;
        state_n     = S_F_MAR;
      end
      S_PUT: begin
        put_valid = 1'b1;
        if (put_ready)
          state_n = S_F_MAR;
      end
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      ind_pending <= 1'b0;
    end else begin
      state       <= state_n;
      ind_pending <= ind_pending_n;
    end
  end

  assign running     = !(state inside {S_IDLE, S_STOP});
  assign instr_start = (state == S_F_MAR);

endmodule
