// peanut_exception: the exception unit, with its trap table.
//
// When the control unit decodes a trap instruction it presents the trap
// number (CI[9..0]) with trap_req. The number selects an entry of a table,
// whose action is returned combinationally: halt for trap 1, put for
// trap 3, as the example programs use them. Any other number has no entry
// (ACT_UNDEF). The unit also receives illegal_req for an instruction word
// the control unit cannot decode. A halt, an illegal instruction or an
// undefined trap stops the machine: the unit then records why
// (stop_cause) and raises stopped until the next program start (clear).
// The table's role and the two entries follow the trap numbers of the
// example programs; the table size (TABLE_SIZE entries, higher numbers
// undefined; TABLE_SIZE a power of two of at least 4) and the stop
// recording are this design's own choices.
module peanut_exception
  import peanut_pkg::*;
#(
  parameter int unsigned TABLE_SIZE = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,        // program start
  input  logic              trap_req,
  input  logic [TRAP_W-1:0] trap_num,
  input  logic              illegal_req,
  output trap_act_e         action,
  output logic              stopped,
  output stop_e             stop_cause
);

  localparam int unsigned IW = $clog2(TABLE_SIZE);

  trap_act_e table_q [TABLE_SIZE];

  always_comb begin
    for (int unsigned i = 0; i < TABLE_SIZE; i++)
      table_q[i] = ACT_UNDEF;
    table_q[TRAP_HALT[IW-1:0]] = ACT_HALT;
    table_q[TRAP_PUT[IW-1:0]]  = ACT_PUT;
  end

  always_comb begin
    if (trap_num < TRAP_W'(TABLE_SIZE))
      action = table_q[trap_num[IW-1:0]];
    else
      action = ACT_UNDEF;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stopped    <= 1'b0;
      stop_cause <= STOP_NONE;
    end else if (clear) begin
      stopped    <= 1'b0;
      stop_cause <= STOP_NONE;
    end else if (!stopped) begin
      if (illegal_req) begin
        stopped    <= 1'b1;
        stop_cause <= STOP_ILLEGAL;
      end else if (trap_req && action == ACT_HALT) begin
        stopped    <= 1'b1;
        stop_cause <= STOP_HALT;
      end else if (trap_req && action == ACT_UNDEF) begin
        stopped    <= 1'b1;
        stop_cause <= STOP_BADTRAP;
      end
    end
  end

endmodule
