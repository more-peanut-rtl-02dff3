// peanut_io: the I/O unit, which hands characters from the processor to the
// user.
//
// trap 3 (put) sends the character held in the low byte of the
// accumulator, passed on through MDR, to the user. This unit holds one
// character in an output register. The processor side offers a character
// with put_valid and it is taken in a cycle where put_ready is high; the
// user side is a valid/ready stream (out_valid, out_data, out_ready) and a
// character leaves in a cycle where both are high. The register can take a
// new character in the same cycle the old one leaves, so a user that is
// always ready receives one character per put without delay, and a user
// that holds out_ready low makes the processor wait. The buffer depth and
// the handshake are this design's own choices; put_count counts characters
// delivered, modulo 2^16.
module peanut_io
  import peanut_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // processor side
  input  logic              put_valid,
  input  logic [CHAR_W-1:0] put_data,
  output logic              put_ready,
  // user side
  output logic              out_valid,
  output logic [CHAR_W-1:0] out_data,
  input  logic              out_ready,
  output logic [15:0]       put_count
);

  assign put_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      put_count <= '0;
    end else begin
      if (out_valid && out_ready)
        put_count <= put_count + 16'd1;
      if (put_valid && put_ready) begin
        out_valid <= 1'b1;
        out_data  <= put_data;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  // Once offered, a character stays on the output until it is taken.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
