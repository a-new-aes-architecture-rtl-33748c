// dec_round: one registered round of the pipelined inverse cipher.
//
// Takes the state that has already had round key ROUND+1 added, together
// with round key ROUND+1 itself. It walks the key schedule one step back
// (key_step, INVERSE=1) to get round key ROUND, then applies InvShiftRows,
// InvSubBytes (inverse modified S-box), AddRoundKey with round key ROUND
// and, except when ROUND == 0, InvMixColumns. The result and round key
// ROUND are registered in the cycle in_valid is high. One round per cycle,
// a new block every cycle. rst clears only the valid bit.
module dec_round #(
  parameter logic [3:0]  C     = 4'h3,
  parameter int unsigned ROUND = 9
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            in_valid,
  input  aes_pkg::block_t in_state,
  input  aes_pkg::key_t   in_key,
  output logic            out_valid,
  output aes_pkg::block_t out_state,
  output aes_pkg::key_t   out_key
);
  import aes_pkg::*;

  localparam bit FIRST_KEY = (ROUND == 0);

  key_t   rk;
  block_t s_shift, s_sub, s_ark, s_mix;

  key_step #(.C(C), .INVERSE(1'b1)) u_key (
    .kin(in_key), .round(4'(ROUND + 1)), .kout(rk));
  shift_rows #(.INVERSE(1'b1)) u_shift (.din(in_state), .dout(s_shift));
  sub_bytes #(.C(C), .INVERSE(1'b1)) u_sub (.din(s_shift), .dout(s_sub));
  add_round_key u_ark (.din(s_sub), .rkey(rk), .dout(s_ark));
  mix_columns #(.INVERSE(1'b1)) u_mix (.din(s_ark), .dout(s_mix));

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
    if (in_valid) begin
      out_state <= FIRST_KEY ? s_ark : s_mix;
      out_key   <= rk;
    end
  end
endmodule
