// enc_round: one registered encryption round of the pipelined cipher.
//
// In the cycle in_valid is high it takes the state after round ROUND-1
// and round key ROUND-1, derives round key ROUND with key_step, applies
// SubBytes (modified S-box), ShiftRows, MixColumns (left out when
// ROUND == NR, the final round) and AddRoundKey, and registers the new
// state and the new round key. One round per cycle, a new block every
// cycle; the round key travels with its block, so blocks with different
// keys can follow each other back to back. rst clears only the valid bit.
module enc_round #(
  parameter logic [3:0]  C     = 4'h3,
  parameter int unsigned ROUND = 1
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

  localparam bit LAST = (ROUND == NR);

  key_t   rk;
  block_t s_sub, s_shift, s_mix, s_next;

  key_step #(.C(C), .INVERSE(1'b0)) u_key (
    .kin(in_key), .round(4'(ROUND)), .kout(rk));
  sub_bytes #(.C(C), .INVERSE(1'b0)) u_sub (.din(in_state), .dout(s_sub));
  shift_rows #(.INVERSE(1'b0)) u_shift (.din(s_sub), .dout(s_shift));
  mix_columns #(.INVERSE(1'b0)) u_mix (.din(s_shift), .dout(s_mix));
  add_round_key u_ark (.din(LAST ? s_shift : s_mix), .rkey(rk), .dout(s_next));

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
    if (in_valid) begin
      out_state <= s_next;
      out_key   <= rk;
    end
  end
endmodule
