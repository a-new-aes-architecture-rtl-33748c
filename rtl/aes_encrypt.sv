// aes_encrypt: AES-128 encryption with the modified S-box, fully pipelined.
//
// Stage 0 registers plaintext ^ key (the initial AddRoundKey) and the key;
// stages 1..NR are enc_round instances, each computing its own round key on
// the fly. A block and its key enter in the cycle in_valid is high and the
// ciphertext leaves NR+1 = 11 clock edges later with out_valid; one block
// per clock. The pipeline registers are this design's choice; the round
// structure and the 128-bit block and key follow AES.
module aes_encrypt #(
  parameter logic [3:0] C = 4'h3
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            in_valid,
  input  aes_pkg::block_t plain,
  input  aes_pkg::key_t   key,
  output logic            out_valid,
  output aes_pkg::block_t cipher
);
  import aes_pkg::*;

  logic   v [NR+1];
  block_t s [NR+1];
  key_t   k [NR+1];
  block_t s0;

  add_round_key u_ark0 (.din(plain), .rkey(key), .dout(s0));

  always_ff @(posedge clk) begin
    if (rst) v[0] <= 1'b0;
    else     v[0] <= in_valid;
    if (in_valid) begin
      s[0] <= s0;
      k[0] <= key;
    end
  end

  for (genvar r = 1; r <= NR; r++) begin : g_round
    enc_round #(.C(C), .ROUND(r)) u_round (
      .clk(clk), .rst(rst),
      .in_valid(v[r-1]), .in_state(s[r-1]), .in_key(k[r-1]),
      .out_valid(v[r]), .out_state(s[r]), .out_key(k[r]));
  end

  assign out_valid = v[NR];
  assign cipher    = s[NR];
endmodule
