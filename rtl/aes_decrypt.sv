// aes_decrypt: AES-128 decryption (inverse cipher) with the modified
// S-box, fully pipelined.
//
// The receiver knows only the cipher key of a frame, while decryption needs
// the round keys in reverse order. Stage 0 therefore runs the key schedule
// forward through NR combinational key_step instances to get the last round
// key, and registers ciphertext ^ last round key together with that key.
// Stages 1..NR are dec_round instances, which step the schedule back one
// round key per stage. Plaintext leaves NR+1 = 11 clock edges after the
// ciphertext enters, one block per clock.
module aes_decrypt #(
  parameter logic [3:0] C = 4'h3
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            in_valid,
  input  aes_pkg::block_t cipher,
  input  aes_pkg::key_t   key,
  output logic            out_valid,
  output aes_pkg::block_t plain
);
  import aes_pkg::*;

  key_t   ks [NR+1];     // forward key schedule, combinational
  logic   v  [NR+1];
  block_t s  [NR+1];
  key_t   k  [NR+1];
  block_t s0;

  assign ks[0] = key;
  for (genvar r = 1; r <= NR; r++) begin : g_sched
    key_step #(.C(C), .INVERSE(1'b0)) u_step (
      .kin(ks[r-1]), .round(4'(r)), .kout(ks[r]));
  end

  add_round_key u_ark0 (.din(cipher), .rkey(ks[NR]), .dout(s0));

  always_ff @(posedge clk) begin
    if (rst) v[0] <= 1'b0;
    else     v[0] <= in_valid;
    if (in_valid) begin
      s[0] <= s0;
      k[0] <= ks[NR];
    end
  end

  // Stage i undoes round NR-i+1 and leaves round key NR-i added.
  for (genvar i = 1; i <= NR; i++) begin : g_round
    dec_round #(.C(C), .ROUND(NR - i)) u_round (
      .clk(clk), .rst(rst),
      .in_valid(v[i-1]), .in_state(s[i-1]), .in_key(k[i-1]),
      .out_valid(v[i]), .out_state(s[i]), .out_key(k[i]));
  end

  assign out_valid = v[NR];
  assign plain     = s[NR];
endmodule
