// key_step: one step of the AES-128 key schedule, forwards or backwards.
//
// Forward (INVERSE=0) turns round key i-1 into round key i:
//   w0' = w0 ^ SubWord(RotWord(w3)) ^ Rcon(i), w1' = w1 ^ w0',
//   w2' = w2 ^ w1', w3' = w3 ^ w2'.
// Backward (INVERSE=1) turns round key i back into round key i-1 by
// undoing those XORs, which lets the decryption pipeline walk the schedule
// from the last round key down to the cipher key without storing it.
// SubWord uses the modified S-box (both nibbles of each byte through
// sbox4 with constant C), the same substitution as the data path.
// `round` is i, 1..10. Combinational.
module key_step #(
  parameter logic [3:0] C       = 4'h3,
  parameter bit         INVERSE = 1'b0
) (
  input  aes_pkg::key_t   kin,
  input  logic [3:0]      round,
  output aes_pkg::key_t   kout
);
  import aes_pkg::*;

  logic [31:0] w0, w1, w2, w3, n0, n1, n2, n3, rot, sub, t;

  // RotWord of the last word of round key i-1. Going backwards that word
  // is recovered first as w3 ^ w2 of round key i.
  assign t   = INVERSE ? (kin[31:0] ^ kin[63:32]) : kin[31:0];
  assign rot = {t[23:0], t[31:24]};

  for (genvar n = 0; n < 8; n++) begin : g_sub
    sbox4 #(.C(C), .INVERSE(1'b0)) u_sbox (.a(rot[4*n +: 4]), .y(sub[4*n +: 4]));
  end

  always_comb begin
    {w0, w1, w2, w3} = kin;
    if (!INVERSE) begin
      n0 = w0 ^ sub ^ {rcon(round), 24'h0};
      n1 = w1 ^ n0;
      n2 = w2 ^ n1;
      n3 = w3 ^ n2;
    end else begin
      n3 = w3 ^ w2;
      n2 = w2 ^ w1;
      n1 = w1 ^ w0;
      n0 = w0 ^ sub ^ {rcon(round), 24'h0};
    end
    kout = {n0, n1, n2, n3};
  end
endmodule
