// mix_columns: MixColumns (INVERSE=0) or InvMixColumns (INVERSE=1).
//
// Each 4-byte column is multiplied in GF(2^8) (x^8+x^4+x^3+x+1) by the
// circulant matrix {02,03,01,01} or, for the inverse, {0e,0b,0d,09}, as
// in standard AES. Combinational.
module mix_columns #(
  parameter bit INVERSE = 1'b0
) (
  input  aes_pkg::block_t din,
  output aes_pkg::block_t dout
);
  import aes_pkg::*;

  localparam byte_t M0 = INVERSE ? 8'h0e : 8'h02;
  localparam byte_t M1 = INVERSE ? 8'h0b : 8'h03;
  localparam byte_t M2 = INVERSE ? 8'h0d : 8'h01;
  localparam byte_t M3 = INVERSE ? 8'h09 : 8'h01;

  always_comb begin
    byte_t s [4];
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) s[r] = din[127-8*(4*c+r) -: 8];
      for (int r = 0; r < 4; r++)
        dout[127-8*(4*c+r) -: 8] = gmul(s[r], M0) ^ gmul(s[(r+1)%4], M1)
                                 ^ gmul(s[(r+2)%4], M2) ^ gmul(s[(r+3)%4], M3);
    end
  end
endmodule
