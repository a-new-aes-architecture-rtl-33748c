// sbox4: the modified one-dimensional 4-bit S-box and its inverse.
//
// Forward (INVERSE=0): y = A * inv(x) + C over GF(2), where inv() is the
// multiplicative inverse in GF(2^4) with the irreducible polynomial
// x^4+x+1 (inv(0)=0), A is the circulant 4x4 matrix with rows 1011, 1101,
// 1110, 0111, i.e. y[i] = b[i] ^ b[(i+2)%4] ^ b[(i+3)%4] ^ C[i], and C is a
// 4-bit constant. For C=3 this gives the table
//   x : 0 1 2 3 4 5 6 7 8 9 A B C D E F
//   y : 3 4 F B 2 1 7 0 C D 5 9 6 E A 8
// Inverse (INVERSE=1): x = inv(A^-1 * (y ^ C)), where A^-1 has rows 1110,
// 0111, 1011, 1101: b[i] = c[i] ^ c[(i+1)%4] ^ c[(i+2)%4].
// The field, polynomial, matrix and the constants that leave no fixed
// point (3, 8, 10, 13, 15) follow the method this design is built on; the
// parameter default C=3 is its worked case. Using the S-box on the two
// nibbles of a byte is done one level up, in sub_bytes.
// Purely combinational, no clock.
module sbox4 #(
  parameter logic [3:0] C       = 4'h3,
  parameter bit         INVERSE = 1'b0
) (
  input  logic [3:0] a,
  output logic [3:0] y
);
  // Multiplicative inverse in GF(2^4) mod x^4+x+1, as a 16-entry table.
  function automatic logic [3:0] gf16_inv(input logic [3:0] val);
    logic [3:0] r;
    case (val)
      4'h0: r = 4'h0;  4'h1: r = 4'h1;  4'h2: r = 4'h9;  4'h3: r = 4'he;
      4'h4: r = 4'hd;  4'h5: r = 4'hb;  4'h6: r = 4'h7;  4'h7: r = 4'h6;
      4'h8: r = 4'hf;  4'h9: r = 4'h2;  4'ha: r = 4'hc;  4'hb: r = 4'h5;
      4'hc: r = 4'ha;  4'hd: r = 4'h4;  4'he: r = 4'h3;  default: r = 4'h8;
    endcase
    return r;
  endfunction

  logic [3:0] b, c;

  always_comb begin
    if (!INVERSE) begin
      b = gf16_inv(a);
      for (int i = 0; i < 4; i++)
        c[i] = b[i] ^ b[(i+2)%4] ^ b[(i+3)%4];
      y = c ^ C;
    end else begin
      c = a ^ C;
      for (int i = 0; i < 4; i++)
        b[i] = c[i] ^ c[(i+1)%4] ^ c[(i+2)%4];
      y = gf16_inv(b);
    end
  end
endmodule
