// aes_pkg: types, sizes and GF(2^8) helpers shared by the AES datapath.
// The 128-bit block is held as a flat vector in the FIPS-197 byte order:
// byte 0 (state row 0, column 0) is bits [127:120], and bytes run down
// each column first. The GF(2^8) arithmetic used by MixColumns is the
// standard AES field (x^8+x^4+x^3+x+1); only the S-box differs from
// standard AES in this design.
package aes_pkg;
  localparam int unsigned BLOCK_BITS = 128;
  localparam int unsigned KEY_BITS   = 128;
  localparam int unsigned NR         = 10;   // rounds for a 128-bit key

  typedef logic [BLOCK_BITS-1:0] block_t;
  typedef logic [KEY_BITS-1:0]   key_t;
  typedef logic [7:0]            byte_t;

  // Round constants of the AES-128 key schedule, x^(round-1) in GF(2^8),
  // round 1..10.
  function automatic byte_t rcon(input logic [3:0] round);
    byte_t r;
    case (round)
      4'd1:    r = 8'h01;
      4'd2:    r = 8'h02;
      4'd3:    r = 8'h04;
      4'd4:    r = 8'h08;
      4'd5:    r = 8'h10;
      4'd6:    r = 8'h20;
      4'd7:    r = 8'h40;
      4'd8:    r = 8'h80;
      4'd9:    r = 8'h1b;
      4'd10:   r = 8'h36;
      default: r = 8'h00;
    endcase
    return r;
  endfunction

  // Multiply by x in GF(2^8).
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) product, used with small constants only.
  function automatic byte_t gmul(input byte_t a, input byte_t b);
    byte_t p, x;
    p = 8'h00;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ x;
      x = xtime(x);
    end
    return p;
  endfunction

  // Byte n (0..15) of a block in FIPS-197 order.
  function automatic byte_t get_byte(input block_t b, input int unsigned n);
    return b[BLOCK_BITS-1-8*n -: 8];
  endfunction
endpackage
