// sub_bytes: SubBytes (INVERSE=0) or InvSubBytes (INVERSE=1) on a
// 128-bit block, built from the modified 4-bit S-box.
//
// Each byte is split into its left-most and right-most four bits and each
// nibble goes through its own sbox4, so one byte costs two 16-entry
// substitutions instead of one 256-entry table. C is the affine constant
// of the S-box. Combinational.
module sub_bytes #(
  parameter logic [3:0] C       = 4'h3,
  parameter bit         INVERSE = 1'b0
) (
  input  aes_pkg::block_t din,
  output aes_pkg::block_t dout
);
  for (genvar n = 0; n < 32; n++) begin : g_nib
    sbox4 #(.C(C), .INVERSE(INVERSE)) u_sbox (
      .a(din[4*n +: 4]),
      .y(dout[4*n +: 4])
    );
  end
endmodule
