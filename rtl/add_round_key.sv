// add_round_key: AddRoundKey, the bitwise XOR of the 128-bit working state
// with the 128-bit round key. Its own inverse, so it serves encryption and
// decryption alike. Combinational.
module add_round_key (
  input  aes_pkg::block_t din,
  input  aes_pkg::key_t   rkey,
  output aes_pkg::block_t dout
);
  assign dout = din ^ rkey;
endmodule
