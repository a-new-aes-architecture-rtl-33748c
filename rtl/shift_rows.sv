// shift_rows: ShiftRows (INVERSE=0) or InvShiftRows (INVERSE=1).
//
// Row r of the 4x4 byte state is rotated left (InvShiftRows: right) by r
// positions; row 0 stays. State byte (row r, column c) is byte 4c+r of the
// block in FIPS-197 order. A pure permutation of wires.
module shift_rows #(
  parameter bit INVERSE = 1'b0
) (
  input  aes_pkg::block_t din,
  output aes_pkg::block_t dout
);
  always_comb begin
    int sc;
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        // destination (r,c) takes source (r, c+r), or (r, c-r) when inverse
        sc = INVERSE ? (c + 4 - r) % 4 : (c + r) % 4;
        dout[127-8*(4*c+r) -: 8] = din[127-8*(4*sc+r) -: 8];
      end
    end
  end
endmodule
