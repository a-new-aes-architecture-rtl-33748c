// dyn_keygen: dynamic key generation from the frame sequence.
//
// Sender and receiver agree on one 128-bit key before any data moves. Each
// 16-byte frame is then encrypted under its own key: for the n-th frame of
// the session (n = 1, 2, ...) every one of the 16 key bytes is the agreed
// byte plus n, modulo 256 (K_j = k_j + 1 per frame, carried up the
// sequence). Sender and receiver each run one of these and, counting the
// frames they pass, produce the same key for the same frame.
//
// Interface: while rst is high the agreed key is taken from keyin and the
// frame count is cleared. Every cycle, frame_key[f] is the key of the f-th
// frame (f = 0 first) of a group of FRAMES frames that is handed over in
// that cycle; a cycle with advance high consumes the group and moves the
// count on by FRAMES. last_key is the key of the most recently consumed
// frame, registered (keyin right after reset). Because the increment is
// per byte modulo 256, an 8-bit frame count is all that is kept.
module dyn_keygen #(
  parameter int unsigned FRAMES = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  aes_pkg::key_t keyin,
  input  logic          advance,
  output aes_pkg::key_t frame_key [FRAMES],
  output aes_pkg::key_t last_key
);
  import aes_pkg::*;

  key_t       base_key;
  logic [7:0] count;      // frames consumed so far, modulo 256

  always_comb begin
    logic [7:0] inc;
    for (int f = 0; f < FRAMES; f++) begin
      inc = count + 8'(f + 1);
      for (int j = 0; j < 16; j++)
        frame_key[f][8*j +: 8] = base_key[8*j +: 8] + inc;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      base_key <= keyin;
      count    <= 8'h00;
      last_key <= keyin;
    end else if (advance) begin
      count    <= count + 8'(FRAMES);
      last_key <= frame_key[FRAMES-1];
    end
  end
endmodule
