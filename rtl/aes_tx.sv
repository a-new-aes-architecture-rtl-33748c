// aes_tx: the transmitter. A group of FRAMES 16-byte plaintext frames
// arrives per cycle on plain (frame f in bits [128f +: 128], frame 0 being
// the earliest in the sequence). dyn_keygen hands each frame its own
// sequence-derived key and FRAMES parallel aes_encrypt pipelines encrypt
// them. Ciphertext for a group leaves NR+1 = 11 cycles after it entered,
// in the same frame positions, with out_valid. keyout is the key of the
// latest frame taken in.
module aes_tx #(
  parameter int unsigned FRAMES = 4,
  parameter logic [3:0]  C      = 4'h3
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic [128*FRAMES-1:0] plain,
  input  aes_pkg::key_t       keyin,
  output logic                out_valid,
  output logic [128*FRAMES-1:0] cipher,
  output aes_pkg::key_t       keyout
);
  import aes_pkg::*;

  key_t fkey [FRAMES];
  logic lane_valid [FRAMES];

  dyn_keygen #(.FRAMES(FRAMES)) u_keygen (
    .clk(clk), .rst(rst), .keyin(keyin), .advance(in_valid),
    .frame_key(fkey), .last_key(keyout));

  for (genvar f = 0; f < FRAMES; f++) begin : g_lane
    aes_encrypt #(.C(C)) u_enc (
      .clk(clk), .rst(rst), .in_valid(in_valid),
      .plain(plain[128*f +: 128]), .key(fkey[f]),
      .out_valid(lane_valid[f]), .cipher(cipher[128*f +: 128]));
  end

  assign out_valid = lane_valid[0];
endmodule
