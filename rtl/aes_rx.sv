// aes_rx: the receiver. Takes groups of FRAMES ciphertext frames in the
// order they were sent (frame f in bits [128f +: 128]), regenerates each
// frame's key from the agreed key and the frame's place in the sequence
// with its own dyn_keygen, and decrypts the frames in FRAMES parallel
// aes_decrypt pipelines. Plaintext leaves NR+1 = 11 cycles after the
// ciphertext entered, with out_valid. keyout is the key of the latest
// frame taken in.
module aes_rx #(
  parameter int unsigned FRAMES = 4,
  parameter logic [3:0]  C      = 4'h3
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic [128*FRAMES-1:0] cipher,
  input  aes_pkg::key_t       keyin,
  output logic                out_valid,
  output logic [128*FRAMES-1:0] plain,
  output aes_pkg::key_t       keyout
);
  import aes_pkg::*;

  key_t fkey [FRAMES];
  logic lane_valid [FRAMES];

  dyn_keygen #(.FRAMES(FRAMES)) u_keygen (
    .clk(clk), .rst(rst), .keyin(keyin), .advance(in_valid),
    .frame_key(fkey), .last_key(keyout));

  for (genvar f = 0; f < FRAMES; f++) begin : g_lane
    aes_decrypt #(.C(C)) u_dec (
      .clk(clk), .rst(rst), .in_valid(in_valid),
      .cipher(cipher[128*f +: 128]), .key(fkey[f]),
      .out_valid(lane_valid[f]), .plain(plain[128*f +: 128]));
  end

  assign out_valid = lane_valid[0];
endmodule
