// aes_ext: modified-S-box AES with dynamic key, transmitter and receiver
// joined back to back.
//
// aesin carries FRAMES = 4 plaintext frames of 16 bytes (512 bits), frame
// f in bits [128f +: 128], frame 0 first in the sequence. The transmitter
// encrypts every frame under its own key, the agreed key keyin with every
// byte raised by the frame's sequence number; the receiver regenerates the
// same keys from the order the ciphertext arrives in and decrypts, so
// aesout returns aesin. The ciphertext between the two is brought out on
// cipher/cipher_valid, since in use the two halves sit at the two ends of
// a link.
//
// Timing: a group accepted with in_valid appears on cipher 11 cycles later
// and on aesout 22 cycles later, with out_valid; one group per clock.
// keyin is taken while rst is high (both ends must agree on it before any
// data is sent). keyout is the transmitter's key for the latest frame it
// took in. The port names and widths aesin/keyin/clk/rst/aesout/keyout
// follow the design's top level; in_valid, out_valid, cipher and
// cipher_valid are this design's additions.
module aes_ext #(
  parameter int unsigned FRAMES = 4,
  parameter logic [3:0]  C      = 4'h3
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic [128*FRAMES-1:0] aesin,
  input  aes_pkg::key_t         keyin,
  output logic                  out_valid,
  output logic [128*FRAMES-1:0] aesout,
  output aes_pkg::key_t         keyout,
  output logic                  cipher_valid,
  output logic [128*FRAMES-1:0] cipher
);
  import aes_pkg::*;

  // The receiver's key output stays unconnected on purpose: keyout
  // reports the transmitter's sequence, and the receiver's runs in step
  // with it one pipeline later.
  key_t rx_keyout;

  aes_tx #(.FRAMES(FRAMES), .C(C)) u_tx (
    .clk(clk), .rst(rst), .in_valid(in_valid), .plain(aesin), .keyin(keyin),
    .out_valid(cipher_valid), .cipher(cipher), .keyout(keyout));

  aes_rx #(.FRAMES(FRAMES), .C(C)) u_rx (
    .clk(clk), .rst(rst), .in_valid(cipher_valid), .cipher(cipher),
    .keyin(keyin), .out_valid(out_valid), .plain(aesout),
    .keyout(rx_keyout));

endmodule
