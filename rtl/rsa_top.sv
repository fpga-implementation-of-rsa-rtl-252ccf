// rsa_top: 1024-bit RSA encryption/decryption core for an e-passport chip.
//
// Two independent units stand side by side:
//   - the encryption unit computes cipher = plain^e mod n with the public key
//     (n, e) from its own ROM;
//   - the decryption unit computes plain = cipher^d mod n with the private
//     key (n, d) from a second ROM.
// Each unit is an rsa_crypt_unit: a key ROM, a square-and-multiply
// exponentiator and one bit-serial add-and-shift modular multiplier. The two
// may run at the same time. Feeding enc_cipher back into dec_cipher returns
// the original plain text.
//
// Interface per unit: pulse *_enb for one clock while the unit is idle;
// *_ready falls on that edge and rises when the result output is valid; the
// result stays until the next one. 'reset' is synchronous, active high.
// Inputs must be below n.
//
// Timing: one operation takes 4 + (K + w) * (K + 2) clocks, w being the
// number of 1 bits of the exponent; about 1.56 million clocks for a 1024-bit
// exponent with half its bits set.
//
// From the source design: the split into separate encryption and decryption
// modules with one key ROM each, K = 1024 and the algorithms. This design's
// own choices: the handshake, the key-file format and the key pair itself.
module rsa_top #(
  parameter int unsigned K             = rsa_pkg::KEY_BITS,
  parameter string       PUB_KEY_FILE  = "rtl/rsa_pub_key.hex",
  parameter string       PRIV_KEY_FILE = "rtl/rsa_priv_key.hex"
) (
  input  logic         clk,
  input  logic         reset,
  // encryption unit
  input  logic         enc_enb,
  input  logic [K-1:0] enc_plain,
  output logic [K-1:0] enc_cipher,
  output logic         enc_ready,
  // decryption unit
  input  logic         dec_enb,
  input  logic [K-1:0] dec_cipher,
  output logic [K-1:0] dec_plain,
  output logic         dec_ready
);

  rsa_crypt_unit #(.K(K), .KEY_FILE(PUB_KEY_FILE)) u_enc (
    .clk   (clk),
    .reset (reset),
    .enb   (enc_enb),
    .din   (enc_plain),
    .dout  (enc_cipher),
    .ready (enc_ready)
  );

  rsa_crypt_unit #(.K(K), .KEY_FILE(PRIV_KEY_FILE)) u_dec (
    .clk   (clk),
    .reset (reset),
    .enb   (dec_enb),
    .din   (dec_cipher),
    .dout  (dec_plain),
    .ready (dec_ready)
  );

endmodule
