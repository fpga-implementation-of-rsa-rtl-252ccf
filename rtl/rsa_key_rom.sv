// rsa_key_rom: read-only key store of one RSA unit.
//
// Holds WORDS words of K bits: word 0 is the modulus n, word 1 the exponent
// (e for the encryption unit, d for the decryption unit). The read is
// synchronous, like an FPGA block RAM: 'data' shows the word at 'addr' one
// clock after addr is presented. The contents come from INIT_FILE, a text
// file of hexadecimal numbers, one K-bit word per line, read at elaboration.
//
// From the source design: two ROMs, one with (n, e) and one with (n, d), the
// keys being generated off-chip by software. This design's own choices: the
// word layout, the synchronous read and the file format. The default file
// holds a 1024-bit key pair made for this design (n = p*q with two 512-bit
// primes, e random with gcd(e, phi(n)) = 1, d = e^-1 mod phi(n)).
module rsa_key_rom #(
  parameter int unsigned K         = rsa_pkg::KEY_BITS,
  parameter int unsigned WORDS     = 2,
  parameter string       INIT_FILE = "rtl/rsa_pub_key.hex"
) (
  input  logic                     clk,
  input  logic [$clog2(WORDS)-1:0] addr,
  output logic [K-1:0]             data
);

  logic [K-1:0] mem [WORDS];

  initial $readmemh(INIT_FILE, mem);

  always_ff @(posedge clk) data <= mem[addr];

endmodule
