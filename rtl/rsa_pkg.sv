// Shared constants and state encodings of the RSA encryption/decryption core.
//
// KEY_BITS is the modulus length k of the design (1024 bits, the size chosen
// for e-passport active authentication). Every arithmetic block takes k as its
// parameter K and defaults to this value. The enums are the controller states
// of the exponentiator and of the key-loading unit; their encodings are this
// design's own choice.
package rsa_pkg;

  localparam int unsigned KEY_BITS = 1024;

  // Square-and-multiply sequencer (rsa_modexp)
  typedef enum logic [2:0] {
    EXP_IDLE,       // waiting for data_enb
    EXP_SQ_START,   // launch c*c mod n
    EXP_SQ_WAIT,    // wait for the square
    EXP_MUL_START,  // launch c*m mod n (exponent bit is 1)
    EXP_MUL_WAIT    // wait for the multiply
  } exp_state_e;

  // Key-loading front end of an encryption or decryption unit (rsa_crypt_unit)
  typedef enum logic [2:0] {
    CU_IDLE,     // waiting for enb
    CU_RD_N,     // ROM address 0 (modulus n) presented
    CU_RD_EXP,   // n on ROM output, ROM address 1 (exponent) presented
    CU_START,    // exponent on ROM output, start the exponentiator
    CU_RUN       // exponentiation in progress
  } cu_state_e;

endpackage
