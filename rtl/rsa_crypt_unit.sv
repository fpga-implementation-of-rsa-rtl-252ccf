// rsa_crypt_unit: one RSA encryption or decryption module, dout = din^x mod n,
// with the key pair (n, x) taken from its own key ROM.
//
// How it works: when 'enb' is pulsed the unit latches din, reads the modulus
// n (ROM word 0) and the exponent x (ROM word 1) from its rsa_key_rom, then
// starts rsa_modexp with them. The same module is the encryption unit when
// KEY_FILE holds (n, e) and the decryption unit when it holds (n, d).
//
// Interface: 'enb' is a one-clock pulse, honoured while idle. 'ready' falls
// on that clock edge and rises when 'dout' holds the result; dout stays valid
// until the next result. 'reset' is synchronous and active high. din must be
// below n.
//
// Timing: 3 clocks of key loading, then the exponentiation; ready rises
// 4 + (K + w) * (K + 2) clocks after the enb clock (w = number of 1 bits of
// the exponent).
//
// From the source design: separate encryption and decryption modules, each
// loading its key from a ROM, and the square-and-multiply core. This design's
// own choices: reading the key at every operation, the handshake and reset.
module rsa_crypt_unit
  import rsa_pkg::*;
#(
  parameter int unsigned K        = rsa_pkg::KEY_BITS,
  parameter string       KEY_FILE = "rtl/rsa_pub_key.hex"
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         enb,
  input  logic [K-1:0] din,
  output logic [K-1:0] dout,
  output logic         ready
);

  cu_state_e    state;
  logic [K-1:0] din_r, n_r;
  logic         rom_addr;
  logic [K-1:0] rom_data;
  logic         exp_start, exp_ready;

  assign rom_addr  = (state == CU_RD_EXP);
  assign exp_start = (state == CU_START);

  rsa_key_rom #(.K(K), .WORDS(2), .INIT_FILE(KEY_FILE)) u_rom (
    .clk  (clk),
    .addr (rom_addr),
    .data (rom_data)
  );

  rsa_modexp #(.K(K)) u_exp (
    .clk      (clk),
    .reset    (reset),
    .data_enb (exp_start),
    .indata   (din_r),
    .inexp    (rom_data),
    .inmod    (n_r),
    .cypher   (dout),
    .ready    (exp_ready)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= CU_IDLE;
      din_r <= '0;
      n_r   <= '0;
      ready <= 1'b0;
    end else begin
      unique case (state)
        CU_IDLE: if (enb) begin
          din_r <= din;
          ready <= 1'b0;
          state <= CU_RD_N;
        end
        CU_RD_N:   state <= CU_RD_EXP;
        CU_RD_EXP: begin
          n_r   <= rom_data;
          state <= CU_START;
        end
        CU_START:  state <= CU_RUN;
        CU_RUN: if (exp_ready) begin
          ready <= 1'b1;
          state <= CU_IDLE;
        end
        default: state <= CU_IDLE;
      endcase
    end
  end

  a_no_enb_while_busy : assert property (@(posedge clk) disable iff (reset)
      enb |-> state == CU_IDLE)
    else $error("rsa_crypt_unit: enb asserted while busy");

endmodule
