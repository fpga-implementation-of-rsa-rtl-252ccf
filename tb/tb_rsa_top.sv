// End-to-end testbench of rsa_top at its default size (K = 1024, default key
// ROMs).
//
//   1. encrypt the message 0x11;
//   2. decrypt that cipher text while the encryption unit encrypts a second,
//      random 1016-bit message (both units busy at once);
//   3. decrypt the second cipher text.
// Cipher texts are compared with reference exponentiations computed with the
// simulator's wide arithmetic from the key words; decryptions must return the
// messages; each operation's latency must be 4 + (K + w) * (K + 2) clocks.
// The testbench also counts how often each mechanism of the design ran: key
// loads from each ROM, modular squarings, modular multiplications (exponent
// bit 1), squarings not followed by a multiply (exponent bit 0) and clocks
// with both units busy. Each must occur, and the squaring and multiplication
// counts must equal K and the exponent weight per operation.
module tb_rsa_top;

  import rsa_pkg::*;

  localparam int unsigned K = rsa_pkg::KEY_BITS;

  logic clk = 1'b0;
  logic reset;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic         enc_enb, enc_ready, dec_enb, dec_ready;
  logic [K-1:0] enc_plain, enc_cipher, dec_cipher, dec_plain;

  rsa_top dut (
    .clk(clk), .reset(reset),
    .enc_enb(enc_enb), .enc_plain(enc_plain), .enc_cipher(enc_cipher), .enc_ready(enc_ready),
    .dec_enb(dec_enb), .dec_cipher(dec_cipher), .dec_plain(dec_plain), .dec_ready(dec_ready)
  );

  // mechanism counters
  int enc_key_loads = 0, dec_key_loads = 0;
  int squares = 0, multiplies = 0, both_busy = 0;
  always @(posedge clk) if (!reset) begin
    if (dut.u_enc.state == CU_RD_EXP) enc_key_loads++;
    if (dut.u_dec.state == CU_RD_EXP) dec_key_loads++;
    if (dut.u_enc.u_exp.state == EXP_SQ_START) squares++;
    if (dut.u_dec.u_exp.state == EXP_SQ_START) squares++;
    if (dut.u_enc.u_exp.state == EXP_MUL_START) multiplies++;
    if (dut.u_dec.u_exp.state == EXP_MUL_START) multiplies++;
    if (dut.u_enc.state == CU_RUN && dut.u_dec.state == CU_RUN) both_busy++;
  end

  function automatic logic [K-1:0] powmod(logic [K-1:0] b_in, e, n);
    logic [2*K-1:0] r, b, nn;
    nn = {{K{1'b0}}, n};
    r = 1;
    b = {{K{1'b0}}, b_in} % nn;
    for (int i = 0; i < K; i++) begin
      if (e[i]) r = (r * b) % nn;
      b = (b * b) % nn;
    end
    return K'(r);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [K-1:0] pub [2];
    logic [K-1:0] priv [2];
    logic [K-1:0] n, e, d, m1, m2, c1, c2;
    int cyc, cyc_enc, cyc_dec, lat_e, lat_d;
    bit enc_done, dec_done;

    $readmemh("rtl/rsa_pub_key.hex", pub);
    $readmemh("rtl/rsa_priv_key.hex", priv);
    n = pub[0]; e = pub[1]; d = priv[1];
    lat_e = 4 + (K + $countones(e)) * (K + 2);
    lat_d = 4 + (K + $countones(d)) * (K + 2);
    m1 = K'('h11);
    for (int i = 0; i < 31; i++) m2[i*32 +: 32] = $urandom;
    m2[K-1:K-32] = 32'h00ab_cdef;  // keeps m2 below n (n starts with 0x9af9...)

    reset = 1'b1; enc_enb = 1'b0; dec_enb = 1'b0;
    enc_plain = '0; dec_cipher = '0;
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;

    // 1. encrypt m1
    enc_plain = m1; enc_enb = 1'b1;
    @(posedge clk); #1 enc_enb = 1'b0;
    cyc = 0;
    while (!enc_ready) begin @(posedge clk); #1 cyc++; end
    c1 = enc_cipher;
    check(c1 == powmod(m1, e, n), "cipher of 0x11 matches reference");
    check(cyc == lat_e, $sformatf("encryption latency %0d, expected %0d", cyc, lat_e));
    $display("cipher(0x11) = %h", c1);

    // 2. decrypt c1 and encrypt m2 at the same time
    dec_cipher = c1; dec_enb = 1'b1;
    enc_plain = m2; enc_enb = 1'b1;
    @(posedge clk); #1 dec_enb = 1'b0; enc_enb = 1'b0;
    cyc = 0; cyc_enc = 0; cyc_dec = 0; enc_done = 0; dec_done = 0;
    while (!(enc_done && dec_done)) begin
      @(posedge clk); #1 cyc++;
      if (!enc_done && enc_ready) begin enc_done = 1; cyc_enc = cyc; end
      if (!dec_done && dec_ready) begin dec_done = 1; cyc_dec = cyc; end
    end
    c2 = enc_cipher;
    check(dec_plain == m1, "decryption returns 0x11");
    check(cyc_dec == lat_d, $sformatf("decryption latency %0d, expected %0d", cyc_dec, lat_d));
    check(c2 == powmod(m2, e, n), "cipher of the random message matches reference");
    check(cyc_enc == lat_e, $sformatf("second encryption latency %0d", cyc_enc));

    // 3. decrypt c2
    dec_cipher = c2; dec_enb = 1'b1;
    @(posedge clk); #1 dec_enb = 1'b0;
    while (!dec_ready) @(posedge clk);
    #1 check(dec_plain == m2, "decryption returns the random message");

    // mechanisms
    $display("key loads enc=%0d dec=%0d squares=%0d multiplies=%0d square-only=%0d both_busy=%0d",
             enc_key_loads, dec_key_loads, squares, multiplies, squares - multiplies, both_busy);
    check(enc_key_loads == 2, "public key loaded from ROM for each encryption");
    check(dec_key_loads == 2, "private key loaded from ROM for each decryption");
    check(squares == 4 * K, "one squaring per exponent bit");
    check(multiplies == 2 * ($countones(e) + $countones(d)), "one multiply per exponent 1 bit");
    check(squares - multiplies > 0, "exponent 0 bits (square only) occurred");
    check(both_busy > 0, "encryption and decryption units ran concurrently");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
