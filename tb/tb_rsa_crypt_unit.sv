// Self-checking testbench of rsa_crypt_unit.
//
// With the 64-bit test key pair, one unit loaded with (n, e) encrypts random
// messages and a second unit loaded with (n, d) decrypts each cipher text.
// Each result is compared with a reference exponentiation computed with the
// simulator's wide arithmetic, the decryption must return the message, and
// the latency 4 + (K + w) * (K + 2) clocks is checked. A default-size unit
// (K = 1024, default public key) then encrypts the message 0x11 once.
module tb_rsa_crypt_unit;

  localparam int unsigned KS = 64;
  localparam int unsigned KF = 1024;
  localparam logic [KS-1:0] N_S = 64'hc44a92944d3087f3;
  localparam logic [KS-1:0] E_S = 64'h49b64a0872e6cc3d;

  logic clk = 1'b0;
  logic reset;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic          enc_enb, enc_ready, dec_enb, dec_ready;
  logic [KS-1:0] enc_din, enc_dout, dec_din, dec_dout;

  rsa_crypt_unit #(.K(KS), .KEY_FILE("tb/rsa64_pub_key.hex")) u_enc (
    .clk(clk), .reset(reset), .enb(enc_enb), .din(enc_din), .dout(enc_dout), .ready(enc_ready));
  rsa_crypt_unit #(.K(KS), .KEY_FILE("tb/rsa64_priv_key.hex")) u_dec (
    .clk(clk), .reset(reset), .enb(dec_enb), .din(dec_din), .dout(dec_dout), .ready(dec_ready));

  logic          f_enb, f_ready;
  logic [KF-1:0] f_din, f_dout;
  rsa_crypt_unit u_full (
    .clk(clk), .reset(reset), .enb(f_enb), .din(f_din), .dout(f_dout), .ready(f_ready));

  function automatic logic [KF-1:0] powmod(logic [KF-1:0] b_in, e, n);
    logic [2*KF-1:0] r, b, nn;
    nn = {{KF{1'b0}}, n};
    r = 1;
    b = {{KF{1'b0}}, b_in} % nn;
    for (int i = 0; i < KF; i++) begin
      if (e[i]) r = (r * b) % nn;
      b = (b * b) % nn;
    end
    return KF'(r);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [KS-1:0] m, want;
    logic [KF-1:0] n_f, e_f, want_f;
    logic [KF-1:0] key [2];
    int cyc;

    reset = 1'b1; enc_enb = 1'b0; dec_enb = 1'b0; f_enb = 1'b0;
    enc_din = '0; dec_din = '0; f_din = '0;
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;

    for (int t = 0; t < 12; t++) begin
      m = (t == 0) ? KS'(64'h11) : (t == 1) ? KS'(64'h1) : {$urandom, $urandom} % N_S;
      want = KS'(powmod(KF'(m), KF'(E_S), KF'(N_S)));

      enc_din = m; enc_enb = 1'b1;
      @(posedge clk); #1 enc_enb = 1'b0;
      cyc = 0;
      while (!enc_ready) begin @(posedge clk); #1 cyc++; end
      check(enc_dout == want, $sformatf("encrypt %h: got %h want %h", m, enc_dout, want));
      check(cyc == 4 + (KS + $countones(E_S)) * (KS + 2), $sformatf("encrypt latency %0d", cyc));

      dec_din = enc_dout; dec_enb = 1'b1;
      @(posedge clk); #1 dec_enb = 1'b0;
      while (!dec_ready) @(posedge clk);
      #1 check(dec_dout == m, $sformatf("decrypt back to %h: got %h", m, dec_dout));
    end

    // default size, default public key
    $readmemh("rtl/rsa_pub_key.hex", key);
    n_f = key[0]; e_f = key[1];
    want_f = powmod(KF'('h11), e_f, n_f);
    f_din = KF'('h11); f_enb = 1'b1;
    @(posedge clk); #1 f_enb = 1'b0;
    cyc = 0;
    while (!f_ready) begin @(posedge clk); #1 cyc++; end
    check(f_dout == want_f, "1024-bit encryption of 0x11");
    check(cyc == 4 + (KF + $countones(e_f)) * (KF + 2), $sformatf("1024-bit latency %0d", cyc));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
