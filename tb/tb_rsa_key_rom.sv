// Self-checking testbench of rsa_key_rom.
//
// Reads both words of four ROMs: the 64-bit test key pair and the default
// 1024-bit key pair (public and private ROM of each). Checks the 64-bit words
// against their known values, the one-clock synchronous read, that the
// public and private ROM of a pair hold the same modulus, and that each pair
// really is an RSA key: (m^e mod n)^d mod n = m for a few messages, computed
// with the simulator's wide arithmetic.
module tb_rsa_key_rom;

  localparam int unsigned KS = 64;
  localparam int unsigned KF = 1024;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic          addr;
  logic [KS-1:0] pub_s, priv_s;
  logic [KF-1:0] pub_f, priv_f;

  rsa_key_rom #(.K(KS), .INIT_FILE("tb/rsa64_pub_key.hex"))  u_pub_s  (.clk(clk), .addr(addr), .data(pub_s));
  rsa_key_rom #(.K(KS), .INIT_FILE("tb/rsa64_priv_key.hex")) u_priv_s (.clk(clk), .addr(addr), .data(priv_s));
  rsa_key_rom #(.INIT_FILE("rtl/rsa_pub_key.hex"))            u_pub_f  (.clk(clk), .addr(addr), .data(pub_f));
  rsa_key_rom #(.INIT_FILE("rtl/rsa_priv_key.hex"))           u_priv_f (.clk(clk), .addr(addr), .data(priv_f));

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
    #100000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [KS-1:0] n_s, e_s, d_s;
    logic [KF-1:0] n_f, e_f, d_f, m, c;

    addr = 1'b0;
    @(posedge clk); #1;
    n_s = pub_s; n_f = pub_f;
    check(pub_s == 64'hc44a92944d3087f3, "64-bit modulus word");
    check(priv_s == pub_s, "64-bit pair shares n");
    check(priv_f == pub_f, "1024-bit pair shares n");
    check(pub_f[KF-1] == 1'b1, "1024-bit modulus has full length");

    addr = 1'b1;
    #1;
    check(pub_s == n_s, "read is synchronous (data held before the edge)");
    @(posedge clk); #1;
    e_s = pub_s; d_s = priv_s; e_f = pub_f; d_f = priv_f;
    check(pub_s == 64'h49b64a0872e6cc3d, "64-bit public exponent word");
    check(e_f != n_f && d_f != n_f, "1024-bit exponent words differ from n");

    for (int t = 0; t < 3; t++) begin
      m = KF'(32'h11 + t * 32'h1000_0001);
      c = powmod(m, {{(KF-KS){1'b0}}, e_s}, {{(KF-KS){1'b0}}, n_s});
      check(powmod(c, {{(KF-KS){1'b0}}, d_s}, {{(KF-KS){1'b0}}, n_s}) == m, "64-bit key pair round trip");
    end
    m = KF'(32'h11);
    c = powmod(m, e_f, n_f);
    check(c != m, "1024-bit encryption changes the message");
    check(powmod(c, d_f, n_f) == m, "1024-bit key pair round trip");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
