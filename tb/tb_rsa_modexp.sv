// Self-checking testbench of rsa_modexp.
//
// A K = 32 instance runs the published example 0x11^0x903ad9 mod 0x3b2c159
// = 0x36cf344, edge cases (exponent 0, exponent 1, message 0, message 1) and
// random exponentiations. A K = 1024 instance (the default size) runs the
// published example once more with full-width operands. Expected values come
// from a right-to-left binary exponentiation written with the simulator's
// wide multiply and remainder, independent of the unit's left-to-right
// schedule. The latency, (K + w) * (K + 2) clocks with w the number of 1 bits
// of the exponent, is checked for every run.
module tb_rsa_modexp;

  localparam int unsigned KF = 1024;
  localparam int unsigned KS = 32;

  logic clk = 1'b0;
  logic reset;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic          s_enb, s_ready;
  logic [KS-1:0] s_m, s_e, s_n, s_c;
  rsa_modexp #(.K(KS)) u_small (
    .clk(clk), .reset(reset), .data_enb(s_enb), .indata(s_m), .inexp(s_e),
    .inmod(s_n), .cypher(s_c), .ready(s_ready)
  );

  logic          f_enb, f_ready;
  logic [KF-1:0] f_m, f_e, f_n, f_c;
  rsa_modexp u_full (
    .clk(clk), .reset(reset), .data_enb(f_enb), .indata(f_m), .inexp(f_e),
    .inmod(f_n), .cypher(f_c), .ready(f_ready)
  );

  function automatic logic [KS-1:0] ref_s(logic [KS-1:0] m, e, n);
    logic [2*KS-1:0] r, b, nn;
    nn = {{KS{1'b0}}, n};
    r = 1 % nn;
    b = {{KS{1'b0}}, m} % nn;
    for (int i = 0; i < KS; i++) begin
      if (e[i]) r = (r * b) % nn;
      b = (b * b) % nn;
    end
    return KS'(r);
  endfunction

  task automatic run_small(input logic [KS-1:0] m, e, n);
    int cyc, want_cyc;
    logic [KS-1:0] want;
    want = ref_s(m, e, n);
    want_cyc = (KS + $countones(e)) * (KS + 2);
    s_m = m; s_e = e; s_n = n; s_enb = 1'b1;
    @(posedge clk); #1 s_enb = 1'b0;
    cyc = 0;
    while (!s_ready && cyc < 10 * want_cyc) begin @(posedge clk); #1 cyc++; end
    checks++;
    if (s_c !== want) begin
      failures++;
      $display("FAIL %h ^ %h mod %h = %h, expected %h", m, e, n, s_c, want);
    end
    checks++;
    if (cyc != want_cyc) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cyc, want_cyc);
    end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [KS-1:0] n, m;
    int cyc;
    reset = 1'b1; s_enb = 1'b0; f_enb = 1'b0;
    s_m = '0; s_e = '0; s_n = '0; f_m = '0; f_e = '0; f_n = '0;
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;

    // published example at K = 32
    run_small(32'h11, 32'h903ad9, 32'h3b2c159);
    checks++;
    if (s_c !== 32'h36cf344) begin failures++; $display("FAIL published example (K=32)"); end

    run_small(32'h1234, 32'h0, 32'h3b2c159);   // x^0 = 1
    run_small(32'h1234, 32'h1, 32'h3b2c159);   // x^1 = x
    run_small(32'h0, 32'h55, 32'h3b2c159);     // 0^e = 0
    run_small(32'h1, 32'hffffffff, 32'hfffffffb);
    run_small(32'h3, 32'hffffffff, 32'h4);     // even modulus
    for (int t = 0; t < 60; t++) begin
      n = $urandom >> ($urandom % 30);
      if (n < 2) n = 3;
      m = $urandom % n;
      run_small(m, $urandom, n);
    end

    // published example at the default K = 1024
    f_m = KF'('h11); f_e = KF'('h903ad9); f_n = KF'('h3b2c159); f_enb = 1'b1;
    @(posedge clk); #1 f_enb = 1'b0;
    cyc = 0;
    while (!f_ready) begin @(posedge clk); #1 cyc++; end
    checks++;
    if (f_c !== KF'('h36cf344)) begin
      failures++;
      $display("FAIL published example (K=1024): %h", f_c);
    end
    checks++;
    if (cyc != (KF + $countones(f_e)) * (KF + 2)) begin
      failures++;
      $display("FAIL K=1024 latency %0d", cyc);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
