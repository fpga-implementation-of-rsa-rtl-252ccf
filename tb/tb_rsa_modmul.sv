// Self-checking testbench of rsa_modmul.
//
// Two instances: one at the default K = 1024 runs the published example
// 0xe * 0x3 mod 0x21 = 0x9 and a few full-width random products; one at
// K = 64 runs many random products including edge values (zero operands,
// n - 1, modulus 1 < n < 2^K). The expected value is computed with the
// simulator's own wide multiply and remainder. The latency from ds to ready
// (K clocks) is checked for every product.
module tb_rsa_modmul;

  localparam int unsigned KF = 1024;
  localparam int unsigned KS = 64;

  logic clk = 1'b0;
  logic reset;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // full-size instance
  logic          f_ds, f_ready;
  logic [KF-1:0] f_y, f_z, f_n, f_p;
  rsa_modmul u_full (
    .clk(clk), .reset(reset), .ds(f_ds), .mpand(f_y), .mplier(f_z),
    .modulus(f_n), .product(f_p), .ready(f_ready)
  );

  // small instance
  logic          s_ds, s_ready;
  logic [KS-1:0] s_y, s_z, s_n, s_p;
  rsa_modmul #(.K(KS)) u_small (
    .clk(clk), .reset(reset), .ds(s_ds), .mpand(s_y), .mplier(s_z),
    .modulus(s_n), .product(s_p), .ready(s_ready)
  );

  function automatic logic [KF-1:0] ref_f(logic [KF-1:0] y, z, n);
    logic [2*KF-1:0] prod;
    prod = {{KF{1'b0}}, y} * {{KF{1'b0}}, z};
    return KF'(prod % {{KF{1'b0}}, n});
  endfunction

  function automatic logic [KS-1:0] ref_s(logic [KS-1:0] y, z, n);
    logic [2*KS-1:0] prod;
    prod = {{KS{1'b0}}, y} * {{KS{1'b0}}, z};
    return KS'(prod % {{KS{1'b0}}, n});
  endfunction

  function automatic logic [KF-1:0] rand_f();
    logic [KF-1:0] v;
    for (int i = 0; i < KF / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  function automatic logic [KS-1:0] rand_s();
    return {$urandom, $urandom};
  endfunction

  task automatic run_full(input logic [KF-1:0] y, z, n);
    int cyc;
    logic [KF-1:0] exp_p;
    exp_p = ref_f(y, z, n);
    f_y = y; f_z = z; f_n = n; f_ds = 1'b1;
    @(posedge clk); #1 f_ds = 1'b0;
    cyc = 0;
    while (!f_ready) begin @(posedge clk); #1 cyc++; end
    checks++;
    if (f_p !== exp_p) begin
      failures++;
      $display("FAIL full: %h * %h mod %h = %h, expected %h", y, z, n, f_p, exp_p);
    end
    checks++;
    if (cyc != KF) begin
      failures++;
      $display("FAIL full latency %0d, expected %0d", cyc, KF);
    end
  endtask

  task automatic run_small(input logic [KS-1:0] y, z, n);
    int cyc;
    logic [KS-1:0] exp_p;
    exp_p = ref_s(y, z, n);
    s_y = y; s_z = z; s_n = n; s_ds = 1'b1;
    @(posedge clk); #1 s_ds = 1'b0;
    cyc = 0;
    while (!s_ready) begin @(posedge clk); #1 cyc++; end
    checks++;
    if (s_p !== exp_p) begin
      failures++;
      $display("FAIL small: %h * %h mod %h = %h, expected %h", y, z, n, s_p, exp_p);
    end
    checks++;
    if (cyc != KS) begin
      failures++;
      $display("FAIL small latency %0d, expected %0d", cyc, KS);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [KF-1:0] yf, nf;
    logic [KS-1:0] ys, ns;
    reset = 1'b1; f_ds = 1'b0; s_ds = 1'b0;
    f_y = '0; f_z = '0; f_n = '0; s_y = '0; s_z = '0; s_n = '0;
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;

    // published example: 0xe * 0x3 mod 0x21 = 0x9
    run_full(KF'('he), KF'('h3), KF'('h21));
    checks++;
    if (f_p !== KF'('h9)) begin failures++; $display("FAIL published example"); end

    for (int t = 0; t < 4; t++) begin
      nf = rand_f() | KF'(2);
      yf = rand_f() % nf;
      run_full(yf, rand_f(), nf);
    end

    run_small('h0, 'h1234, 'h97);
    run_small('h5, 'h0, 'h97);
    run_small('h96, {KS{1'b1}}, 'h97);
    run_small({KS{1'b1}} - 1, {KS{1'b1}}, {KS{1'b1}});
    run_small('h0, 'h5, 'h1);
    for (int t = 0; t < 300; t++) begin
      ns = rand_s() >> ($urandom % KS);
      if (ns < 2) ns = 2;
      ys = rand_s() % ns;
      run_small(ys, rand_s(), ns);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
