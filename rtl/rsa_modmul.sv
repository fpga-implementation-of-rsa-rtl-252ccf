// rsa_modmul: bit-serial add-and-shift modular multiplier,
//   product = mpand * mplier mod modulus, all operands K bits wide.
//
// How it works: the multiplier operand is scanned one bit per clock, least
// significant bit first. Each clock the running sum gets the current multiple
// of mpand added when the scanned bit is 1, and the multiple is shifted left by
// one (doubled) for the next bit. Both the sum and the doubled multiple are
// reduced by one conditional subtraction of the modulus, so both stay below
// the modulus and every intermediate value fits in K+1 bits. After K clocks
// the sum is the true modular product (not a Montgomery product).
//
// Interface: 'ds' (data start) is a one-clock pulse that latches mpand, mplier
// and modulus; it is honoured only while the unit is idle. 'ready' falls on
// the clock edge that samples ds and rises again when 'product' is valid; it
// is low after reset until the first result. 'reset' is synchronous and
// active high. Operands must satisfy mpand < modulus and modulus > 0.
//
// Timing: ready is high again K clocks after the ds clock; one product bit of
// the multiplier is consumed per clock.
//
// From the source design: the add-and-shift method, operand names (mpand,
// mplier, modulus, product, ds, reset, ready) and K = 1024. This design's own
// choices: the least-significant-bit-first order with a doubled multiplicand
// (the published pseudocode, which halves the sum, would give a Montgomery
// product and not the plain product its own example shows), the handshake and
// the reset polarity.
module rsa_modmul #(
  parameter int unsigned K = rsa_pkg::KEY_BITS
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         ds,
  input  logic [K-1:0] mpand,
  input  logic [K-1:0] mplier,
  input  logic [K-1:0] modulus,
  output logic [K-1:0] product,
  output logic         ready
);

  localparam int unsigned CW = $clog2(K + 1);

  logic [K-1:0]  acc;      // running sum, < n
  logic [K-1:0]  mult;     // mpand * 2^i mod n
  logic [K-1:0]  zsh;      // remaining multiplier bits
  logic [K-1:0]  n_r;
  logic [CW-1:0] cnt;
  logic          busy;

  // one iteration of the datapath
  logic [K:0]   sum, dbl;
  logic [K+1:0] sum_sub, dbl_sub;
  logic [K-1:0] acc_next, mult_next;

  always_comb begin
    sum       = {1'b0, acc} + (zsh[0] ? {1'b0, mult} : '0);
    dbl       = {mult, 1'b0};
    sum_sub   = {1'b0, sum} - {2'b00, n_r};
    dbl_sub   = {1'b0, dbl} - {2'b00, n_r};
    // no borrow -> value was >= n, keep the reduced value
    acc_next  = sum_sub[K+1] ? sum[K-1:0] : sum_sub[K-1:0];
    mult_next = dbl_sub[K+1] ? dbl[K-1:0] : dbl_sub[K-1:0];
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      acc   <= '0;
      mult  <= '0;
      zsh   <= '0;
      n_r   <= '0;
      cnt   <= '0;
      busy  <= 1'b0;
      ready <= 1'b0;
    end else if (!busy) begin
      if (ds) begin
        acc   <= '0;
        mult  <= mpand;
        zsh   <= mplier;
        n_r   <= modulus;
        cnt   <= CW'(K);
        busy  <= 1'b1;
        ready <= 1'b0;
      end
    end else begin
      acc  <= acc_next;
      mult <= mult_next;
      zsh  <= zsh >> 1;
      cnt  <= cnt - 1'b1;
      if (cnt == CW'(1)) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end
    end
  end

  assign product = acc;

  // A start request while busy would be lost.
  a_no_ds_while_busy : assert property (@(posedge clk) disable iff (reset) ds |-> !busy)
    else $error("rsa_modmul: ds asserted while busy");
  // The reduction needs the multiplicand below the modulus.
  a_operand_range : assert property (@(posedge clk) disable iff (reset) ds |-> mpand < modulus)
    else $error("rsa_modmul: mpand must be below modulus");

endmodule
