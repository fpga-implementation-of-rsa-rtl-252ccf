// rsa_modexp: left-to-right square-and-multiply modular exponentiator,
//   cypher = indata ^ inexp mod inmod, all values K bits wide.
//
// How it works: the exponent is scanned from its most significant bit down,
// all K bit positions. For every bit the accumulator c (initially 1) is
// squared modulo n; when the scanned bit is 1 it is then multiplied by the
// message m modulo n. Squares and multiplies share one rsa_modmul instance,
// so the unit runs one modular multiplication at a time.
//
// Interface: 'data_enb' is a one-clock pulse, honoured while idle, that
// latches indata, inexp and inmod. 'ready' falls on that clock edge and rises
// when 'cypher' holds the result; cypher then stays valid until the next
// result. It is low after reset. 'reset' is synchronous and active high.
// Requires indata < inmod and inmod > 1.
//
// Timing: each modular multiplication takes K + 2 clocks (start, K iterations,
// capture), so ready rises (K + w) * (K + 2) clocks after the
// data_enb clock, w being the number of 1 bits in the exponent.
//
// From the source design: the left-to-right square-and-multiply schedule over
// k exponent bits, the add-and-shift multiplier, the port names (indata,
// data_enb, inexp, inmod, cypher, ready) and K = 1024. This design's own
// choices: c starts at 1 and all K bits are scanned (no skipping of leading
// zeros), one shared multiplier, the handshake and the reset polarity.
module rsa_modexp
  import rsa_pkg::*;
#(
  parameter int unsigned K = rsa_pkg::KEY_BITS
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         data_enb,
  input  logic [K-1:0] indata,
  input  logic [K-1:0] inexp,
  input  logic [K-1:0] inmod,
  output logic [K-1:0] cypher,
  output logic         ready
);

  localparam int unsigned CW = $clog2(K + 1);

  exp_state_e    state;
  logic [K-1:0]  c, m_r, e_sh, n_r;
  logic [CW-1:0] bits_left;

  logic          mm_ds, mm_ready;
  logic [K-1:0]  mm_mplier, mm_product;

  assign mm_ds     = (state == EXP_SQ_START) || (state == EXP_MUL_START);
  assign mm_mplier = (state == EXP_MUL_START) ? m_r : c;

  rsa_modmul #(.K(K)) u_mul (
    .clk     (clk),
    .reset   (reset),
    .ds      (mm_ds),
    .mpand   (c),
    .mplier  (mm_mplier),
    .modulus (n_r),
    .product (mm_product),
    .ready   (mm_ready)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      state     <= EXP_IDLE;
      c         <= '0;
      m_r       <= '0;
      e_sh      <= '0;
      n_r       <= '0;
      bits_left <= '0;
      cypher    <= '0;
      ready     <= 1'b0;
    end else begin
      unique case (state)
        EXP_IDLE: if (data_enb) begin
          c         <= K'(1);
          m_r       <= indata;
          e_sh      <= inexp;
          n_r       <= inmod;
          bits_left <= CW'(K);
          ready     <= 1'b0;
          state     <= EXP_SQ_START;
        end
        EXP_SQ_START:  state <= EXP_SQ_WAIT;
        EXP_MUL_START: state <= EXP_MUL_WAIT;
        EXP_SQ_WAIT, EXP_MUL_WAIT: if (mm_ready) begin
          c <= mm_product;
          if (state == EXP_SQ_WAIT && e_sh[K-1]) begin
            state <= EXP_MUL_START;
          end else begin
            // this exponent bit is finished
            e_sh      <= e_sh << 1;
            bits_left <= bits_left - 1'b1;
            if (bits_left == CW'(1)) begin
              cypher <= mm_product;
              ready  <= 1'b1;
              state  <= EXP_IDLE;
            end else begin
              state <= EXP_SQ_START;
            end
          end
        end
        default: state <= EXP_IDLE;
      endcase
    end
  end

  a_no_start_while_busy : assert property (@(posedge clk) disable iff (reset)
      data_enb |-> state == EXP_IDLE)
    else $error("rsa_modexp: data_enb asserted while busy");
  a_message_range : assert property (@(posedge clk) disable iff (reset)
      data_enb |-> (indata < inmod && inmod > K'(1)))
    else $error("rsa_modexp: need indata < inmod and inmod > 1");

endmodule
