// lfsr: n-stage linear feedback shift register used as the pseudo-random
// pattern generator, all stages applied to the CUT in parallel (one pattern
// per clock).
//
// The register realises the linear recurrence of the characteristic
// polynomial p(x) = x^N + c_{N-1} x^{N-1} + ... + c_1 x + c_0:
//     s(t+N) = XOR over k of c_k * s(t+k).
// Stage k holds s(t+k); on each enabled clock the register shifts toward
// stage 0 and the new feedback bit enters stage N-1 (an external-XOR, or
// Fibonacci, LFSR). POLY holds c_{N-1}..c_0; with a primitive polynomial and a
// non-zero seed the state walks through all 2^N-1 non-zero patterns.
//
// Interface: rst_n (asynchronous, active low) loads SEED; en advances one
// step per rising clock edge; state is the current pattern, valid right after
// reset. The XOR structure and the reset are this design's choices; the
// polynomial and seed are parameters so any configuration can be loaded.
module lfsr #(
  parameter int           N    = 5,
  parameter logic [N-1:0] POLY = 5'b00101,   // x^5 + x^2 + 1
  parameter logic [N-1:0] SEED = 5'b00111
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [N-1:0] state
);

  // A characteristic polynomial without constant term is not a proper
  // N-stage recurrence, and the all-zero seed never leaves zero.
  if (!POLY[0] || SEED == '0) begin : g_bad_config
    $error("lfsr: POLY needs c0 = 1 and SEED must be non-zero");
  end

  logic fb;

  always_comb fb = ^(state & POLY);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= {fb, state[N-1:1]};
  end

  // The all-zero state is a fixed point: it must never be reached.
  a_nonzero: assert property (@(posedge clk) disable iff (!rst_n) state != '0)
    else $error("lfsr: all-zero state");

endmodule
