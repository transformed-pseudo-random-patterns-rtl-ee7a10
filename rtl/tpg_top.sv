// tpg_top: BIST test pattern generator with transformed pseudo-random
// patterns.
//
// An LFSR produces one original pseudo-random pattern per clock. A purely
// combinational mapping logic block turns it into the transformed pattern
// that drives the inputs of the circuit under test (CUT): original patterns
// that lie in a chosen source cube, and would detect no new fault, are moved
// into an image cube that holds tests for the faults the LFSR alone misses.
// No sequential logic is added to the LFSR; the only control is test_mode,
// which enables the mapping decoders (low = original patterns, the setting
// for normal operation).
//
// Interface: clk, rst_n (asynchronous, loads SEED), en (advance one
// pattern), test_mode. orig_pattern is the LFSR state, cut_pattern the
// transformed pattern for the CUT, map_hit the decoder output of each cube
// mapping. cut_pattern follows orig_pattern combinationally in the same
// cycle. The CUT itself is outside this module.
//
// Defaults: the 5-input C17 example with its two mappings be' -> a'de and
// a'e' -> ab'c'. The 5-stage polynomial x^5+x^2+1 and seed 00111 are this
// design's choice; the benchmark LFSR set-ups are in tpg_pkg.
module tpg_top
  import tpg_pkg::*;
#(
  parameter int                     N        = C17_N,
  parameter int                     NMAP     = C17_NMAP,
  parameter logic [N-1:0]           POLY     = C17_POLY,
  parameter logic [N-1:0]           SEED     = C17_SEED,
  parameter logic [NMAP-1:0][N-1:0] SRC_MASK = C17_SRC_MASK,
  parameter logic [NMAP-1:0][N-1:0] SRC_VAL  = C17_SRC_VAL,
  parameter logic [NMAP-1:0][N-1:0] IMG_MASK = C17_IMG_MASK,
  parameter logic [NMAP-1:0][N-1:0] IMG_VAL  = C17_IMG_VAL
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic            test_mode,
  output logic [N-1:0]    orig_pattern,
  output logic [N-1:0]    cut_pattern,
  output logic [NMAP-1:0] map_hit
);

  lfsr #(
    .N    (N),
    .POLY (POLY),
    .SEED (SEED)
  ) u_lfsr (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .state (orig_pattern)
  );

  mapping_logic #(
    .N        (N),
    .NMAP     (NMAP),
    .SRC_MASK (SRC_MASK),
    .SRC_VAL  (SRC_VAL),
    .IMG_MASK (IMG_MASK),
    .IMG_VAL  (IMG_VAL)
  ) u_map (
    .test_mode (test_mode),
    .orig      (orig_pattern),
    .xform     (cut_pattern),
    .hit       (map_hit)
  );

endmodule
