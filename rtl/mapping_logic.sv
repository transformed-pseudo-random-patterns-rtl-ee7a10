// mapping_logic: the combinational block between pattern generator and CUT.
//
// A list of NMAP cube mappings is applied in order. Each mapping k decodes its
// source cube from the original pattern and forces the literals of its image
// cube on the line left by mappings 0..k-1, so when an original pattern lies
// in several source cubes the later mapping wins on every input both force.
// With test_mode low every decoder is off and the output equals the input.
//
// Cube k is SRC_MASK[k]/SRC_VAL[k] -> IMG_MASK[k]/IMG_VAL[k] (mask bit 1 =
// literal present, value bit = literal polarity; a is the MSB). The defaults
// are the two mappings found for the C17 benchmark, be' -> a'de followed by
// a'e' -> ab'c': eight gates in all, two decoders and six forcing gates.
// Purely combinational, no clock; hit[k] is mapping k's decoder output.
// Decoding from the original pattern and the override order follow the
// method's gate-level construction; the cubes for any other circuit come from
// the offline selection procedure and are passed in as parameters.
module mapping_logic
  import tpg_pkg::*;
#(
  parameter int                        N        = C17_N,
  parameter int                        NMAP     = C17_NMAP,
  parameter logic [NMAP-1:0][N-1:0]    SRC_MASK = C17_SRC_MASK,
  parameter logic [NMAP-1:0][N-1:0]    SRC_VAL  = C17_SRC_VAL,
  parameter logic [NMAP-1:0][N-1:0]    IMG_MASK = C17_IMG_MASK,
  parameter logic [NMAP-1:0][N-1:0]    IMG_VAL  = C17_IMG_VAL
) (
  input  logic            test_mode,
  input  logic [N-1:0]    orig,
  output logic [N-1:0]    xform,
  output logic [NMAP-1:0] hit
);

  logic [NMAP:0][N-1:0] chain;

  always_comb chain[0] = orig;

  for (genvar k = 0; k < NMAP; k++) begin : g_map
    cube_mapping #(
      .N        (N),
      .SRC_MASK (SRC_MASK[k]),
      .SRC_VAL  (SRC_VAL[k]),
      .IMG_MASK (IMG_MASK[k]),
      .IMG_VAL  (IMG_VAL[k])
    ) u_map (
      .test_mode (test_mode),
      .orig      (orig),
      .pin       (chain[k]),
      .pout      (chain[k+1]),
      .hit       (hit[k])
    );
  end

  always_comb xform = chain[NMAP];

endmodule
