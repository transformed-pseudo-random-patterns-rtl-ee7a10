// cube_mapping: one cube mapping M(S -> I) as a small gate network.
//
// An original pattern A that lies in the source cube S is replaced by a
// pattern that lies in the image cube I: every input that is a literal of I is
// forced to that literal's value, every other input keeps its value. Patterns
// outside S pass unchanged. The hardware is the minimal structure for this:
//  * one decoding AND gate over the literals of S (complemented literals on
//    inverted inputs) plus a test_mode input, so the mapping is switched off
//    in normal operation;
//  * for each literal of I one two-input gate on that input line: an OR with
//    the decoder output for a literal 1, an AND with the inverted decoder
//    output for a literal 0. Inputs not in I have no gate.
//
// The decoder looks at `orig`, the pattern straight from the pattern
// generator; the forcing gates sit on `pin`, the line as left by earlier
// mappings. Cascading stages this way makes a later mapping override an
// earlier one wherever both force the same input. Purely combinational; no
// clock. Cube encoding: MASK bit 1 = literal present, VAL bit = its polarity.
// Defaults are the three-input example M(a1'a2 -> a2'a3), which maps 010 and
// 011 to 001 and leaves the other six patterns alone. The gate structure and
// the test_mode input follow the cube-mapping method; the mask/value encoding
// of cubes is this design's own.
module cube_mapping #(
  parameter int          N        = 3,
  parameter logic [N-1:0] SRC_MASK = 3'b110,   // source a1' a2   (01X)
  parameter logic [N-1:0] SRC_VAL  = 3'b010,
  parameter logic [N-1:0] IMG_MASK = 3'b011,   // image  a2' a3   (X01)
  parameter logic [N-1:0] IMG_VAL  = 3'b001
) (
  input  logic         test_mode,
  input  logic [N-1:0] orig,
  input  logic [N-1:0] pin,
  output logic [N-1:0] pout,
  output logic         hit
);

  // A value bit outside the care mask would be meaningless: reject it.
  if (((SRC_VAL & ~SRC_MASK) != '0) || ((IMG_VAL & ~IMG_MASK) != '0)) begin : g_bad_cube
    $error("cube_mapping: value bits set where the mask marks a don't care");
  end

  // Decoding AND gate: every literal of the source cube must match.
  always_comb hit = test_mode & (&(~(orig ^ SRC_VAL) | ~SRC_MASK));

  for (genvar j = 0; j < N; j++) begin : g_bit
    if (IMG_MASK[j] && IMG_VAL[j]) begin : g_or
      always_comb pout[j] = pin[j] | hit;
    end else if (IMG_MASK[j]) begin : g_and
      always_comb pout[j] = pin[j] & ~hit;
    end else begin : g_wire
      always_comb pout[j] = pin[j];
    end
  end

endmodule
