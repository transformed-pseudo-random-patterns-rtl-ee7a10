// tb_mapping_logic: self-checking testbench for the mapping logic, using the
// C17 worked example.
//
// The ten-pattern original set is applied to three mapping networks:
//   u_c1  the single mapping be' -> a'e   (first candidate image cube)
//   u_c2  the single mapping be' -> a'de  (selected image cube)
//   u_dut the default two-mapping network be' -> a'de, then a'e' -> ab'c'.
// Expected transformed patterns were worked out by hand from the mapping
// rules (decoders read the original pattern, the second mapping overrides the
// first), e.g. 01010 lies in both source cubes and becomes 10011. The test
// also counts how many of the five test cubes of the faults the original
// set misses (XX00X, X111X, 010X1, 0111X, X001X) are hit: 0 originally, 1 for
// u_c1, 3 for u_c2, all 5 for u_dut. Finally all 32 patterns are compared
// with a string-based reference, with test_mode high and low.
module tb_mapping_logic;
  import tpg_pkg::*;

  int checks = 0, failures = 0;

  localparam int NP = 10;
  c17_pattern_t orig_set [NP] = '{5'b00111, 5'b11011, 5'b10111, 5'b10110, 5'b11010,
                                  5'b00101, 5'b11100, 5'b01010, 5'b10100, 5'b00100};
  c17_pattern_t exp_dut  [NP] = '{5'b00111, 5'b11011, 5'b10111, 5'b10110, 5'b01011,
                                  5'b00101, 5'b01111, 5'b10011, 5'b10100, 5'b10000};
  string test_cubes [5] = '{"XX00X", "X111X", "010X1", "0111X", "X001X"};
  string srcs [2] = '{"X1XX0", "0XXX0"};
  string imgs [2] = '{"0XX11", "100XX"};

  function automatic bit contained(input c17_pattern_t a, input string c);
    for (int i = 0; i < 5; i++) begin
      if (c[i] == "0" && a[4-i] != 1'b0) return 0;
      if (c[i] == "1" && a[4-i] != 1'b1) return 0;
    end
    return 1;
  endfunction

  function automatic c17_pattern_t ref_map(input c17_pattern_t a, input bit tm);
    c17_pattern_t r = a;
    if (!tm) return a;
    for (int k = 0; k < 2; k++)
      if (contained(a, srcs[k]))
        for (int i = 0; i < 5; i++) begin
          if (imgs[k][i] == "0") r[4-i] = 1'b0;
          if (imgs[k][i] == "1") r[4-i] = 1'b1;
        end
    return r;
  endfunction

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d (%b) expected %0d (%b)", what, got, got, exp, exp);
    end
  endtask

  logic         tm;
  c17_pattern_t a, y1, y2, y;
  logic         h1, h2;
  logic [1:0]   h;

  mapping_logic #(.NMAP(1), .SRC_MASK(5'b01001), .SRC_VAL(5'b01000),
                  .IMG_MASK(5'b10001), .IMG_VAL(5'b00001))
    u_c1 (.test_mode(tm), .orig(a), .xform(y1), .hit(h1));
  mapping_logic #(.NMAP(1), .SRC_MASK(5'b01001), .SRC_VAL(5'b01000),
                  .IMG_MASK(5'b10011), .IMG_VAL(5'b00011))
    u_c2 (.test_mode(tm), .orig(a), .xform(y2), .hit(h2));
  mapping_logic u_dut (.test_mode(tm), .orig(a), .xform(y), .hit(h));

  initial begin
    bit cov0 [5], cov1 [5], cov2 [5], cov [5];
    int n0 = 0, n1 = 0, n2 = 0, n = 0, both = 0;
    tm = 1'b1;
    for (int p = 0; p < NP; p++) begin
      a = orig_set[p];
      #1;
      check($sformatf("C17 pattern %b", a), int'(y), int'(exp_dut[p]));
      if (h == 2'b11) both++;
      for (int c = 0; c < 5; c++) begin
        cov0[c] |= contained(a, test_cubes[c]);
        cov1[c] |= contained(y1, test_cubes[c]);
        cov2[c] |= contained(y2, test_cubes[c]);
        cov[c]  |= contained(y, test_cubes[c]);
      end
    end
    foreach (cov[c]) begin
      n0 += int'(cov0[c]); n1 += int'(cov1[c]); n2 += int'(cov2[c]); n += int'(cov[c]);
    end
    check("test cubes hit by original set", n0, 0);
    check("test cubes hit after be'->a'e", n1, 1);
    check("test cubes hit after be'->a'de", n2, 3);
    check("test cubes hit after both mappings", n, 5);
    check("patterns in both source cubes", both, 1);

    // Exhaustive comparison with the reference, test mode on and off
    for (int m = 0; m < 2; m++) begin
      tm = m[0];
      for (int v = 0; v < 32; v++) begin
        a = 5'(v);
        #1;
        check($sformatf("tm=%0d pattern %b", tm, a), int'(y), int'(ref_map(a, tm)));
        check("decoder be'", int'(h[0]), int'(tm && contained(a, srcs[0])));
        check("decoder a'e'", int'(h[1]), int'(tm && contained(a, srcs[1])));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
