// tb_tpg_top: end-to-end testbench of the test pattern generator at its
// default (C17) configuration.
//
// A reference LFSR (bit-sequence recurrence of x^5 + x^2 + 1 from seed
// 00111) and a reference cube mapping written from the cube strings
// be' -> a'de and a'e' -> ab'c' predict every original and transformed
// pattern. The run covers two full LFSR periods with test mode on, one with
// test mode off, and a stretch with en low. It counts each mechanism and
// fails if one never happened: a pattern moved by the first mapping only, by
// the second only, a pattern in both source cubes (second overrides first),
// test mode off (patterns pass unchanged), a pattern hold with en low, and
// the LFSR returning to its seed after 31 patterns. It also checks that one
// new pattern appears per enabled clock and that, over one period with test
// mode on, all five C17 test cubes of the worked example are hit.
module tb_tpg_top;

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, test_mode = 1'b1;
  always #5 clk = ~clk;

  logic [4:0] orig_pattern, cut_pattern;
  logic [1:0] map_hit;

  tpg_top u_dut (
    .clk(clk), .rst_n(rst_n), .en(en), .test_mode(test_mode),
    .orig_pattern(orig_pattern), .cut_pattern(cut_pattern), .map_hit(map_hit)
  );

  string srcs [2] = '{"X1XX0", "0XXX0"};
  string imgs [2] = '{"0XX11", "100XX"};
  string test_cubes [5] = '{"XX00X", "X111X", "010X1", "0111X", "X001X"};

  function automatic bit contained(input logic [4:0] a, input string c);
    for (int i = 0; i < 5; i++) begin
      if (c[i] == "0" && a[4-i] != 1'b0) return 0;
      if (c[i] == "1" && a[4-i] != 1'b1) return 0;
    end
    return 1;
  endfunction

  function automatic logic [4:0] ref_map(input logic [4:0] a, input bit tm);
    logic [4:0] r = a;
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
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  bit seq [5];
  int n_map1 = 0, n_map2 = 0, n_both = 0, n_off = 0, n_hold = 0, n_wrap = 0;

  // compare the current outputs with the reference, then step the reference
  task automatic compare_and_step(input bit step);
    logic [4:0] exp_o;
    bit nxt;
    for (int k = 0; k < 5; k++) exp_o[k] = seq[k];
    check("original pattern", int'(orig_pattern), int'(exp_o));
    check($sformatf("cut pattern (tm=%0d orig=%b)", test_mode, exp_o),
          int'(cut_pattern), int'(ref_map(exp_o, test_mode)));
    check("decoder 0", int'(map_hit[0]), int'(test_mode && contained(exp_o, srcs[0])));
    check("decoder 1", int'(map_hit[1]), int'(test_mode && contained(exp_o, srcs[1])));
    if (map_hit == 2'b01) n_map1++;
    if (map_hit == 2'b10) n_map2++;
    if (map_hit == 2'b11) n_both++;
    if (!test_mode && ref_map(exp_o, 1'b1) != exp_o) begin
      n_off++;
      check("unchanged in normal mode", int'(cut_pattern), int'(exp_o));
    end
    if (step) begin
      nxt = seq[0] ^ seq[2];
      for (int k = 0; k < 4; k++) seq[k] = seq[k+1];
      seq[4] = nxt;
    end
  endtask

  initial begin
    bit cov [5];
    int ncov = 0, t = 0;
    logic [4:0] seed = 5'b00111;
    repeat (2) @(negedge clk);
    check("seed at reset", int'(orig_pattern), int'(seed));
    for (int k = 0; k < 5; k++) seq[k] = seed[k];
    rst_n = 1'b1;
    en    = 1'b1;
    // two periods with test mode on
    for (int i = 0; i < 62; i++) begin
      if (i < 31)
        for (int c = 0; c < 5; c++) cov[c] |= contained(cut_pattern, test_cubes[c]);
      compare_and_step(1'b1);
      @(negedge clk);
      t++;
      if (orig_pattern == seed) begin
        n_wrap++;
        check("period of the LFSR", t, 31);
        t = 0;
      end
    end
    foreach (cov[c]) ncov += int'(cov[c]);
    check("C17 test cubes hit in one period", ncov, 5);
    // en low: the pattern holds for three clocks
    en = 1'b0;
    for (int i = 0; i < 3; i++) begin
      logic [4:0] prev;
      prev = orig_pattern;
      compare_and_step(1'b0);
      @(negedge clk);
      check("hold with en low", int'(orig_pattern), int'(prev));
      n_hold++;
    end
    en = 1'b1;
    // one period in normal mode
    test_mode = 1'b0;
    for (int i = 0; i < 31; i++) begin
      compare_and_step(1'b1);
      @(negedge clk);
    end
    test_mode = 1'b1;
    #1;
    compare_and_step(1'b0);

    $display("mapping 1 only: %0d, mapping 2 only: %0d, both (override): %0d", n_map1, n_map2, n_both);
    $display("normal mode, pattern left unchanged: %0d, holds: %0d, LFSR wraps: %0d",
             n_off, n_hold, n_wrap);
    check("mapping 1 used", int'(n_map1 > 0), 1);
    check("mapping 2 used", int'(n_map2 > 0), 1);
    check("override used", int'(n_both > 0), 1);
    check("test mode off seen", int'(n_off > 0), 1);
    check("hold seen", int'(n_hold > 0), 1);
    check("LFSR wrapped twice", n_wrap, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
