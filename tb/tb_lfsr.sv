// tb_lfsr: self-checking testbench for the LFSR pattern generator.
//
// The default 5-stage instance (x^5 + x^2 + 1, primitive) must load the seed
// on reset, visit every one of the 31 non-zero patterns exactly once per
// period and return to the seed after exactly 31 clocks, hold its state while
// en is low, and reload the seed on a second reset. Its patterns are also
// compared with a bit-sequence reference. A 35-stage instance with the s420
// benchmark polynomial x^35 + x^2 + 1 and seed is compared with the reference
// for 2000 patterns through tb_lfsr_runner.
module tb_lfsr;
  import tpg_pkg::*;

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  always #5 clk = ~clk;

  logic [4:0] state;
  lfsr u_dut (.clk(clk), .rst_n(rst_n), .en(en), .state(state));

  logic big_done;
  int   big_checks, big_failures;
  tb_lfsr_runner #(.NAME("s420"), .N(S420_N), .POLY(S420_POLY), .SEED(S420_SEED),
                   .CYCLES(2000))
    u_big (.clk(clk), .rst_n(rst_n), .done(big_done), .checks(big_checks),
           .failures(big_failures));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    bit seen [32];
    bit seq [5];
    int period;
    repeat (2) @(negedge clk);
    check("seed after reset", int'(state), 5'b00111);
    rst_n = 1'b1;
    // en low: the pattern holds
    repeat (3) @(negedge clk);
    check("hold with en low", int'(state), 5'b00111);
    en = 1'b1;
    for (int k = 0; k < 5; k++) seq[k] = state[k];
    period = 0;
    for (int i = 0; i < 31; i++) begin
      logic [4:0] exp;
      bit nxt;
      for (int k = 0; k < 5; k++) exp[k] = seq[k];
      check($sformatf("pattern %0d", i), int'(state), int'(exp));
      check("no repeat within a period", int'(seen[state]), 0);
      seen[state] = 1'b1;
      nxt = seq[0] ^ seq[2];
      for (int k = 0; k < 4; k++) seq[k] = seq[k+1];
      seq[4] = nxt;
      @(negedge clk);
      period++;
      if (state == 5'b00111 && period < 31) check("early return to seed", period, 31);
    end
    check("period", int'(state), 5'b00111);
    check("all-zero pattern never seen", int'(seen[0]), 0);
    begin
      int distinct = 0;
      foreach (seen[v]) distinct += int'(seen[v]);
      check("distinct patterns in one period", distinct, 31);
    end
    // second reset mid-run reloads the seed
    repeat (4) @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    check("seed after second reset", int'(state), 5'b00111);
    rst_n = 1'b1;
    wait (big_done);
    @(negedge clk);
    checks   += big_checks;
    failures += big_failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
