// tb_table1_lfsrs: the seven benchmark LFSR set-ups (stages, characteristic
// polynomial, seed) run side by side for a 50K-pattern test length, the
// longest one evaluated, each compared pattern by pattern with a reference
// model and checked not to repeat its seed within the test length. Progress
// is printed at 1K, 10K and 50K patterns.
module tb_table1_lfsrs;
  import tpg_pkg::*;

  localparam int LEN = 50000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [6:0] done;
  int c [7], f [7];

  tb_lfsr_runner #(.NAME("s420"),  .N(S420_N),  .POLY(S420_POLY),  .SEED(S420_SEED),  .CYCLES(LEN))
    u0 (.clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]));
  tb_lfsr_runner #(.NAME("s641"),  .N(S641_N),  .POLY(S641_POLY),  .SEED(S641_SEED),  .CYCLES(LEN))
    u1 (.clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]));
  tb_lfsr_runner #(.NAME("s713"),  .N(S713_N),  .POLY(S713_POLY),  .SEED(S713_SEED),  .CYCLES(LEN))
    u2 (.clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]));
  tb_lfsr_runner #(.NAME("s838"),  .N(S838_N),  .POLY(S838_POLY),  .SEED(S838_SEED),  .CYCLES(LEN))
    u3 (.clk, .rst_n, .done(done[3]), .checks(c[3]), .failures(f[3]));
  tb_lfsr_runner #(.NAME("s1196"), .N(S1196_N), .POLY(S1196_POLY), .SEED(S1196_SEED), .CYCLES(LEN))
    u4 (.clk, .rst_n, .done(done[4]), .checks(c[4]), .failures(f[4]));
  tb_lfsr_runner #(.NAME("C2670"), .N(C2670_N), .POLY(C2670_POLY), .SEED(C2670_SEED), .CYCLES(LEN))
    u5 (.clk, .rst_n, .done(done[5]), .checks(c[5]), .failures(f[5]));
  tb_lfsr_runner #(.NAME("C7552"), .N(C7552_N), .POLY(C7552_POLY), .SEED(C7552_SEED), .CYCLES(LEN))
    u6 (.clk, .rst_n, .done(done[6]), .checks(c[6]), .failures(f[6]));

  int checks = 0, failures = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (&done);
    @(negedge clk);
    for (int i = 0; i < 7; i++) begin
      checks   += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (LEN + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
