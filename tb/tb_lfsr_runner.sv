// tb_lfsr_runner: runs one lfsr configuration against a reference model for
// CYCLES patterns and reports its own check and failure counts.
//
// The reference keeps the bit sequence s(t), s(t+1), ... of the linear
// recurrence s(t+N) = XOR_k POLY[k] & s(t+k) in an array, and the expected
// pattern at time t is s(t+N-1) ... s(t). Each cycle the DUT pattern is
// compared with it, and the pattern must not return to the seed within
// CYCLES steps (the period must cover the test length). done rises after
// CYCLES compared patterns; the counts at 1K, 10K and 50K are printed.
module tb_lfsr_runner #(
  parameter string        NAME   = "lfsr",
  parameter int           N      = 5,
  parameter logic [N-1:0] POLY   = 5'b00101,
  parameter logic [N-1:0] SEED   = 5'b00111,
  parameter int           CYCLES = 30
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);

  logic [N-1:0] state;

  lfsr #(.N(N), .POLY(POLY), .SEED(SEED)) u_dut (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .state(state)
  );

  bit seq [2*N];   // sliding window of the sequence: seq[k] = s(t+k)
  int t;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) seq[k] = SEED[k];
      t        = 0;
      done     = 1'b0;
      checks   = 0;
      failures = 0;
    end else if (!done) begin
      logic [N-1:0] exp;
      bit nxt;
      for (int k = 0; k < N; k++) exp[k] = seq[k];
      checks++;
      if (state !== exp) begin
        failures++;
        if (failures < 5) $display("FAIL %s t=%0d: got %h expected %h", NAME, t, state, exp);
      end
      if (t > 0) begin
        checks++;
        if (state == SEED) begin
          failures++;
          $display("FAIL %s: seed repeats after %0d patterns", NAME, t);
        end
      end
      nxt = 1'b0;
      for (int k = 0; k < N; k++) if (POLY[k]) nxt ^= seq[k];
      for (int k = 0; k < N - 1; k++) seq[k] = seq[k+1];
      seq[N-1] = nxt;
      t++;
      if (t == 1000 || t == 10000 || t == 50000)
        $display("%s: %0d patterns, %0d failures", NAME, t, failures);
      if (t == CYCLES) done = 1'b1;
    end
  end

endmodule
