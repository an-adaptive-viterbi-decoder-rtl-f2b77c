// tb_viterbi_core - self-checking test of the decoder core for all five
// constraint lengths K = 3..7 in parallel (see core_harness): bit-exact
// decoding of clean and corrupted streams, decode delay, clocks per symbol,
// input stalls and re-initialisation.
module tb_viterbi_core;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int   c [3:7], f [3:7], st [3:7], er [3:7];
  logic d [3:7];
  int   checks, failures;

  for (genvar k = 3; k <= 7; k++) begin : g_k
    core_harness #(.K(k), .NSYM(600)) h (
      .clk, .rst_n, .checks(c[k]), .failures(f[k]), .stalls(st[k]),
      .errs_injected(er[k]), .done(d[k])
    );
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  initial begin
    @(posedge rst_n);
    wait (d[3] && d[4] && d[5] && d[6] && d[7]);
    checks = 0; failures = 0;
    for (int k = 3; k <= 7; k++) begin
      checks += c[k]; failures += f[k];
      $display("K=%0d checks=%0d failures=%0d stalls=%0d errors_injected=%0d",
               k, c[k], f[k], st[k], er[k]);
      checks++;
      if (st[k] == 0 || er[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end
endmodule
