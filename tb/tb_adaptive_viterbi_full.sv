// tb_adaptive_viterbi_full - the adaptive decoder at its default parameters
// (250,000-symbol reconfiguration interval): six full intervals decoded at
// K = 7, 3, 4, 5, 6 and 7. The SNRs held during the intervals are 6.0, 5.0,
// 4.5, 4.0 dB, then 6.0 dB with adaptation off (so K returns to 7), then
// 2.0 dB (K stays 7). Intervals 2 and 4 have input stalls, all have channel
// errors; every decoded bit, the switches, the clock request and the clocks
// per symbol are checked (see top_harness). About 8.5 M clocks.
module tb_adaptive_viterbi_full;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              adapt_en, in_valid, in_bit, in_ready, out_valid, out_bit, reconfig, done;
  logic signed [9:0] snr_db10;
  logic [2:0]        out_k, k_active;
  viterbi_pkg::ctx_e ctx_active;
  logic              max_rate;
  logic [15:0]       clk_khz;
  int                checks, failures;

  adaptive_viterbi_top dut (
    .clk, .rst_n, .adapt_en, .snr_db10, .max_rate, .in_valid, .in_bit, .in_ready,
    .out_valid, .out_bit, .out_k, .k_active, .reconfig, .ctx_active, .clk_khz);

  top_harness #(
    .INTERVAL(250000), .NF(6),
    .SNR('{60, 50, 45, 40, 60, 20, 0, 0, 0, 0, 0, 0}),
    .ADAPT('{1, 1, 1, 1, 0, 1, 0, 0, 0, 0, 0, 0}),
    .STALL('{0, 1, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0}), .ALL_MECH(1)
  ) h (
    .clk, .rst_n, .adapt_en, .snr_db10, .in_valid, .in_bit, .in_ready,
    .out_valid, .out_bit, .out_k, .k_active, .reconfig, .ctx_active,
    .max_rate, .clk_khz, .checks, .failures, .done);

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
