// tb_adaptive_viterbi_top - end-to-end test of the adaptive decoder with a
// 150-symbol reconfiguration interval: nine frames whose SNR sequence walks
// the decoder through K = 7, 3, 3, 4, 5, 6, 7, 7 (adaptation off), 3, with
// channel errors and input stalls (see top_harness for the checks).
module tb_adaptive_viterbi_top;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              adapt_en, in_valid, in_bit, in_ready, out_valid, out_bit, reconfig, done;
  logic signed [9:0] snr_db10;
  logic [2:0]        out_k, k_active;
  viterbi_pkg::ctx_e ctx_active;
  logic              max_rate;
  logic [15:0]       clk_khz;
  int                checks, failures;

  adaptive_viterbi_top #(.RECONF_INTERVAL(150)) dut (
    .clk, .rst_n, .adapt_en, .snr_db10, .max_rate, .in_valid, .in_bit, .in_ready,
    .out_valid, .out_bit, .out_k, .k_active, .reconfig, .ctx_active, .clk_khz);

  top_harness #(.INTERVAL(150)) h (
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
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
