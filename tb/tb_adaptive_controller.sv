// tb_adaptive_controller - checks the K choice with a 10-symbol interval:
// after reset K=7; at each interval end K follows the SNR thresholds
// (5.3/4.9/4.3/3.8 dB), K never changes inside an interval, reconfig pulses
// exactly when K changes, with adapt_en low K returns to 7, and the clock
// request follows the selected K in both rate modes. sym_done
// pulses arrive with random gaps.
module tb_adaptive_controller;
  import vit_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, switches = 0, keeps = 0;

  localparam int INTERVAL = 10;
  logic              adapt_en, sym_done, reconfig, max_rate;
  logic [15:0]       clk_khz;
  logic signed [9:0] snr;
  logic [2:0]        k_sel;

  adaptive_controller #(.INTERVAL(INTERVAL)) dut (
    .clk, .rst_n, .adapt_en, .snr_db10(snr), .sym_done, .max_rate, .k_sel, .reconfig, .clk_khz);

  initial begin
    int exp_k, new_k;
    int snrs [] = '{60, 53, 52, 49, 48, 43, 42, 38, 37, 32, 10, -20, 55, 55, 45, 45};
    adapt_en = 1; sym_done = 0; snr = 0; max_rate = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    exp_k = 7;
    for (int iv = 0; iv < snrs.size() + 3; iv++) begin
      if (iv < snrs.size()) snr = 10'(snrs[iv]);
      adapt_en = (iv < snrs.size());
      for (int s = 0; s < INTERVAL; s++) begin
        repeat ($urandom % 3) begin
          @(negedge clk);
          checks++; if (reconfig) failures++;
        end
        sym_done = 1;
        @(negedge clk);
        sym_done = 0;
        if (s == INTERVAL - 1) begin
          new_k = adapt_en ? k_for_snr(snrs[iv]) : 7;
          checks++;
          if (reconfig != (new_k != exp_k)) failures++;
          if (new_k != exp_k) switches++; else keeps++;
          exp_k = new_k;
        end else begin
          checks++; if (reconfig) failures++;
        end
        max_rate = bit'($urandom % 2);
        #1;
        checks++;
        if (int'(clk_khz) != exp_khz(exp_k, max_rate)) begin
          failures++;
          $display("K=%0d max_rate=%0b: clock %0d kHz", exp_k, max_rate, clk_khz);
        end
        checks++;
        if (k_sel != 3'(exp_k)) begin
          failures++;
          $display("interval %0d symbol %0d: K=%0d exp %0d", iv, s, k_sel, exp_k);
        end
      end
    end
    checks++; if (switches < 5 || keeps < 2) failures++;
    $display("switches=%0d keeps=%0d", switches, keeps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
