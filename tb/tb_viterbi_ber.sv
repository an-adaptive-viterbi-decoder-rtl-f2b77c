// tb_viterbi_ber - bit-error-rate run of the five decoders over a simulated
// radio channel: random data -> rate-1/2 convolutional encoder -> BPSK
// (+1/-1) -> additive white Gaussian noise -> 1-bit quantiser -> decoder ->
// comparison with the data. Each decoder K = 3..7 decodes NSYM symbols at each
// of the SNRs (Eb/N0) 3.2, 3.8, 4.3, 4.9 and 5.3 dB; the five decoders run in
// parallel. Gaussian samples come from the Box-Muller transform of $urandom.
//
// Checks: at every point the decoded BER is below the raw channel BER; from
// 4.3 dB up the K=7 decoder makes fewer errors than the K=3 decoder (below
// that the hard-decision channel is too noisy for the ordering); every
// decoder makes fewer errors at 5.3 dB than at 3.2 dB. The BER table is
// printed. With a 1-bit quantiser the absolute BERs are well above those of
// a soft-decision receiver at the same SNR.
module tb_viterbi_ber;
  import vit_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NSYM = 50000;
  localparam int NSNR = 5;
  localparam int SNR_DB10 [NSNR] = '{32, 38, 43, 49, 53};

  int   dec_err [3:7][NSNR];
  int   raw_err [3:7][NSNR];
  int   nbits   [3:7][NSNR];
  bit   d       [3:7];

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979 * u2);
  endfunction

  for (genvar k = 3; k <= 7; k++) begin : g_k
    logic en, in_valid, in_bit, in_ready, out_valid, out_bit, sym_done;
    viterbi_pkg::ctx_e ctx;
    bit   src [NSYM];
    int   nout, cur;

    viterbi_core #(.K(k)) dut (
      .clk, .rst_n, .en, .in_valid, .in_bit, .in_ready,
      .out_valid, .out_bit, .sym_done, .ctx);

    always @(posedge clk) begin
      if (rst_n && out_valid) begin
        if (out_bit != src[nout]) dec_err[k][cur]++;
        nbits[k][cur]++;
        nout++;
      end
    end

    initial begin
      int unsigned sr;
      logic [1:0] c;
      real sigma, y;
      logic q;
      d[k] = 0; en = 0; in_valid = 0; in_bit = 0; cur = 0; nout = 0;
      @(posedge rst_n);
      for (int si = 0; si < NSNR; si++) begin
        dec_err[k][si] = 0; raw_err[k][si] = 0; nbits[k][si] = 0;
        sigma = $sqrt(1.0 / (10.0 ** (real'(SNR_DB10[si]) / 100.0)));
        // restart the decoder from the zero state
        @(negedge clk); en = 0; @(negedge clk); @(negedge clk);
        cur = si; nout = 0; sr = 0; en = 1;
        for (int i = 0; i < NSYM; i++) begin
          src[i] = bit'($urandom % 2);
          c = conv_encode(k, sr, src[i]);
          for (int b = 0; b < 2; b++) begin
            y = (c[b] ? -1.0 : 1.0) + sigma * gauss();
            q = (y < 0.0);
            if (q != c[b]) raw_err[k][si]++;
            in_valid = 1; in_bit = q;
            while (!in_ready) @(negedge clk);
            @(negedge clk);
            in_valid = 0;
          end
        end
        repeat (10) @(negedge clk);
      end
      d[k] = 1;
    end
  end

  initial begin
    int checks, failures;
    checks = 0; failures = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (d[3] && d[4] && d[5] && d[6] && d[7]);
    $display("Eb/N0(dB)  raw BER   K=3       K=4       K=5       K=6       K=7");
    for (int si = 0; si < NSNR; si++) begin
      $display("%4.1f       %8.2e  %8.2e  %8.2e  %8.2e  %8.2e  %8.2e", SNR_DB10[si] / 10.0,
               real'(raw_err[7][si]) / (2.0 * NSYM),
               real'(dec_err[3][si]) / real'(nbits[3][si]), real'(dec_err[4][si]) / real'(nbits[4][si]),
               real'(dec_err[5][si]) / real'(nbits[5][si]), real'(dec_err[6][si]) / real'(nbits[6][si]),
               real'(dec_err[7][si]) / real'(nbits[7][si]));
      for (int k = 3; k <= 7; k++) begin
        checks++;
        if (nbits[k][si] != NSYM - exp_delay(k)) failures++;
        checks++;
        if (real'(dec_err[k][si]) / real'(nbits[k][si]) >= real'(raw_err[k][si]) / (2.0 * NSYM)) begin
          failures++;
          $display("K=%0d at %0d: no coding gain", k, SNR_DB10[si]);
        end
      end
      checks++;
      if (SNR_DB10[si] >= 43 && dec_err[7][si] >= dec_err[3][si]) begin
        failures++;
        $display("at %0d: K=7 not better than K=3", SNR_DB10[si]);
      end
    end
    for (int k = 3; k <= 7; k++) begin
      checks++;
      if (dec_err[k][NSNR-1] >= dec_err[k][0]) begin
        failures++;
        $display("K=%0d: no improvement with SNR", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end
endmodule
