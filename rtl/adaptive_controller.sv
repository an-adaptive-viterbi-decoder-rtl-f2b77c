// adaptive_controller - chooses the decoder's constraint length from the SNR.
//
// The active decoder reports the end of every symbol (sym_done). Every
// INTERVAL symbols (250,000 by default) the controller samples the channel
// SNR estimate snr_db10 (signed, 0.1 dB units) and selects the smallest K
// whose SNR for a bit error rate of 1e-5 is met: K=3 from 5.3 dB, K=4 from
// 4.9 dB, K=5 from 4.3 dB, K=6 from 3.8 dB, else K=7. With adapt_en low the
// choice is always K=7 (no adaptation). After reset K=7 is active.
// k_sel changes on the clock edge that ends the interval's last symbol, so the
// switch lands on a symbol boundary; reconfig pulses for one clock when K
// changes.
// clk_khz requests the clock frequency for the selected decoder from the
// clock generator: its maximum frequency when max_rate is high (39.8, 44.76,
// 37.05, 36.51, 32.95 MHz for K = 3..7), otherwise the frequency that keeps
// the throughput at 4.71 Mbit/s (18.83, 23.54, 23.54, 28.25, 32.95 MHz).
// The interval, the thresholds and the SNR-driven choice of the smallest
// sufficient K and the frequency table follow the design; the SNR encoding, the reset choice and the
// adapt_en control are this design's choices.
module adaptive_controller
  import viterbi_pkg::*;
#(
  parameter int unsigned INTERVAL = 250000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              adapt_en,
  input  logic signed [9:0] snr_db10,
  input  logic              sym_done,
  input  logic              max_rate,
  output k_t                k_sel,
  output logic              reconfig,
  output logic [15:0]       clk_khz
);
  localparam int unsigned CW = $clog2(INTERVAL + 1);

  logic [CW-1:0] cnt;
  k_t            k_want;

  always_comb begin
    k_want = k_t'(K_MAX);
    if (adapt_en) begin
      for (int k = K_MAX; k >= K_MIN; k--) begin
        if (int'(snr_db10) >= snr_threshold_db10(k)) k_want = k_t'(k);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      k_sel    <= k_t'(K_MAX);
      reconfig <= 1'b0;
    end else begin
      reconfig <= 1'b0;
      if (sym_done) begin
        if (cnt == CW'(INTERVAL - 1)) begin
          cnt <= '0;
          if (k_want != k_sel) begin
            k_sel    <= k_want;
            reconfig <= 1'b1;
          end
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  always_comb begin
    clk_khz = '0;
    for (int k = K_MIN; k <= K_MAX; k++) begin
      if (k_sel == k_t'(k)) clk_khz = 16'(max_rate ? clk_khz_max(k) : clk_khz_fixed(k));
    end
  end

  a_k_range: assert property (@(posedge clk) disable iff (!rst_n)
    k_sel >= k_t'(K_MIN) && k_sel <= k_t'(K_MAX));
endmodule
