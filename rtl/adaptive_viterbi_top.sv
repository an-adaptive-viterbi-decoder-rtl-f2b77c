// adaptive_viterbi_top - adaptive Viterbi decoder: five rate-1/2 decoders
// with constraint lengths K = 3, 4, 5, 6 and 7, of which one is active at a
// time, and a controller that switches between them from the channel SNR.
//
// A large K corrects more errors but costs more logic activity and more
// clocks per symbol (7 for K=7 against 4 for K=3); when the channel is good a
// small K meets the same bit error rate. Every RECONF_INTERVAL symbols the
// controller picks the smallest K that reaches BER 1e-5 at the current SNR;
// the chosen decoder is enabled and restarts its trellis in a one-clock init
// context, the others sit idle in their init context.
//
// Interface: a 1-bit code stream (two bits per symbol) with in_valid/in_ready,
// a 1-bit decoded stream with out_valid (no back-pressure), the SNR estimate
// snr_db10 (signed, 0.1 dB units) and adapt_en (low: always K=7). k_active is
// the selected K, out_k the K of the decoder that produced out_bit, reconfig
// pulses when K changes, ctx_active is the active decoder's current context
// and clk_khz the clock frequency the active decoder should run at (its
// maximum with max_rate high, else the one giving 4.71 Mbit/s); the clock
// generator that acts on it is outside this design. A switch lands on a
// symbol boundary; the new decoder expects a code stream that starts from
// the all-zero encoder state, and the last decode_delay(K) bits of the old
// decoder's stream are not decoded.
// The decoder set and the SNR-driven switching follow the design; the
// interface and the switch protocol are this design's choices.
module adaptive_viterbi_top
  import viterbi_pkg::*;
#(
  parameter int unsigned RECONF_INTERVAL = 250000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              adapt_en,
  input  logic signed [9:0] snr_db10,
  input  logic              max_rate,
  input  logic              in_valid,
  input  logic              in_bit,
  output logic              in_ready,
  output logic              out_valid,
  output logic              out_bit,
  output k_t                out_k,
  output k_t                k_active,
  output logic              reconfig,
  output ctx_e              ctx_active,
  output logic [15:0]       clk_khz
);
  localparam int unsigned NK = K_MAX - K_MIN + 1;

  logic [NK-1:0] en, rdy, ov, ob, sd;
  ctx_e          ctx [NK];
  logic          sym_done;

  adaptive_controller #(.INTERVAL(RECONF_INTERVAL)) u_ctrl (
    .clk, .rst_n, .adapt_en, .snr_db10,
    .sym_done, .max_rate, .k_sel(k_active), .reconfig, .clk_khz
  );

  for (genvar i = 0; i < NK; i++) begin : g_dec
    assign en[i] = (k_active == k_t'(K_MIN + i));
    viterbi_core #(.K(K_MIN + i)) u_core (
      .clk, .rst_n,
      .en       (en[i]),
      .in_valid (in_valid && en[i]),
      .in_bit   (in_bit),
      .in_ready (rdy[i]),
      .out_valid(ov[i]),
      .out_bit  (ob[i]),
      .sym_done (sd[i]),
      .ctx      (ctx[i])
    );
  end

  assign in_ready   = |rdy;
  assign ctx_active = ctx[k_active - k_t'(K_MIN)];
  assign sym_done = |sd;

  // A decoder's last output appears one clock after its last symbol, possibly
  // after it was switched out, so outputs are merged rather than selected.
  always_comb begin
    out_valid = |ov;
    out_bit   = |(ov & ob);
    out_k     = k_active;
    for (int i = 0; i < NK; i++) if (ov[i]) out_k = k_t'(K_MIN + i);
  end

  a_one_output: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ov));
  a_one_active: assert property (@(posedge clk) disable iff (!rst_n) $onehot(en));
endmodule
