// viterbi_core - one rate-1/2 hard-decision Viterbi decoder of constraint
// length K (2^(K-1) states, trace-back length 5(K-1)).
//
// Data enter one bit per clock: the first code bit of a symbol in the INPUT1
// context, the second in INPUT2 (in_valid/in_ready handshake, a bit moves
// when both are high). In the ACS context all 2^(K-1) add-compare-select
// units work in parallel on the received pair and the stored path metrics;
// their results and decisions are registered and the decisions pushed into
// the trace-back unit. The ranking finds the best state (RANK1 and
// RANK2_SA1), the path metrics are updated and normalised (RANK2_SA1), and
// the systolic trace-back advances over one to three contexts and emits one
// decoded bit per symbol. A symbol takes clocks_per_symbol(K) clocks (4, 5,
// 5, 6, 7 for K = 3..7) when input is not stalled.
//
// out_valid pulses for one clock per decoded bit, one clock after the last
// context of a symbol; the bit is the input bit of decode_delay(K) symbols
// earlier. The first decode_delay(K) symbols after INIT give no output.
// en low holds the decoder in its init context (trellis restarted from
// state 0 when en rises again).
// Structure, context order and sizes follow the design; handshake, output
// validity and the metric arithmetic are this design's choices.
module viterbi_core
  import viterbi_pkg::*;
#(
  parameter int unsigned K = 7
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic in_valid,
  input  logic in_bit,
  output logic in_ready,
  output logic out_valid,
  output logic out_bit,
  output logic sym_done,
  output ctx_e ctx
);
  localparam int unsigned N     = num_states(K);
  localparam int unsigned HALF  = N / 2;
  localparam int unsigned G     = sa_groups(K);
  localparam int unsigned DELAY = decode_delay(K);
  localparam int unsigned CW    = $clog2(DELAY + 1);

  logic [1:0]      rx;
  logic [PM_W-1:0] pm      [N];
  logic [PM_W-1:0] acs_pm  [N];
  logic [N-1:0]    acs_dec;
  logic [PM_W-1:0] acs_pm_q[N];
  logic [PM_W-1:0] min_pm;
  logic [K-2:0]    min_state;
  logic [G-1:0]    grp_en;
  logic            tb_strobe;
  logic [CW-1:0]   nsym;
  logic            fill_ok;

  context_sequencer #(.K(K)) u_seq (
    .clk, .rst_n, .en, .in_valid, .ctx, .sym_done
  );

  assign in_ready = en && (ctx == CTX_INPUT1 || ctx == CTX_INPUT2);

  // Input contexts: one code bit each.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rx <= '0;
    else if (in_valid && in_ready) begin
      if (ctx == CTX_INPUT1) rx[0] <= in_bit;
      else                   rx[1] <= in_bit;
    end
  end

  // ACS context: all states in parallel.
  for (genvar j = 0; j < N; j++) begin : g_acs
    acs_unit #(.K(K), .STATE(j)) u_acs (
      .pm_p0 (pm[2*(j%HALF)]),
      .pm_p1 (pm[2*(j%HALF)+1]),
      .rx    (rx),
      .pm_new(acs_pm[j]),
      .dec   (acs_dec[j])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N; j++) acs_pm_q[j] <= '0;
    end else if (ctx == CTX_ACS) begin
      acs_pm_q <= acs_pm;
    end
  end

  ranking #(.N(N), .SINGLE_CYCLE(K == 3)) u_rank (
    .clk, .rst_n,
    .rank1_en (ctx == CTX_RANK1),
    .pm       (acs_pm_q),
    .min_pm   (min_pm),
    .min_state(min_state)
  );

  pm_update #(.N(N)) u_pm (
    .clk, .rst_n,
    .init   (ctx == CTX_INIT),
    .upd_en (ctx == CTX_RANK2_SA1),
    .new_pm (acs_pm_q),
    .min_pm (min_pm),
    .pm     (pm)
  );

  for (genvar g = 0; g < G; g++) begin : g_grp
    assign grp_en[g] = (ctx == sa_group_ctx(K, g));
  end

  systolic_traceback #(.K(K)) u_tb (
    .clk, .rst_n,
    .clr       (ctx == CTX_INIT),
    .dec_push  (ctx == CTX_ACS),
    .dec_in    (acs_dec),
    .grp_en    (grp_en),
    .best_state(min_state),
    .out_bit   (out_bit),
    .out_strobe(tb_strobe)
  );

  // Symbols since init, saturating once the trace-back pipeline is full.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nsym    <= '0;
      fill_ok <= 1'b0;
    end else if (ctx == CTX_INIT) begin
      nsym    <= '0;
      fill_ok <= 1'b0;
    end else if (sym_done) begin
      fill_ok <= (nsym >= CW'(DELAY));
      if (nsym < CW'(DELAY)) nsym <= nsym + 1'b1;
    end
  end

  assign out_valid = tb_strobe && fill_ok;
endmodule
