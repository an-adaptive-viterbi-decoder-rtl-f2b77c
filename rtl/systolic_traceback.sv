// systolic_traceback - pipelined (systolic) trace-back unit of one decoder.
//
// The unit has L = 5(K-1) stages. Stage 0 takes the best state of the
// current symbol from the ranking; every stage replaces its state s by its
// predecessor {s[K-3:0], d}, where d is the ACS decision of state s at the
// matching trellis time, and hands the result to the next stage. After L
// stages the MSB of the reached state is the decoded bit (the input bit that
// created that state), so each symbol yields one decoded bit traced back L
// steps.
//
// The stages are spread over G contexts (3 for K=7, 2 for K=6, 1 otherwise);
// grp_en[g] is high in the context that advances group g. Because a stage
// sees the previous stage's result of the same symbol only across a context
// boundary, the trellis time of each stage is a fixed age sa_tap(K,i) behind
// the current symbol; the decisions of the last sa_tap(K,L-1)+1 symbols are
// kept in a shift register (pushed by dec_push in the ACS context) and each
// stage reads the age it needs. out_bit/out_strobe are registered in the
// last group's context; out_bit is the input bit of decode_delay(K) symbols
// earlier.
// Stage count and context split follow the design; the shift-register
// decision store and the stage timing are this design's choices.
module systolic_traceback
  import viterbi_pkg::*;
#(
  parameter int unsigned K = 7
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    dec_push,
  input  logic [num_states(K)-1:0] dec_in,
  input  logic [sa_groups(K)-1:0] grp_en,
  input  logic [K-2:0]            best_state,
  output logic                    out_bit,
  output logic                    out_strobe
);
  localparam int unsigned N  = num_states(K);
  localparam int unsigned L  = tb_length(K);
  localparam int unsigned G  = sa_groups(K);
  localparam int unsigned GS = sa_group_size(K);
  localparam int unsigned D  = sa_tap(K, L - 1) + 1;  // history depth

  logic [N-1:0] hist [D];
  logic [K-2:0] st   [1:L-1];  // st[i]: state waiting at stage i
  logic [K-2:0] cur  [L];
  logic [K-2:0] nxt  [L];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < D; j++) hist[j] <= '0;
    end else if (clr) begin
      for (int j = 0; j < D; j++) hist[j] <= '0;
    end else if (dec_push) begin
      hist[0] <= dec_in;
      for (int j = 1; j < D; j++) hist[j] <= hist[j-1];
    end
  end

  for (genvar i = 0; i < L; i++) begin : g_stage
    localparam int unsigned TAP = sa_tap(K, i);
    localparam int unsigned GRP = i / GS;
    logic d;
    if (i == 0) begin : g_head
      assign cur[i] = best_state;
    end else begin : g_body
      assign cur[i] = st[i];
    end
    assign d      = hist[TAP][cur[i]];
    assign nxt[i] = {cur[i][K-3:0], d};
    if (i < L - 1) begin : g_fwd
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)          st[i+1] <= '0;
        else if (clr)        st[i+1] <= '0;
        else if (grp_en[GRP]) st[i+1] <= nxt[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_bit    <= 1'b0;
      out_strobe <= 1'b0;
    end else begin
      out_strobe <= grp_en[G-1] && !clr;
      if (grp_en[G-1]) out_bit <= nxt[L-1][K-2];
    end
  end
endmodule
