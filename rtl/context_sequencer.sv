// context_sequencer - steps one decoder through its hardware contexts.
//
// Every symbol follows the same loop of contexts, one clock each:
//   INPUT1 -> INPUT2 -> ACS -> RANK1 -> RANK2_SA1 -> SA2 -> SA3_OUT -> INPUT1
// for K = 7 (seven clocks per symbol). K = 6 omits SA2 (six clocks), K = 4 and
// 5 also omit SA3_OUT and produce the output in RANK2_SA1 (five clocks), and
// K = 3 omits RANK1 as well (four clocks). The two input contexts wait while
// in_valid is low (input stall). INIT, the one-clock init context, is entered
// out of reset and whenever en is low, so a decoder that is switched in
// restarts its trellis in one clock. sym_done marks the last context of a
// symbol.
// The context order and the clocks per symbol follow the design; the stall
// on in_valid and the return to INIT when disabled are this design's choices.
module context_sequencer
  import viterbi_pkg::*;
#(
  parameter int unsigned K = 7
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic in_valid,
  output ctx_e ctx,
  output logic sym_done
);
  localparam int unsigned G = sa_groups(K);
  localparam ctx_e LAST = (G == 1) ? CTX_RANK2_SA1 : CTX_SA3_OUT;

  ctx_e ctx_n;

  always_comb begin
    ctx_n = ctx;
    if (!en) begin
      ctx_n = CTX_INIT;
    end else begin
      unique case (ctx)
        CTX_INIT:      ctx_n = CTX_INPUT1;
        CTX_INPUT1:    if (in_valid) ctx_n = CTX_INPUT2;
        CTX_INPUT2:    if (in_valid) ctx_n = CTX_ACS;
        CTX_ACS:       ctx_n = (K == 3) ? CTX_RANK2_SA1 : CTX_RANK1;
        CTX_RANK1:     ctx_n = CTX_RANK2_SA1;
        CTX_RANK2_SA1: ctx_n = (G == 3) ? CTX_SA2 : (G == 2) ? CTX_SA3_OUT : CTX_INPUT1;
        CTX_SA2:       ctx_n = CTX_SA3_OUT;
        CTX_SA3_OUT:   ctx_n = CTX_INPUT1;
        default:       ctx_n = CTX_INIT;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ctx <= CTX_INIT;
    else        ctx <= ctx_n;
  end

  assign sym_done = en && (ctx == LAST);
endmodule
