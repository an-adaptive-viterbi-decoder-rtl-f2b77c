// ranking - finds the smallest path metric and the state that holds it.
//
// The search is split over two contexts, as in the decoder's schedule:
// in the Ranking1 context (rank1_en) each group of GROUP consecutive states
// is reduced to its minimum and that state index, and the group results are
// registered; in the Ranking2 context a combinational comparison over the
// registered group results gives min_pm / min_state. With SINGLE_CYCLE = 1
// (used by the K = 3 decoder, which has no separate Ranking1 context) the
// whole search is combinational on pm. Ties go to the lowest state index.
// The two-part split is the design's; the grouping into 8-state groups is
// this design's choice.
module ranking
  import viterbi_pkg::*;
#(
  parameter int unsigned N            = 64,
  parameter int unsigned GROUP        = 8,
  parameter bit          SINGLE_CYCLE = 0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  rank1_en,
  input  logic [PM_W-1:0]       pm [N],
  output logic [PM_W-1:0]       min_pm,
  output logic [$clog2(N)-1:0]  min_state
);
  localparam int unsigned GS = (GROUP < N) ? GROUP : N;
  localparam int unsigned NG = N / GS;
  localparam int unsigned SW = $clog2(N);

  logic [PM_W-1:0] g_pm_c  [NG];
  logic [SW-1:0]   g_idx_c [NG];
  logic [PM_W-1:0] g_pm_q  [NG];
  logic [SW-1:0]   g_idx_q [NG];

  // Ranking1: minimum within each group.
  always_comb begin
    for (int g = 0; g < NG; g++) begin
      g_pm_c[g]  = pm[g*GS];
      g_idx_c[g] = SW'(g*GS);
      for (int s = 1; s < GS; s++) begin
        if (pm[g*GS+s] < g_pm_c[g]) begin
          g_pm_c[g]  = pm[g*GS+s];
          g_idx_c[g] = SW'(g*GS+s);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < NG; g++) begin
        g_pm_q[g]  <= '0;
        g_idx_q[g] <= '0;
      end
    end else if (rank1_en) begin
      g_pm_q  <= g_pm_c;
      g_idx_q <= g_idx_c;
    end
  end

  // Ranking2: minimum across the groups.
  always_comb begin
    if (SINGLE_CYCLE) begin
      min_pm    = g_pm_c[0];
      min_state = g_idx_c[0];
      for (int g = 1; g < NG; g++) begin
        if (g_pm_c[g] < min_pm) begin
          min_pm    = g_pm_c[g];
          min_state = g_idx_c[g];
        end
      end
    end else begin
      min_pm    = g_pm_q[0];
      min_state = g_idx_q[0];
      for (int g = 1; g < NG; g++) begin
        if (g_pm_q[g] < min_pm) begin
          min_pm    = g_pm_q[g];
          min_state = g_idx_q[g];
        end
      end
    end
  end
endmodule
