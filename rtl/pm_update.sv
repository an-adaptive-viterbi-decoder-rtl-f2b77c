// pm_update - the path-metric registers of one decoder.
//
// In the init context (init) state 0 is loaded with 0 and every other state
// with INIT_PM, so the trellis starts from the all-zero encoder state. In the
// PM-update context (upd_en) every register takes the new ACS result minus
// the smallest of them, which keeps the metrics inside PM_W bits for an
// unbounded stream. init wins over upd_en.
// The init and PM-update steps are named by the design; the normalisation by
// subtraction of the minimum and INIT_PM are this design's choices.
module pm_update
  import viterbi_pkg::*;
#(
  parameter int unsigned       N       = 64,
  parameter logic [PM_W-1:0]   INIT_PM = 8'd64
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            init,
  input  logic            upd_en,
  input  logic [PM_W-1:0] new_pm [N],
  input  logic [PM_W-1:0] min_pm,
  output logic [PM_W-1:0] pm     [N]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N; s++) pm[s] <= (s == 0) ? '0 : INIT_PM;
    end else if (init) begin
      for (int s = 0; s < N; s++) pm[s] <= (s == 0) ? '0 : INIT_PM;
    end else if (upd_en) begin
      for (int s = 0; s < N; s++) pm[s] <= new_pm[s] - min_pm;
    end
  end
endmodule
