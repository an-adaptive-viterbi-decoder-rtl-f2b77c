// acs_unit - add-compare-select for one trellis state.
//
// A state j at time t+1 is reached from the two states p0 = 2*(j mod 2^(K-2))
// and p1 = p0 + 1 at time t, both with input bit j[K-2]. The unit forms the
// branch metric of each incoming branch as the Hamming distance between the
// received code-bit pair and the branch label, adds it to the predecessor's
// path metric, keeps the smaller sum and reports which predecessor won
// (dec = 1 for p1, i.e. the least significant bit of the survivor's state).
// On a tie p0 wins. Sums saturate at the all-ones path metric.
//
// Purely combinational; the decoder registers the results in its ACS context.
// The trellis structure follows the design; the hard-decision Hamming branch
// metric (1-bit quantised input) and the saturation are this design's choices.
module acs_unit
  import viterbi_pkg::*;
#(
  parameter int unsigned K     = 7,
  parameter int unsigned STATE = 0
) (
  input  logic [PM_W-1:0] pm_p0,   // path metric of predecessor p0
  input  logic [PM_W-1:0] pm_p1,   // path metric of predecessor p1
  input  logic [1:0]      rx,      // received code bits {second, first}
  output logic [PM_W-1:0] pm_new,  // survivor path metric
  output logic            dec      // 1: survivor came from p1
);
  localparam int unsigned HALF = num_states(K) / 2;
  localparam int unsigned P0   = 2 * (STATE % HALF);
  localparam logic        BIT  = logic'(STATE / HALF);
  localparam logic [1:0]  LBL0 = branch_label(K, P0, BIT);
  localparam logic [1:0]  LBL1 = branch_label(K, P0 + 1, BIT);

  logic [1:0]      bm0, bm1;
  logic [PM_W:0]   sum0, sum1;
  logic [PM_W-1:0] cand0, cand1;

  always_comb begin
    bm0   = 2'(rx[0] ^ LBL0[0]) + 2'(rx[1] ^ LBL0[1]);
    bm1   = 2'(rx[0] ^ LBL1[0]) + 2'(rx[1] ^ LBL1[1]);
    sum0  = {1'b0, pm_p0} + (PM_W+1)'(bm0);
    sum1  = {1'b0, pm_p1} + (PM_W+1)'(bm1);
    cand0 = sum0[PM_W] ? '1 : sum0[PM_W-1:0];
    cand1 = sum1[PM_W] ? '1 : sum1[PM_W-1:0];
    dec    = cand1 < cand0;
    pm_new = dec ? cand1 : cand0;
  end
endmodule
