// top_harness - stimulus and checking for the adaptive decoder top.
//
// The stream is cut into NF frames of INTERVAL symbols. During frame f the
// harness holds SNR[f] and ADAPT[f] on the controller inputs, which decide
// the K of frame f+1 (frame 0 runs at K=7 after reset). Each frame's random
// data are encoded with the reference encoder of that frame's K; where K
// changes, the encoder restarts from the all-zero state. Isolated single
// code-bit errors are injected every 3*5(K-1) symbols, and frames with
// STALL[f] set get random input stalls.
//
// Checks: k_active equals the K expected from the SNR table at every frame
// start, and the clock request matches that K (max_rate alternates by
// frame); reconfig pulses exactly once per change; every decoded bit equals
// the source bit of its segment (a run of frames with one K) in order; each
// segment yields exactly its length minus the decoder's delay; stall-free
// symbols take the expected clocks per symbol. Counters report how often
// each mechanism happened (switch, kept K, adaptation off, stall, init
// context, corrected errors, each K used); one that never happened counts as
// a failure.
module top_harness
  import vit_tb_pkg::*;
#(
  parameter int INTERVAL = 150,
  parameter int NF       = 9,
  // per-frame settings; only the first NF entries are used
  parameter int SNR   [12] = '{60, 60, 50, 45, 40, 20, 60, 60, 60, 0, 0, 0},
  parameter bit ADAPT [12] = '{1, 1, 1, 1, 1, 1, 0, 1, 1, 0, 0, 0},
  parameter bit STALL [12] = '{0, 1, 0, 1, 0, 1, 0, 1, 0, 0, 0, 0},
  parameter bit ALL_MECH   = 1   // 0: only switch, stall, init and errors are required
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              adapt_en,
  output logic signed [9:0] snr_db10,
  output logic              in_valid,
  output logic              in_bit,
  input  logic              in_ready,
  input  logic              out_valid,
  input  logic              out_bit,
  input  logic [2:0]        out_k,
  input  logic [2:0]        k_active,
  input  logic              reconfig,
  input  viterbi_pkg::ctx_e ctx_active,
  output logic              max_rate,
  input  logic [15:0]       clk_khz,
  output int                checks,
  output int                failures,
  output logic              done
);
  localparam int TOTAL = NF * INTERVAL;

  bit src [TOTAL];
  int seg_start [NF], seg_len [NF], seg_k [NF];
  int nseg, cs, idx;
  int cyc, n_reconfig, n_init, n_stall, n_err, n_keep, n_noadapt, n_cps;
  bit k_used [3:7];

  always_ff @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (reconfig) n_reconfig++;
    if (ctx_active == viterbi_pkg::CTX_INIT) n_init++;
    if (in_ready && !in_valid && !done) n_stall++;
  end

  // Output checker.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (int'(out_k) != seg_k[cs]) begin
        checks++;
        if (idx != seg_len[cs] - exp_delay(seg_k[cs])) begin
          failures++;
          $display("segment %0d (K=%0d): %0d bits decoded", cs, seg_k[cs], idx);
        end
        cs++;
        idx = 0;
      end
      checks++;
      if (cs >= nseg || int'(out_k) != seg_k[cs] || idx >= seg_len[cs] ||
          out_bit != src[seg_start[cs] + idx]) begin
        failures++;
        if (failures < 6) $display("segment %0d bit %0d: got %0b from K=%0d", cs, idx, out_bit, out_k);
      end
      idx++;
    end
  end

  task automatic send_bit(input logic b, input bit stall);
    if (stall && ($urandom % 6) == 0) begin
      in_valid = 1'b0;
      repeat (1 + $urandom % 3) @(negedge clk);
    end
    in_valid = 1'b1;
    in_bit   = b;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    int unsigned sr;
    int k, k_next, gap, last_cyc, rc0;
    logic [1:0] c;
    checks = 0; failures = 0; done = 0; cyc = 0;
    nseg = 0; cs = 0; idx = 0;
    n_reconfig = 0; n_init = 0; n_stall = 0; n_err = 0; n_keep = 0; n_noadapt = 0; n_cps = 0;
    adapt_en = 1'b1; snr_db10 = '0; max_rate = 1'b0; in_valid = 1'b0; in_bit = 1'b0;
    @(posedge rst_n);
    @(negedge clk);
    k = 7;
    for (int f = 0; f < NF; f++) begin
      // Wait until the previous symbol has left the decoder.
      while (!in_ready) @(negedge clk);
      checks++;
      if (int'(k_active) != k) begin
        failures++;
        $display("frame %0d: K=%0d, expected %0d", f, k_active, k);
      end
      k_used[k] = 1;
      max_rate = f[0];
      #1;
      checks++;
      if (int'(clk_khz) != exp_khz(k, max_rate)) begin
        failures++;
        $display("frame %0d: clock request %0d kHz", f, clk_khz);
      end
      if (f == 0 || seg_k[nseg-1] != k) begin
        seg_start[nseg] = f * INTERVAL;
        seg_len[nseg]   = 0;
        seg_k[nseg]     = k;
        nseg++;
        sr = 0;
      end
      snr_db10 = 10'(SNR[f]);
      adapt_en = ADAPT[f];
      if (!ADAPT[f]) n_noadapt++;
      rc0 = n_reconfig;
      gap = 3 * 5 * (k - 1);
      last_cyc = -1;
      for (int i = 0; i < INTERVAL; i++) begin
        src[f*INTERVAL + i] = bit'($urandom % 2);
        seg_len[nseg-1]++;
        c = conv_encode(k, sr, src[f*INTERVAL + i]);
        if ((i % gap) == gap / 2) begin
          c[$urandom % 2] ^= 1'b1;
          n_err++;
        end
        send_bit(c[0], STALL[f]);
        if (!STALL[f] && last_cyc >= 0) begin
          n_cps++;
          checks++;
          if (cyc - last_cyc != exp_cps(k)) begin
            failures++;
            $display("frame %0d: symbol took %0d clocks", f, cyc - last_cyc);
          end
        end
        last_cyc = cyc;
        send_bit(c[1], STALL[f]);
      end
      k_next = ADAPT[f] ? k_for_snr(SNR[f]) : 7;
      if (k_next == k) n_keep++;
      // reconfig must pulse once at the end of the frame iff K changes
      while (!in_ready) @(negedge clk);
      checks++;
      if (n_reconfig - rc0 != int'(k_next != k)) begin
        failures++;
        $display("frame %0d: %0d reconfig pulses", f, n_reconfig - rc0);
      end
      k = k_next;
    end
    repeat (80 * 7) @(negedge clk);
    checks++;
    if (idx != seg_len[cs] - exp_delay(seg_k[cs]) || cs != nseg - 1) begin
      failures++;
      $display("last segment %0d of %0d: %0d bits decoded", cs, nseg, idx);
    end
    $display("mechanisms: switches=%0d kept=%0d adapt_off=%0d stall_clocks=%0d init_clocks=%0d errors_injected=%0d cps_checks=%0d",
             n_reconfig, n_keep, n_noadapt, n_stall, n_init, n_err, n_cps);
    if (ALL_MECH) begin
      for (int kk = 3; kk <= 7; kk++) begin
        checks++;
        if (!k_used[kk]) begin failures++; $display("K=%0d never used", kk); end
      end
      checks++; if (n_keep == 0)    begin failures++; $display("no kept K"); end
      checks++; if (n_noadapt == 0) begin failures++; $display("adaptation never off"); end
    end
    checks++; if (n_reconfig == 0) begin failures++; $display("no switch"); end
    checks++; if (n_stall == 0)    begin failures++; $display("no stall"); end
    checks++; if (n_init == 0)     begin failures++; $display("no init"); end
    checks++; if (n_err == 0)      begin failures++; $display("no errors injected"); end
    checks++; if (n_cps == 0)      begin failures++; $display("no rate check"); end
    done = 1;
  end
endmodule
