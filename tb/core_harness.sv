// core_harness - drives one viterbi_core of constraint length K with
// encoded random data, checks every decoded bit and the timing.
//
// Three runs: a clean stream, a stream with isolated single code-bit errors
// (one every 3*5(K-1) symbols) and random input stalls, and, after dropping
// en for a few clocks (decoder re-initialised), a second clean stream. For
// each run the n-th decoded bit must equal the n-th source bit, the number of
// decoded bits must be NSYM minus the expected delay, and a stall-free
// symbol must take the expected clocks per symbol. Results are reported on
// checks/failures when done rises.
module core_harness
  import vit_tb_pkg::*;
#(
  parameter int K    = 7,
  parameter int NSYM = 400
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   stalls,
  output int   errs_injected,
  output logic done
);
  logic en, in_valid, in_bit, in_ready, out_valid, out_bit, sym_done;
  viterbi_pkg::ctx_e ctx;

  viterbi_core #(.K(K)) dut (
    .clk, .rst_n, .en, .in_valid, .in_bit, .in_ready,
    .out_valid, .out_bit, .sym_done, .ctx
  );

  logic src [NSYM];
  int   nout;
  int   last_done_cyc, cyc;
  bit   stalled_sym;

  always_ff @(posedge clk) cyc <= cyc + 1;

  // Output checker.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (nout >= NSYM || out_bit !== src[nout]) begin
        failures++;
        if (failures < 5) $display("K=%0d bit %0d: got %0b", K, nout, out_bit);
      end
      nout++;
    end
  end

  // Throughput checker: stall-free symbols take exp_cps(K) clocks.
  always @(posedge clk) begin
    if (rst_n && en && in_ready && !in_valid && last_done_cyc >= 0) stalled_sym = 1;
    if (rst_n && sym_done) begin
      if (last_done_cyc >= 0 && !stalled_sym) begin
        checks++;
        if (cyc - last_done_cyc != exp_cps(K)) begin
          failures++;
          $display("K=%0d symbol took %0d clocks", K, cyc - last_done_cyc);
        end
      end
      last_done_cyc = cyc;
      stalled_sym   = 0;
    end
  end

  // Drives on the falling edge, so in_ready is settled for the next rising
  // edge, at which the bit is taken.
  task automatic send_bit(input logic b, input bit allow_stall);
    if (allow_stall && ($urandom % 8) == 0) begin
      in_valid = 1'b0;
      stalls++;
      repeat (1 + $urandom % 3) @(negedge clk);
    end
    in_valid = 1'b1;
    in_bit   = b;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic run(input bit noisy);
    int unsigned sr;
    logic [1:0]  c;
    int          gap;
    sr   = 0;
    nout = 0;
    gap  = 3 * 5 * (K - 1);
    last_done_cyc = -1;
    for (int i = 0; i < NSYM; i++) src[i] = logic'($urandom % 2);
    for (int i = 0; i < NSYM; i++) begin
      c = conv_encode(K, sr, src[i]);
      if (noisy && (i % gap) == gap / 2) begin
        c[$urandom % 2] ^= 1'b1;
        errs_injected++;
      end
      send_bit(c[0], noisy);
      send_bit(c[1], noisy);
    end
    repeat (3 * exp_cps(K)) @(negedge clk);
    checks++;
    if (nout != NSYM - exp_delay(K)) begin
      failures++;
      $display("K=%0d: %0d decoded bits, expected %0d", K, nout, NSYM - exp_delay(K));
    end
  endtask

  initial begin
    checks = 0; failures = 0; stalls = 0; errs_injected = 0; done = 0;
    cyc = 0; last_done_cyc = -1; stalled_sym = 0; nout = 0;
    en = 1'b1; in_valid = 1'b0; in_bit = 1'b0;
    @(posedge rst_n);
    @(negedge clk);
    run(0);
    run_reinit();
    run(1);
    run_reinit();
    run(0);
    done = 1;
  end

  task automatic run_reinit();
    en = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (ctx != viterbi_pkg::CTX_INIT) failures++;
    en = 1'b1;
    @(negedge clk);
  endtask
endmodule
