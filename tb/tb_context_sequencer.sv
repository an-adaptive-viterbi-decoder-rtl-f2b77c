// tb_context_sequencer - checks the context order of all five decoders
// (K = 3..7) against the expected per-K symbol loops, the input stall in
// both input contexts, sym_done on the last context only, and the return to
// the init context when en drops.
module tb_context_sequencer;
  import viterbi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, stalls = 0;

  logic en, in_valid;
  ctx_e ctx [3:7];
  logic sd  [3:7];

  for (genvar k = 3; k <= 7; k++) begin : g_k
    context_sequencer #(.K(k)) u (.clk, .rst_n, .en, .in_valid, .ctx(ctx[k]), .sym_done(sd[k]));
  end

  // Expected loops, written out per K.
  function automatic void expected(int k, output ctx_e seq [8], output int n);
    case (k)
      3: begin seq[0:3] = '{CTX_INPUT1, CTX_INPUT2, CTX_ACS, CTX_RANK2_SA1}; n = 4; end
      4, 5: begin seq[0:4] = '{CTX_INPUT1, CTX_INPUT2, CTX_ACS, CTX_RANK1, CTX_RANK2_SA1}; n = 5; end
      6: begin seq[0:5] = '{CTX_INPUT1, CTX_INPUT2, CTX_ACS, CTX_RANK1, CTX_RANK2_SA1, CTX_SA3_OUT}; n = 6; end
      default: begin seq[0:6] = '{CTX_INPUT1, CTX_INPUT2, CTX_ACS, CTX_RANK1, CTX_RANK2_SA1, CTX_SA2, CTX_SA3_OUT}; n = 7; end
    endcase
  endfunction

  initial begin
    ctx_e seq [8];
    int n, pos;
    en = 0; in_valid = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 3; k <= 7; k++) begin
      en = 0; in_valid = 1;
      @(negedge clk);
      checks++; if (ctx[k] != CTX_INIT) failures++;
      en = 1;
      @(negedge clk);   // init context taken
      expected(k, seq, n);
      pos = 0;
      for (int cyc = 0; cyc < 20 * n; cyc++) begin
        // stall in an input context now and then
        in_valid = !((seq[pos] == CTX_INPUT1 || seq[pos] == CTX_INPUT2) && ($urandom % 4 == 0));
        checks++;
        if (ctx[k] != seq[pos] || sd[k] != (pos == n - 1)) begin
          failures++;
          $display("K=%0d cycle %0d: ctx %s exp %s sym_done %0b", k, cyc, ctx[k].name(), seq[pos].name(), sd[k]);
        end
        if (!in_valid) stalls++;
        @(negedge clk);
        if (in_valid) pos = (pos + 1) % n;
      end
      en = 0;
      @(negedge clk);
      checks++; if (ctx[k] != CTX_INIT) failures++;
    end
    checks++; if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
