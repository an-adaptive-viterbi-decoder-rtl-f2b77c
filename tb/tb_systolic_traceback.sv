// tb_systolic_traceback - drives the trace-back unit for K = 4, 6 and 7 with
// a random trellis path: each symbol the decision vector has the true
// predecessor bit at the path's state (other entries random) and the best
// state is the path's state. Every decoded bit after the expected delay
// (29, 48 and 57 symbols) must equal the path's input bit of that age, and
// one output strobe must follow each symbol. Idle clocks are mixed in.
module tb_systolic_traceback;
  import vit_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int c [3], f [3];
  bit d [3];
  localparam int KS [3] = '{4, 6, 7};

  for (genvar gi = 0; gi < 3; gi++) begin : g_k
    localparam int K = KS[gi];
    localparam int N = 1 << (K - 1);
    localparam int G = (K == 7) ? 3 : (K == 6) ? 2 : 1;
    localparam int NSYM = 300;

    logic         clr, dec_push, out_bit, out_strobe;
    logic [N-1:0] dec_in;
    logic [G-1:0] grp_en;
    logic [K-2:0] best_state;
    logic         u [NSYM];
    int           nstrobe;

    systolic_traceback #(.K(K)) dut (
      .clk, .rst_n, .clr, .dec_push, .dec_in, .grp_en, .best_state, .out_bit, .out_strobe);

    always @(posedge clk) if (rst_n && out_strobe) nstrobe++;

    initial begin
      int unsigned s, prev;
      c[gi] = 0; f[gi] = 0; d[gi] = 0; nstrobe = 0;
      clr = 0; dec_push = 0; dec_in = '0; grp_en = '0; best_state = '0;
      @(posedge rst_n);
      @(negedge clk);
      clr = 1; @(negedge clk); clr = 0;
      s = 0;
      for (int t = 0; t < NSYM; t++) begin
        u[t] = logic'($urandom % 2);
        prev = s;
        s = (int'(u[t]) << (K - 2)) | (prev >> 1);
        // ACS context: push decisions
        for (int i = 0; i < N; i++) dec_in[i] = logic'($urandom % 2);
        dec_in[s] = logic'(prev & 1);
        dec_push = 1; @(negedge clk); dec_push = 0;
        repeat ($urandom % 2) @(negedge clk);
        best_state = (K-1)'(s);
        for (int g = 0; g < G; g++) begin
          grp_en = G'(1) << g;
          @(negedge clk);
          grp_en = '0;
          best_state = (K-1)'($urandom);
        end
        // the output of this symbol is registered now
        if (t >= exp_delay(K)) begin
          c[gi]++;
          if (out_bit != u[t - exp_delay(K)]) begin
            f[gi]++;
            if (f[gi] < 4) $display("K=%0d t=%0d got %0b exp %0b", K, t, out_bit, u[t - exp_delay(K)]);
          end
        end
      end
      @(negedge clk);
      c[gi]++;
      if (nstrobe != NSYM) begin
        f[gi]++;
        $display("K=%0d %0d strobes", K, nstrobe);
      end
      d[gi] = 1;
    end
  end

  initial begin
    int checks, failures;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (d[0] && d[1] && d[2]);
    checks = c[0] + c[1] + c[2];
    failures = f[0] + f[1] + f[2];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end
endmodule
