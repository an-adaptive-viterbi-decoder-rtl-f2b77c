// tb_ranking - checks the two-context minimum search (64 states, groups of
// 8) and the single-context variant (4 states) against a plain linear search
// with lowest-index tie break; also checks that the two-context result holds
// while rank1_en is low.
module tb_ranking;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       rank1_en;
  logic [7:0] pm64 [64], pm4 [4];
  logic [7:0] min64, min4;
  logic [5:0] idx64;
  logic [1:0] idx4;

  ranking #(.N(64), .GROUP(8), .SINGLE_CYCLE(0)) u64 (
    .clk, .rst_n, .rank1_en, .pm(pm64), .min_pm(min64), .min_state(idx64));
  ranking #(.N(4), .GROUP(8), .SINGLE_CYCLE(1)) u4 (
    .clk, .rst_n, .rank1_en(1'b0), .pm(pm4), .min_pm(min4), .min_state(idx4));

  task automatic ref_min(input logic [7:0] v [], output int m, output int ix);
    m = 256; ix = -1;
    foreach (v[i]) if (v[i] < m) begin m = v[i]; ix = i; end
  endtask

  initial begin
    int m, ix;
    logic [7:0] v64 [], v4 [];
    rank1_en = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      v64 = new[64]; v4 = new[4];
      foreach (v64[i]) begin v64[i] = 8'($urandom % ((it % 3 == 0) ? 4 : 200)); pm64[i] = v64[i]; end
      foreach (v4[i])  begin v4[i]  = 8'($urandom % ((it % 3 == 0) ? 2 : 200)); pm4[i]  = v4[i]; end
      rank1_en = 1;
      @(negedge clk);
      rank1_en = 0;
      ref_min(v64, m, ix);
      checks++;
      if (min64 != 8'(m) || idx64 != 6'(ix)) begin
        failures++;
        $display("64: got %0d@%0d exp %0d@%0d", min64, idx64, m, ix);
      end
      ref_min(v4, m, ix);
      checks++;
      if (min4 != 8'(m) || idx4 != 2'(ix)) begin
        failures++;
        $display("4: got %0d@%0d exp %0d@%0d", min4, idx4, m, ix);
      end
      // Hold: new inputs without rank1_en must not change the result.
      ref_min(v64, m, ix);
      foreach (pm64[i]) pm64[i] = 8'($urandom);
      pm64[$urandom % 64] = 0;
      @(negedge clk);
      checks++;
      if (min64 != 8'(m) || idx64 != 6'(ix)) failures++;
    end
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
