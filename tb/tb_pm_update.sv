// tb_pm_update - checks the path-metric registers: start values after init
// (0 for state 0, 64 elsewhere), normalised update new - min, hold when
// neither control is set, and init taking priority over update.
module tb_pm_update;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N = 16;
  logic       init, upd_en;
  logic [7:0] new_pm [N], pm [N], exp_pm [N];
  logic [7:0] min_pm;

  pm_update #(.N(N)) dut (.clk, .rst_n, .init, .upd_en, .new_pm, .min_pm, .pm);

  task automatic compare(string what);
    checks++;
    foreach (pm[i]) if (pm[i] != exp_pm[i]) begin
      failures++;
      $display("%s: state %0d got %0d exp %0d", what, i, pm[i], exp_pm[i]);
      break;
    end
  endtask

  initial begin
    int m;
    init = 0; upd_en = 0; min_pm = 0;
    foreach (new_pm[i]) new_pm[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 100; it++) begin
      init = (it % 10 == 0);
      upd_en = (it % 10 != 5);
      m = 255;
      foreach (new_pm[i]) begin
        new_pm[i] = 8'(20 + $urandom % 100);
        if (new_pm[i] < m) m = new_pm[i];
      end
      min_pm = 8'(m);
      if (init)        foreach (exp_pm[i]) exp_pm[i] = (i == 0) ? 8'd0 : 8'd64;
      else if (upd_en) foreach (exp_pm[i]) exp_pm[i] = new_pm[i] - 8'(m);
      @(negedge clk);
      compare(init ? "init" : upd_en ? "update" : "hold");
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
