// tb_acs_unit - checks every add-compare-select unit of a K=3 and a K=7
// trellis against branch labels from the reference encoder: random path
// metrics (including values near saturation) and every received bit pair.
module tb_acs_unit;
  import vit_tb_pkg::*;
  localparam int PW = 8;

  int checks = 0, failures = 0;

  logic [PW-1:0] p0_3 [4],  p1_3 [4],  n_3 [4];
  logic [PW-1:0] p0_7 [64], p1_7 [64], n_7 [64];
  logic [3:0]    d_3;
  logic [63:0]   d_7;
  logic [1:0]    rx;

  for (genvar j = 0; j < 4; j++) begin : g3
    acs_unit #(.K(3), .STATE(j)) u (.pm_p0(p0_3[j]), .pm_p1(p1_3[j]), .rx, .pm_new(n_3[j]), .dec(d_3[j]));
  end
  for (genvar j = 0; j < 64; j++) begin : g7
    acs_unit #(.K(7), .STATE(j)) u (.pm_p0(p0_7[j]), .pm_p1(p1_7[j]), .rx, .pm_new(n_7[j]), .dec(d_7[j]));
  end

  function automatic int hd(logic [1:0] a, logic [1:0] b);
    return int'(a[0] ^ b[0]) + int'(a[1] ^ b[1]);
  endfunction

  task automatic check_state(int k, int j, int a, int b, int got_pm, logic got_d);
    int unsigned sr;
    int half, p0, s0, s1, exp_pm;
    logic bit_in, exp_d;
    logic [1:0] l0, l1;
    half = (1 << (k - 1)) / 2;
    p0 = 2 * (j % half);
    bit_in = logic'(j / half);
    sr = p0;     l0 = conv_encode(k, sr, bit_in);
    sr = p0 + 1; l1 = conv_encode(k, sr, bit_in);
    s0 = a + hd(rx, l0); if (s0 > 255) s0 = 255;
    s1 = b + hd(rx, l1); if (s1 > 255) s1 = 255;
    exp_d  = s1 < s0;
    exp_pm = exp_d ? s1 : s0;
    checks++;
    if (got_pm != exp_pm || got_d != exp_d) begin
      failures++;
      if (failures < 6) $display("K=%0d state %0d: pm %0d/%0d dec %0b/%0b", k, j, got_pm, exp_pm, got_d, exp_d);
    end
  endtask

  initial begin
    for (int it = 0; it < 200; it++) begin
      rx = 2'(it % 4);
      for (int j = 0; j < 4; j++) begin
        p0_3[j] = (it % 10 == 9) ? PW'(253 + $urandom % 3) : PW'($urandom % 40);
        p1_3[j] = PW'($urandom % 40);
      end
      for (int j = 0; j < 64; j++) begin
        p0_7[j] = PW'($urandom % 40);
        p1_7[j] = (it % 10 == 9) ? PW'(253 + $urandom % 3) : PW'($urandom % 40);
      end
      #1;
      for (int j = 0; j < 4; j++)  check_state(3, j, p0_3[j], p1_3[j], n_3[j], d_3[j]);
      for (int j = 0; j < 64; j++) check_state(7, j, p0_7[j], p1_7[j], n_7[j], d_7[j]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
