// tb_xm_csa_tree: checks the XM function, s-LUT = popcount(t ^ m) mod N,
// against $countones for the original design's size (P = 20, N = 8) on corner
// patterns and 5,000 random template/mean pairs, and for a second size
// (P = 22, N = 16) on random pairs. The function is combinational; values are
// applied and checked one time step apart.
module tb_xm_csa_tree;
  int checks = 0, failures = 0;

  logic [19:0] t20, m20;
  logic [2:0]  s20;
  logic [21:0] t22, m22;
  logic [3:0]  s22;

  xm_csa_tree #(.P(20), .N(8))  dut20 (.tmpl(t20), .mean(m20), .slut(s20));
  xm_csa_tree #(.P(22), .N(16)) dut22 (.tmpl(t22), .mean(m22), .slut(s22));

  task automatic check20(logic [19:0] t, logic [19:0] m);
    t20 = t; m20 = m; #1;
    checks++;
    if (s20 != 3'($countones(t ^ m) % 8)) begin
      failures++;
      $display("FAIL P=20: t=%h m=%h got %0d exp %0d", t, m, s20, $countones(t ^ m) % 8);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check20('0, '0);
    check20('1, '0);
    check20('1, '1);
    for (int i = 0; i < 20; i++) check20(20'(1) << i, '0);
    for (int n = 0; n <= 20; n++) check20(20'((64'(1) << n) - 1), '0);  // n ones
    for (int i = 0; i < 5000; i++) check20(20'($urandom), 20'($urandom));
    for (int i = 0; i < 2000; i++) begin
      t22 = 22'($urandom); m22 = 22'($urandom); #1;
      checks++;
      if (s22 != 4'($countones(t22 ^ m22) % 16)) begin
        failures++;
        $display("FAIL P=22: t=%h m=%h got %0d", t22, m22, s22);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
