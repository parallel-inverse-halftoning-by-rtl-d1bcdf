// tb_cam: a 15-entry CAM (D = 4). Loads random distinct templates at random
// addresses, then checks that a stored key returns its address one clock
// later, an unknown key returns 0, a rewritten entry answers with its new
// template only, and reset empties the CAM.
module tb_cam;
  localparam int P = 20, D = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n, wr_en;
  logic [D-1:0] wr_addr, match_addr;
  logic [P-1:0] wr_data, key;
  logic [P-1:0] stored [1:15];

  always #5 clk = ~clk;
  cam #(.P(P), .D(D)) dut (.*);

  task automatic lookup(logic [P-1:0] k, logic [D-1:0] exp_addr);
    @(negedge clk) key = k;
    @(negedge clk);                 // one clock of latency
    checks++;
    if (match_addr != exp_addr) begin
      failures++;
      $display("FAIL: key %h got %0d exp %0d", k, match_addr, exp_addr);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; wr_en = 0; wr_addr = '0; wr_data = '0; key = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    lookup('0, '0);                 // empty after reset
    for (int a = 1; a <= 15; a++) stored[a] = P'(a * 40503 + 7);
    for (int a = 15; a >= 1; a--) begin
      @(negedge clk) wr_en = 1; wr_addr = D'(a); wr_data = stored[a];
    end
    @(negedge clk) wr_en = 0;
    for (int r = 0; r < 200; r++) begin
      automatic int a = $urandom_range(15, 1);
      lookup(stored[a], D'(a));
    end
    lookup(20'hFFFFF, '0);
    lookup(20'h00000, '0);
    // overwrite entry 9
    @(negedge clk) wr_en = 1; wr_addr = 4'd9; wr_data = 20'hABCDE;
    @(negedge clk) wr_en = 0;
    lookup(20'hABCDE, 4'd9);
    lookup(stored[9], '0);
    // reset forgets everything
    @(negedge clk) rst_n = 0;
    @(negedge clk) rst_n = 1;
    lookup(stored[3], '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
