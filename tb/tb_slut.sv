// tb_slut: one s-LUT with two CAM-ROM banks of 15 entries (D = 4). Loads 25
// templates (15 in bank 0, 10 in bank 1), streams one tagged template per
// clock, stored or unknown, and checks two clocks later the gray level (the
// OR of both banks, zero when absent), the hit flag and the tagged word that
// travels alongside.
module tb_slut;
  localparam int P = 20, SEQ_W = 3, D = 4, BANKS = 2, GW = 8, TW = P + SEQ_W;
  int checks = 0, failures = 0, bank1_hits = 0;
  logic clk = 0, rst_n, in_valid, wr_en, out_valid, hit;
  logic [TW-1:0] g, f;
  logic [0:0]    wr_bank;
  logic [D-1:0]  wr_addr;
  logic [P-1:0]  wr_template;
  logic [GW-1:0] wr_gray, c;

  typedef struct { logic [TW-1:0] g; logic [GW-1:0] c; logic hit; } exp_t;
  exp_t q [$];
  logic [P-1:0]  tm [25];
  logic [GW-1:0] gv [25];

  always #5 clk = ~clk;
  slut #(.P(P), .SEQ_W(SEQ_W), .D(D), .BANKS(BANKS), .GW(GW)) dut (.*);

  always @(negedge clk) begin
    exp_t e;
    if (rst_n && out_valid) begin
      e = q.pop_front();
      checks++;
      if (f != e.g || c != e.c || hit != e.hit) begin
        failures++;
        $display("FAIL: f=%h c=%h hit=%b exp %h %h %b", f, c, hit, e.g, e.c, e.hit);
      end
    end
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; in_valid = 0; g = '0; wr_en = 0; wr_bank = '0; wr_addr = '0;
    wr_template = '0; wr_gray = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 25; i++) begin
      tm[i] = P'(i * 99991 + 12345);
      gv[i] = GW'($urandom);
      wr_en = 1; wr_bank = (i >= 15); wr_addr = D'(i % 15 + 1);
      wr_template = tm[i]; wr_gray = gv[i];
      @(negedge clk);
    end
    wr_en = 0;
    for (int r = 0; r < 400; r++) begin
      exp_t e;
      automatic int i = $urandom_range(29);       // 25..29: unknown template
      in_valid = 1;
      g = {SEQ_W'($urandom_range(4)), (i < 25) ? tm[i] : P'(20'hF0000 + r)};
      e.g = g; e.hit = (i < 25); e.c = (i < 25) ? gv[i] : '0;
      if (i >= 15 && i < 25) bank1_hits++;
      q.push_back(e);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (q.size() != 0 || bank1_hits == 0) begin
      failures++;
      $display("FAIL: %0d results missing, %0d bank-1 hits", q.size(), bank1_hits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
