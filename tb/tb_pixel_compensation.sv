// tb_pixel_compensation: drives random s-LUT results (each s-LUT carries the
// sequence number of at most one template, numbers never repeat, the highest
// template is always present) with random gray levels and hit flags, and
// compares one clock later with a reference: a template that was looked up
// and found keeps its own gray level, every other template copies the gray
// level given to the next higher template.
module tb_pixel_compensation;
  localparam int K = 4, N = 8, P = 20, GW = 8, SEQ_W = 3, TW = P + SEQ_W;
  int checks = 0, failures = 0, copies = 0, miss_copies = 0;
  logic clk = 0, rst_n, in_valid, out_valid;
  logic [N-1:0][TW-1:0] f;
  logic [N-1:0][GW-1:0] c;
  logic [N-1:0]         hit;
  logic [K-1:0][GW-1:0] gray, eg;
  logic [K-1:0]         discarded, miss, ed, em;

  always #5 clk = ~clk;
  pixel_compensation #(.K(K), .N(N), .P(P), .GW(GW)) dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int slot [K];
    logic [GW-1:0] own [K];
    bit served [K];
    rst_n = 0; in_valid = 0; f = '0; c = '0; hit = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 2000; r++) begin
      f = '0; c = '0; hit = '0;
      for (int i = 0; i < N; i++) f[i][P-1:0] = P'($urandom);  // template bits are don't-care
      for (int j = 0; j < K; j++) begin
        slot[j] = -1;
        if (j == K - 1 || $urandom_range(2) != 0) begin
          int s;
          do s = $urandom_range(N - 1); while (f[s][TW-1 -: SEQ_W] != '0);
          slot[j] = s;
          f[s][TW-1 -: SEQ_W] = SEQ_W'(j + 1);
          hit[s] = ($urandom_range(4) != 0);
          c[s] = hit[s] ? GW'($urandom) : '0;
        end
      end
      for (int j = 0; j < K; j++) begin
        served[j] = slot[j] >= 0 && hit[slot[j]];
        own[j]    = (slot[j] >= 0) ? c[slot[j]] : '0;
        ed[j]     = slot[j] < 0;
        em[j]     = slot[j] >= 0 && !hit[slot[j]];
      end
      eg[K-1] = own[K-1];
      for (int j = K - 2; j >= 0; j--) begin
        eg[j] = served[j] ? own[j] : eg[j+1];
        if (!served[j]) copies++;
        if (em[j]) miss_copies++;
      end
      in_valid = 1;
      @(negedge clk);
      checks++;
      if (!out_valid || gray != eg || discarded != ed || miss != em) begin
        failures++;
        if (failures < 10)
          $display("FAIL: f=%h hit=%b gray=%h exp %h disc=%b exp %b miss=%b exp %b",
                   f, hit, gray, eg, discarded, ed, miss, em);
      end
    end
    checks++;
    if (copies == 0 || miss_copies == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
