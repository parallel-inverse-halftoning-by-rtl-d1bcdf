// tb_cpld1_router: streams one group of four random templates per clock into
// the router (P = 20, N = 8) and checks, four clocks after each group went in,
// all eight s-LUT ports: port s must carry {i+1, t_i} for the highest i whose
// popcount(t_i ^ m) mod 8 equals s, or zero if no template chose s. Some
// groups repeat one template in all four lanes to force full collisions.
module tb_cpld1_router;
  localparam int K = 4, N = 8, P = 20, TW = 23, LAT = 4;
  int checks = 0, failures = 0, collisions = 0;
  logic clk = 0, rst_n, in_valid, out_valid;
  logic [K-1:0][P-1:0] templates;
  logic [P-1:0]        mean_template;
  logic [N-1:0][TW-1:0] port_data;

  typedef struct { logic [N-1:0][TW-1:0] ports; longint due; } exp_t;
  exp_t q [$];
  longint cycle = 0;

  always #5 clk = ~clk;
  cpld1_router #(.K(K), .N(N), .P(P)) dut (.*);

  always @(negedge clk) begin
    exp_t e;
    cycle <= cycle + 1;
    if (rst_n && out_valid) begin
      e = q.pop_front();
      checks++;
      if (port_data != e.ports || cycle != e.due) begin
        failures++;
        if (failures < 10)
          $display("FAIL cycle %0d (due %0d): ports=%h exp %h", cycle, e.due, port_data, e.ports);
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
    rst_n = 0; in_valid = 0; templates = '0; mean_template = 20'h5A3C1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 1000; r++) begin
      exp_t e;
      bit used [N];
      for (int s = 0; s < N; s++) used[s] = 0;
      for (int i = 0; i < K; i++)
        templates[i] = (r % 10 == 0) ? templates[0] : P'($urandom);
      if (r % 10 == 0) for (int i = 1; i < K; i++) templates[i] = templates[0];
      e.ports = '0;
      for (int i = 0; i < K; i++) begin
        automatic int s = $countones(templates[i] ^ mean_template) % N;
        if (used[s]) collisions++;
        used[s] = 1;
        e.ports[s] = {3'(i + 1), templates[i]};
      end
      e.due = cycle + LAT;
      q.push_back(e);
      in_valid = 1;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (q.size() != 0 || collisions == 0) begin
      failures++;
      $display("FAIL: %0d groups missing, %0d collisions", q.size(), collisions);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
