// pih_harness: stimulus and checker for the whole inverse-halftoning datapath.
//
// It plays the part of the off-line trainer and of the image source:
//   1. After reset it builds a random training set of NTRAIN templates with
//      random gray levels, partitions it into the N s-LUTs with the rule
//      popcount(t ^ m) mod N (computed here with $countones, independently of
//      the design's adder tree) and loads every table through the load port,
//      filling bank 0 of an s-LUT before bank 1.
//   2. It streams NGROUPS groups of K templates back to back, one group per
//      clock. Most templates come from the training set; a fraction MISS_PCT
//      are new ones that no table holds.
//   3. A reference model predicts each group's gray levels: per s-LUT only the
//      highest-numbered template is looked up, and a template without a gray
//      level of its own copies that of the next higher template. Every output
//      group is compared with it, including the discarded/miss flags and the
//      arrival clock (LATENCY clocks after the group went in).
// It reports the share of groups in which some template lost a collision.
// It also counts how often each mechanism happened (collision drop, table
// miss, a copy that passes over two or more templates, a hit in the second
// CAM-ROM bank) and counts a failure for any that never did.
// Inputs are driven and outputs sampled on the falling clock edge.
module pih_harness #(
  parameter int unsigned K        = 4,
  parameter int unsigned N        = 8,
  parameter int unsigned P        = 20,
  parameter int unsigned D        = 13,
  parameter int unsigned BANKS    = 2,
  parameter int unsigned NTRAIN   = 300,
  parameter int unsigned NGROUPS  = 500,
  parameter int unsigned MISS_PCT = 10,
  parameter int unsigned LATENCY  = 7,
  parameter bit          NEED_BANK1 = 1'b1,
  parameter int unsigned WATCHDOG = 2000000,
  localparam int unsigned LOGN = $clog2(N),
  localparam int unsigned BW   = (BANKS > 1) ? $clog2(BANKS) : 1
) (
  input  logic                clk,
  output logic                rst_n,
  output logic                in_valid,
  output logic [K-1:0][P-1:0] templates,
  output logic [P-1:0]        mean_template,
  output logic                load_en,
  output logic [LOGN-1:0]     load_slut,
  output logic [BW-1:0]       load_bank,
  output logic [D-1:0]        load_addr,
  output logic [P-1:0]        load_template,
  output logic [7:0]          load_gray,
  input  logic                out_valid,
  input  logic [K-1:0][7:0]   gray,
  input  logic [K-1:0]        out_discarded,
  input  logic [K-1:0]        out_miss
);
  localparam int unsigned ENTRIES = 2 ** D - 1;   // usable entries per bank

  typedef struct {
    logic [K-1:0][7:0] gray;
    logic [K-1:0]      discarded;
    logic [K-1:0]      miss;
    longint            due;
  } expect_t;

  int checks = 0, failures = 0;
  longint cycle = 0;
  int n_drop = 0, n_miss = 0, n_long_copy = 0, n_bank1 = 0, n_out = 0, n_grp_drop = 0;

  logic [7:0] table_gray [logic [P-1:0]];   // trained template -> gray
  int         table_bank [logic [P-1:0]];   // trained template -> bank
  logic [P-1:0] train [$];
  int fill [N];
  expect_t q [$];

  function automatic int unsigned xm(logic [P-1:0] t);
    return $countones(t ^ mean_template) % N;
  endfunction

  task automatic finish();
    $display("mechanisms: collision_drops=%0d table_misses=%0d long_copies=%0d bank1_hits=%0d groups_out=%0d",
             n_drop, n_miss, n_long_copy, n_bank1, n_out);
    if (NGROUPS > 0)
      $display("groups with at least one template dropped in a collision: %0d of %0d (%0d%%)",
               n_grp_drop, NGROUPS, n_grp_drop * 100 / int'(NGROUPS));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  function automatic expect_t predict(logic [K-1:0][P-1:0] ts);
    expect_t e;
    int          win [N];
    logic [7:0]  own [K];
    bit          served [K];
    bit          from_bank1 [K];
    for (int s = 0; s < int'(N); s++) win[s] = -1;
    for (int i = 0; i < int'(K); i++) win[xm(ts[i])] = i;   // highest wins
    for (int j = 0; j < int'(K); j++) begin
      bit routed = (win[xm(ts[j])] == j);
      bit known  = table_gray.exists(ts[j]);
      own[j]        = (routed && known) ? table_gray[ts[j]] : 8'd0;
      served[j]     = routed && known;
      from_bank1[j] = served[j] && table_bank[ts[j]] == 1;
      e.discarded[j] = !routed;
      e.miss[j]      = routed && !known;
    end
    e.gray[K-1] = own[K-1];
    for (int j = int'(K) - 2; j >= 0; j--)
      e.gray[j] = served[j] ? own[j] : e.gray[j+1];
    // mechanism counts
    if (e.discarded != '0) n_grp_drop++;
    for (int j = 0; j < int'(K); j++) begin
      if (e.discarded[j]) n_drop++;
      if (e.miss[j]) n_miss++;
      if (from_bank1[j]) n_bank1++;
    end
    for (int j = 0; j + 1 < int'(K) - 1; j++)
      if (!served[j] && !served[j+1]) begin n_long_copy++; break; end
    return e;
  endfunction

  // checker
  always @(negedge clk) begin
    expect_t e;
    cycle <= cycle + 1;
    if (rst_n && out_valid) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: output group with nothing expected at cycle %0d", cycle);
      end else begin
        e = q.pop_front();
        n_out++;
        if (cycle != e.due) begin
          failures++;
          $display("FAIL: group due at cycle %0d arrived at %0d", e.due, cycle);
        end
        checks++;
        if (gray !== e.gray || out_discarded !== e.discarded || out_miss !== e.miss) begin
          failures++;
          if (failures < 10)
            $display("FAIL cycle %0d: gray=%h exp %h disc=%b exp %b miss=%b exp %b",
                     cycle, gray, e.gray, out_discarded, e.discarded, out_miss, e.miss);
        end
      end
    end
  end

  initial begin : watchdog
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish();
  end

  initial begin : stimulus
    logic [P-1:0] t;
    logic [K-1:0][P-1:0] ts;
    longint first_in, last_in;
    rst_n = 1'b0; in_valid = 1'b0; templates = '0; load_en = 1'b0;
    load_slut = '0; load_bank = '0; load_addr = '0; load_template = '0; load_gray = '0;
    mean_template = P'($urandom);
    for (int s = 0; s < int'(N); s++) fill[s] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // 1. training and table load
    while (train.size() < NTRAIN) begin
      int unsigned s;
      t = P'({$urandom, $urandom});
      if (table_gray.exists(t)) continue;
      s = xm(t);
      if (fill[s] >= int'(BANKS * ENTRIES)) continue;   // table full
      train.push_back(t);
      table_gray[t] = 8'($urandom);
      table_bank[t] = fill[s] / ENTRIES;
      @(negedge clk);
      load_en       = 1'b1;
      load_slut     = LOGN'(s);
      load_bank     = BW'(fill[s] / ENTRIES);
      load_addr     = D'(fill[s] % ENTRIES + 1);
      load_template = t;
      load_gray     = table_gray[t];
      fill[s]++;
    end
    @(negedge clk);
    load_en = 1'b0;
    for (int s = 0; s < int'(N); s++) $display("s-LUT %0d holds %0d templates", s, fill[s]);
    repeat (2) @(negedge clk);
    // 2. stream groups, one per clock
    for (int g = 0; g < int'(NGROUPS); g++) begin
      expect_t e;
      for (int i = 0; i < int'(K); i++) begin
        if ($urandom_range(99) < MISS_PCT) begin
          do t = P'({$urandom, $urandom}); while (table_gray.exists(t));
        end else begin
          t = train[$urandom_range(train.size() - 1)];
        end
        ts[i] = t;
      end
      in_valid  = 1'b1;
      templates = ts;
      e = predict(ts);
      e.due = cycle + LATENCY;
      q.push_back(e);
      if (g == 0) first_in = cycle;
      last_in = cycle;
      @(negedge clk);
    end
    in_valid = 1'b0;
    templates = '0;
    repeat (LATENCY + 3) @(negedge clk);
    // 3. throughput, queue drained, mechanisms
    checks++;
    if (last_in - first_in != longint'(NGROUPS) - 1 || n_out != int'(NGROUPS) || q.size() != 0) begin
      failures++;
      $display("FAIL: %0d groups in over %0d clocks, %0d out, %0d pending",
               NGROUPS, last_in - first_in + 1, n_out, q.size());
    end
    checks++;
    if (n_drop == 0) begin failures++; $display("FAIL: no collision drop happened"); end
    checks++;
    if (n_miss == 0) begin failures++; $display("FAIL: no table miss happened"); end
    checks++;
    if (n_long_copy == 0) begin failures++; $display("FAIL: no copy across two templates happened"); end
    if (NEED_BANK1 && BANKS > 1) begin
      checks++;
      if (n_bank1 == 0) begin failures++; $display("FAIL: no hit in the second bank"); end
    end
    finish();
  end
endmodule
