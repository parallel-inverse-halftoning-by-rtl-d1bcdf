// csa_reduce: sums NIN operands of W bits modulo 2^W with a tree of carry-save
// adders (3:2 compressors).
//
// The tree is built level by level. On each level the operands are grouped in
// threes; a group becomes a sum word (a ^ b ^ c) and a carry word (majority,
// shifted up one bit), and the one or two leftover operands pass to the next
// level unchanged. Levels repeat until at most two words remain, which one
// carry-propagate adder combines. Everything is truncated to W bits, which is
// exact for the low W bits of the sum: this is what lets the bit count of a
// template be reduced straight to an s-LUT number. Purely combinational.
// Level l takes level_size(l) operands from the level before it.
module csa_reduce #(
  parameter int unsigned NIN = 3,
  parameter int unsigned W   = 3
) (
  input  logic [NIN-1:0][W-1:0] ops,
  output logic [W-1:0]          sum
);
  // Number of operands left after l levels of 3:2 compression.
  function automatic int unsigned level_size(int unsigned l);
    int unsigned n = NIN;
    for (int unsigned i = 0; i < l; i++) n = 2 * (n / 3) + n % 3;
    return n;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned n = NIN, l = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + n % 3;
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels();

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned NI   = level_size(l);
    localparam int unsigned NT   = NI / 3;
    localparam int unsigned NR   = NI % 3;
    localparam int unsigned NOUT = 2 * NT + NR;
    logic [NI-1:0][W-1:0]   in_w;
    logic [NOUT-1:0][W-1:0] nxt;
    if (l == 0) begin : g_src_ops
      assign in_w = ops;
    end else begin : g_src_prev
      assign in_w = g_level[l-1].nxt;
    end
    for (genvar t = 0; t < NT; t++) begin : g_csa
      logic [W-1:0] a, b, c;
      assign a = in_w[3*t];
      assign b = in_w[3*t+1];
      assign c = in_w[3*t+2];
      assign nxt[2*t]   = a ^ b ^ c;
      assign nxt[2*t+1] = W'(((a & b) | (a & c) | (b & c)) << 1);
    end
    for (genvar r = 0; r < NR; r++) begin : g_pass
      assign nxt[2*NT+r] = in_w[3*NT+r];
    end
  end

  localparam int unsigned NLAST = level_size(LEVELS);
  logic [NLAST-1:0][W-1:0] last;
  if (LEVELS == 0) begin : g_last_ops
    assign last = ops;
  end else begin : g_last_tree
    assign last = g_level[LEVELS-1].nxt;
  end
  if (NLAST == 1) begin : g_one
    assign sum = last[0];
  end else begin : g_add
    assign sum = last[0] + last[1];
  end
endmodule
