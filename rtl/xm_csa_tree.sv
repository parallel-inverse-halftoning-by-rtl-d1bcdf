// xm_csa_tree: the "XM" function that picks the s-LUT of a template.
//
// The template t is XORed bit by bit with m, the mean template of the training
// set; the ones of the result are counted with a carry-save adder tree and the
// count is taken modulo N by keeping its log2(N) least significant bits:
//   slut = popcount(t ^ m) mod N.
// As in the original design, only those low bits are ever formed: the tree works
// on log2(N)-bit words, so no full-width count exists. The tree shape is a
// generic 3:2 reduction (csa_reduce) rather than a copy of any particular
// wiring. N must be a power of two, at least 2. Purely combinational; the
// caller registers the result.
module xm_csa_tree #(
  parameter int unsigned P = ih_pkg::P_DEF,
  parameter int unsigned N = ih_pkg::N_DEF,
  localparam int unsigned LOGN = $clog2(N)
) (
  input  logic [P-1:0]    tmpl,   // template t
  input  logic [P-1:0]    mean,   // m
  output logic [LOGN-1:0] slut    // s-LUT number, 0..N-1
);
  logic [P-1:0]           u;
  logic [P-1:0][LOGN-1:0] ops;

  assign u = tmpl ^ mean;
  always_comb
    for (int i = 0; i < int'(P); i++) ops[i] = LOGN'(u[i]);

  csa_reduce #(.NIN(P), .W(LOGN)) u_tree (.ops(ops), .sum(slut));

  initial assert (N >= 2 && (N & (N - 1)) == 0)
    else $error("xm_csa_tree: N must be a power of two, at least 2");
endmodule
