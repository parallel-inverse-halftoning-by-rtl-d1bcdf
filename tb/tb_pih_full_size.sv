// tb_pih_full_size: the datapath with every parameter at its default (K = 4,
// N = 8, P = 20, two CAM-ROM banks of 8191 entries per s-LUT). It loads a
// training set of 49,500 templates, about the size of the 8-way partition the
// design was sized for, and then inverse-halftones 20,000 groups of four
// templates (a 320 x 250 pixel image) back to back. The bit count of random
// 20-bit templates clusters around 10, so the partition is uneven (s-LUT 2,
// which takes counts 2, 10 and 18, gets about 8,800 templates) and spills into
// its second CAM-ROM bank, as the fullest s-LUT of a real training set does.
module tb_pih_full_size;
  localparam int unsigned K = ih_pkg::K_DEF, N = ih_pkg::N_DEF, P = ih_pkg::P_DEF;
  localparam int unsigned D = ih_pkg::D_DEF, BANKS = ih_pkg::BANKS_DEF;
  localparam int unsigned LOGN = $clog2(N), BW = (BANKS > 1) ? $clog2(BANKS) : 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                rst_n, in_valid, load_en, out_valid;
  logic [K-1:0][P-1:0] templates;
  logic [P-1:0]        mean_template, load_template;
  logic [LOGN-1:0]     load_slut;
  logic [BW-1:0]       load_bank;
  logic [D-1:0]        load_addr;
  logic [7:0]          load_gray;
  logic [K-1:0][7:0]   gray;
  logic [K-1:0]        out_discarded, out_miss;

  parallel_inverse_halftone dut (.*);

  pih_harness #(.K(K), .N(N), .P(P), .D(D), .BANKS(BANKS),
                .NTRAIN(49500), .NGROUPS(20000), .MISS_PCT(5),
                .WATCHDOG(5000000)) u_h (.*);
endmodule
