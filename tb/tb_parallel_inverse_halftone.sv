// tb_parallel_inverse_halftone: end-to-end test of the datapath at a reduced
// table size (2 banks of 31 entries per s-LUT) so that 300 trained templates
// overflow into the second CAM-ROM bank. K, N and P keep their full values.
// See pih_harness for what is driven and checked.
module tb_parallel_inverse_halftone;
  localparam int unsigned K = 4, N = 8, P = 20, D = 5, BANKS = 2;
  localparam int unsigned LOGN = $clog2(N), BW = 1;

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

  parallel_inverse_halftone #(.K(K), .N(N), .P(P), .D(D), .BANKS(BANKS)) dut (.*);

  pih_harness #(.K(K), .N(N), .P(P), .D(D), .BANKS(BANKS),
                .NTRAIN(300), .NGROUPS(2000), .MISS_PCT(10)) u_h (.*);
endmodule
