// parallel_inverse_halftone: look-up-table inverse halftoning of K templates
// per clock through N smaller look-up tables (s-LUTs).
//
// A template is the binary neighbourhood of one halftone pixel; its gray level
// comes from a table built off-line from training images. Instead of one big
// table that can serve one template per clock, the table is split into N
// s-LUTs by the XM function, popcount(template ^ m) mod N, and the K templates
// of a group are steered to their s-LUTs in parallel. When several templates
// of a group fall on the same s-LUT only the highest-numbered one is looked
// up; each template that gets no gray level of its own copies that of the next
// higher template.
//
// Structure:  cpld1_router (4 clocks) -> N x slut (2 clocks)
//             -> pixel_compensation (1 clock).
// A group presented with in_valid leaves 7 clocks later with out_valid; a new
// group can be presented every clock. gray[j] belongs to templates[j].
// The s-LUTs are filled before use through the load port: load_slut picks the
// s-LUT, load_bank the CAM-ROM pair, load_addr (1..2^D-1) the entry. The
// contents must have been partitioned with the same mean_template that is
// applied here. K, N, P and the 8-bit gray level are the original design's
// configuration; D, BANKS, the load port and the pipeline registers are this
// implementation's choices.
module parallel_inverse_halftone #(
  parameter int unsigned K     = ih_pkg::K_DEF,
  parameter int unsigned N     = ih_pkg::N_DEF,
  parameter int unsigned P     = ih_pkg::P_DEF,
  parameter int unsigned D     = ih_pkg::D_DEF,
  parameter int unsigned BANKS = ih_pkg::BANKS_DEF,
  localparam int unsigned GW    = ih_pkg::GRAY_W,
  localparam int unsigned SEQ_W = ih_pkg::seq_width(K),
  localparam int unsigned TW    = P + SEQ_W,
  localparam int unsigned LOGN  = $clog2(N),
  localparam int unsigned BW    = (BANKS > 1) ? $clog2(BANKS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // template groups
  input  logic                 in_valid,
  input  logic [K-1:0][P-1:0]  templates,
  input  logic [P-1:0]         mean_template,
  // s-LUT load port
  input  logic                 load_en,
  input  logic [LOGN-1:0]      load_slut,
  input  logic [BW-1:0]        load_bank,
  input  logic [D-1:0]         load_addr,
  input  logic [P-1:0]         load_template,
  input  logic [GW-1:0]        load_gray,
  // gray levels
  output logic                 out_valid,
  output logic [K-1:0][GW-1:0] gray,
  output logic [K-1:0]         out_discarded,
  output logic [K-1:0]         out_miss
);
  logic                 r_valid;
  logic [N-1:0][TW-1:0] g, f;
  logic [N-1:0][GW-1:0] c;
  logic [N-1:0]         hit, s_valid;

  cpld1_router #(.K(K), .N(N), .P(P)) u_router (
    .clk, .rst_n, .in_valid, .templates, .mean_template,
    .out_valid(r_valid), .port_data(g));

  for (genvar i = 0; i < N; i++) begin : g_slut
    slut #(.P(P), .SEQ_W(SEQ_W), .D(D), .BANKS(BANKS), .GW(GW)) u_slut (
      .clk, .rst_n, .in_valid(r_valid), .g(g[i]),
      .wr_en(load_en && load_slut == LOGN'(i)), .wr_bank(load_bank),
      .wr_addr(load_addr), .wr_template(load_template), .wr_gray(load_gray),
      .out_valid(s_valid[i]), .f(f[i]), .c(c[i]), .hit(hit[i]));
  end

  pixel_compensation #(.K(K), .N(N), .P(P), .GW(GW)) u_comp (
    .clk, .rst_n, .in_valid(&s_valid), .f, .c, .hit,
    .out_valid, .gray, .discarded(out_discarded), .miss(out_miss));
endmodule
