// slut: one smaller look-up table (s-LUT), built from BANKS CAM-ROM pairs.
//
// The template part of the incoming tagged word goes to every bank's CAM at
// once. A CAM answers with the ROM address of the template or with 0; its ROM
// turns that into the gray level, or zero for address 0, so the banks' outputs
// are ORed into the s-LUT's result (only one bank can hold a template). hit
// tells whether any bank held it. The tagged word itself travels alongside
// unchanged (it is what the next stage uses to know whose gray level this
// is). Latency is 2 clocks (CAM, then ROM), one lookup per clock.
// Load port: wr_bank selects the bank, wr_addr (not 0) the entry; the template
// goes to the CAM and the gray level to the ROM at the same address.
// CAM-ROM pairs, the zero-for-absent rule and the OR of several pairs follow
// the original design; the load port and the hit output are this implementation's.
module slut #(
  parameter int unsigned P     = ih_pkg::P_DEF,
  parameter int unsigned SEQ_W = 3,
  parameter int unsigned D     = ih_pkg::D_DEF,
  parameter int unsigned BANKS = ih_pkg::BANKS_DEF,
  parameter int unsigned GW    = ih_pkg::GRAY_W,
  localparam int unsigned TW = P + SEQ_W,
  localparam int unsigned BW = (BANKS > 1) ? $clog2(BANKS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [TW-1:0] g,            // tagged template from the router
  input  logic          wr_en,
  input  logic [BW-1:0] wr_bank,
  input  logic [D-1:0]  wr_addr,
  input  logic [P-1:0]  wr_template,
  input  logic [GW-1:0] wr_gray,
  output logic          out_valid,
  output logic [TW-1:0] f,            // tagged template, delayed
  output logic [GW-1:0] c,            // gray level, 0 if absent
  output logic          hit
);
  logic [BANKS-1:0][D-1:0]  x;
  logic [BANKS-1:0][GW-1:0] bank_c;
  logic [1:0][TW-1:0]       f_q;
  logic [1:0]               v_q;
  logic                     hit_q;

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    logic sel;
    assign sel = wr_en && (BANKS == 1 || wr_bank == BW'(b));
    cam #(.P(P), .D(D)) u_cam (
      .clk, .rst_n, .wr_en(sel), .wr_addr, .wr_data(wr_template),
      .key(g[P-1:0]), .match_addr(x[b]));
    contone_rom #(.D(D), .GW(GW)) u_rom (
      .clk, .wr_en(sel), .wr_addr, .wr_data(wr_gray),
      .rd_addr(x[b]), .rd_data(bank_c[b]));
  end

  always_comb begin
    c = '0;
    for (int b = 0; b < int'(BANKS); b++) c |= bank_c[b];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      f_q   <= '0;
      v_q   <= '0;
      hit_q <= 1'b0;
    end else begin
      f_q   <= {f_q[0], g};
      v_q   <= {v_q[0], in_valid};
      hit_q <= |x;
    end
  end
  assign f         = f_q[1];
  assign out_valid = v_q[1];
  assign hit       = hit_q;
endmodule
