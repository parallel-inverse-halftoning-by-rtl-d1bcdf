// pixel_compensation: back end of the datapath. It turns the N s-LUT results,
// which arrive in s-LUT order, into K gray levels in template order, and fills
// in the templates that got no gray level of their own.
//
// Each s-LUT result carries the sequence number (1..K) of the template it
// served, or 0. For template j the module finds the s-LUT whose sequence
// number is j+1. Template j is "served" when such an s-LUT exists and its
// table held the template. A template that is not served (it was dropped in a
// collision, or its table did not hold it) takes the gray level already
// chosen for template j+1, the nearest higher-numbered one; so a run of
// unserved templates all copy the next served one above them. The highest
// template always wins its collision; if its own table misses, its gray
// level is the table's zero. One clock of latency (registered outputs).
// discarded[j] and miss[j] report why template j was filled in.
// Sequence-number matching and copying from the next higher template follow
// the original design; copying on a table miss as well as on a collision, and the
// discarded/miss outputs, are this implementation's reading of it.
module pixel_compensation #(
  parameter int unsigned K  = ih_pkg::K_DEF,
  parameter int unsigned N  = ih_pkg::N_DEF,
  parameter int unsigned P  = ih_pkg::P_DEF,
  parameter int unsigned GW = ih_pkg::GRAY_W,
  localparam int unsigned SEQ_W = ih_pkg::seq_width(K),
  localparam int unsigned TW    = P + SEQ_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [N-1:0][TW-1:0] f,      // tagged templates from the s-LUTs
  input  logic [N-1:0][GW-1:0] c,      // their gray levels
  input  logic [N-1:0]         hit,
  output logic                 out_valid,
  output logic [K-1:0][GW-1:0] gray,   // Gray_level of t_0..t_{K-1}
  output logic [K-1:0]         discarded,
  output logic [K-1:0]         miss
);
  logic [K-1:0][GW-1:0] own, gray_d;
  logic [K-1:0]         routed, served;

  always_comb begin
    for (int j = 0; j < int'(K); j++) begin
      own[j]    = '0;
      routed[j] = 1'b0;
      served[j] = 1'b0;
      for (int i = 0; i < int'(N); i++)
        if (f[i][TW-1 -: SEQ_W] == SEQ_W'(j + 1)) begin
          own[j]    |= c[i];
          routed[j] |= 1'b1;
          served[j] |= hit[i];
        end
    end
    gray_d[K-1] = own[K-1];
    for (int j = int'(K) - 2; j >= 0; j--)
      gray_d[j] = served[j] ? own[j] : gray_d[j+1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      gray      <= '0;
      discarded <= '0;
      miss      <= '0;
    end else begin
      out_valid <= in_valid;
      gray      <= gray_d;
      discarded <= ~routed;
      miss      <= routed & ~served;
    end
  end
endmodule
