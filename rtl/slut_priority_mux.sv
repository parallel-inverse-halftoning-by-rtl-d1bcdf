// slut_priority_mux: K-to-1 multiplexer in front of one s-LUT, which settles
// collisions between templates that the XM function sent to the same s-LUT.
//
// Input i is what demultiplexer i drives toward this s-LUT: a tagged template
// {sequence number, template}, or zero. The highest-numbered input whose
// sequence field is non-zero wins; the others are dropped here and are later
// given a neighbour's gray level. The output is zero when no template was sent
// to this s-LUT. Purely combinational.
module slut_priority_mux #(
  parameter int unsigned K     = ih_pkg::K_DEF,
  parameter int unsigned TW    = ih_pkg::P_DEF + 3,
  parameter int unsigned SEQ_W = 3
) (
  input  logic [K-1:0][TW-1:0] din,   // index i = template t_i
  output logic [TW-1:0]        dout
);
  always_comb begin
    dout = '0;
    for (int i = 0; i < int'(K); i++)
      if (din[i][TW-1 -: SEQ_W] != '0) dout = din[i];  // later (higher) i wins
  end
endmodule
