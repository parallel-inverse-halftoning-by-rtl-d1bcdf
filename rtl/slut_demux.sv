// slut_demux: 1-to-N demultiplexer that steers one sequence-tagged template
// to the port of the s-LUT chosen by the XM function.
//
// Output j carries the tagged template when sel == j and all zeros otherwise,
// so an output whose sequence field is zero carries no template. Purely
// combinational; the input word is {sequence number, template}.
module slut_demux #(
  parameter int unsigned N  = ih_pkg::N_DEF,
  parameter int unsigned TW = ih_pkg::P_DEF + 3,  // tagged word width
  localparam int unsigned LOGN = $clog2(N)
) (
  input  logic [TW-1:0]         din,
  input  logic [LOGN-1:0]       sel,
  output logic [N-1:0][TW-1:0]  dout
);
  always_comb
    for (int j = 0; j < int'(N); j++)
      dout[j] = (sel == LOGN'(j)) ? din : '0;
endmodule
