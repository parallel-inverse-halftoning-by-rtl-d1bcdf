// cam: content addressable memory holding the templates of one s-LUT bank.
//
// Entries 1..2^D-1 each hold a P-bit template and a valid bit; address 0 is
// reserved to mean "not present", so the CAM answers a key with the address
// of the matching entry or with 0. All entries are compared in parallel and
// the match lines are encoded into an address by ORing, for each address bit,
// the match lines of the entries whose address has that bit set. This assumes
// at most one entry matches (a correctly built table holds each template
// once); an assertion flags a violation. The answer is registered: it appears one clock
// after the key. Entries are loaded one per clock through the write port; a
// write with wr_addr == 0 is ignored. Reset clears every valid bit.
// The match-or-zero behaviour follows the original design; the write port, the
// valid bits and the registered output are this implementation's.
module cam #(
  parameter int unsigned P = ih_pkg::P_DEF,
  parameter int unsigned D = ih_pkg::D_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [D-1:0] wr_addr,
  input  logic [P-1:0] wr_data,
  input  logic [P-1:0] key,
  output logic [D-1:0] match_addr
);
  localparam int unsigned DEPTH = 2 ** D;

  // Bit a of addr_mask(b) is bit b of the number a.
  function automatic logic [DEPTH-1:0] addr_mask(int unsigned b);
    logic [DEPTH-1:0] m;
    for (int unsigned a = 0; a < DEPTH; a++) m[a] = ((a >> b) & 1) != 0;
    return m;
  endfunction

  logic [P-1:0]     entry [1:DEPTH-1];
  logic [DEPTH-1:1] valid;
  logic [DEPTH-1:0] match_line;
  logic [D-1:0]     match_d;

  assign match_line[0] = 1'b0;        // address 0 is never an entry
  for (genvar a = 1; a < DEPTH; a++) begin : g_cmp
    assign match_line[a] = valid[a] && entry[a] == key;
  end
  for (genvar b = 0; b < D; b++) begin : g_enc
    localparam logic [DEPTH-1:0] MASK = addr_mask(b);
    assign match_d[b] = |(match_line & MASK);
  end

  always_ff @(posedge clk)
    if (wr_en && wr_addr != '0) entry[wr_addr] <= wr_data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid      <= '0;
      match_addr <= '0;
    end else begin
      if (wr_en && wr_addr != '0) valid[wr_addr] <= 1'b1;
      match_addr <= match_d;
    end
  end

  a_no_write_to_zero: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> wr_addr != '0)
    else $error("cam: address 0 is reserved for 'not present'");
  a_single_match: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(match_line))
    else $error("cam: a template is stored more than once");
endmodule
