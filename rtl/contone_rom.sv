// contone_rom: gray level (contone) store of one s-LUT bank, addressed by its
// CAM.
//
// 2^D words of GW bits with a registered read: the word at rd_addr appears one
// clock later. Address 0 is the CAM's "not present" answer and always reads
// zero, so the outputs of several banks can simply be ORed. The original design
// calls this memory a ROM; it is built here as a RAM with a write port so
// that tables produced by off-line training can be loaded.
module contone_rom #(
  parameter int unsigned D  = ih_pkg::D_DEF,
  parameter int unsigned GW = ih_pkg::GRAY_W
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [D-1:0]  wr_addr,
  input  logic [GW-1:0] wr_data,
  input  logic [D-1:0]  rd_addr,
  output logic [GW-1:0] rd_data
);
  logic [GW-1:0] mem [2**D];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= (rd_addr == '0) ? '0 : mem[rd_addr];
  end
endmodule
