// tb_contone_rom: a 16-word gray level memory (D = 4). Writes every word,
// reads them back in random order checking the one-clock read latency, and
// checks that address 0 reads zero even after a write to it.
module tb_contone_rom;
  localparam int D = 4, GW = 8;
  int checks = 0, failures = 0;
  logic clk = 0, wr_en;
  logic [D-1:0]  wr_addr, rd_addr;
  logic [GW-1:0] wr_data, rd_data;
  logic [GW-1:0] ref_mem [16];

  always #5 clk = ~clk;
  contone_rom #(.D(D), .GW(GW)) dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_addr = '0; wr_data = '0; rd_addr = '0;
    @(negedge clk);
    for (int a = 0; a < 16; a++) begin
      ref_mem[a] = (a == 0) ? 8'd0 : GW'($urandom_range(255, 1));
      wr_en = 1; wr_addr = D'(a); wr_data = (a == 0) ? 8'hFF : ref_mem[a];
      @(negedge clk);
    end
    wr_en = 0;
    for (int r = 0; r < 300; r++) begin
      automatic int a = $urandom_range(15);
      rd_addr = D'(a);
      @(negedge clk);
      checks++;
      if (rd_data != ref_mem[a]) begin
        failures++;
        $display("FAIL: addr %0d got %h exp %h", a, rd_data, ref_mem[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
