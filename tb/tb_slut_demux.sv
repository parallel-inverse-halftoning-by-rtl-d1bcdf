// tb_slut_demux: drives random tagged words and every select value into the
// 1-to-8 demultiplexer and checks that exactly the selected output carries the
// word and all others are zero.
module tb_slut_demux;
  localparam int N = 8, TW = 23;
  int checks = 0, failures = 0;
  logic [TW-1:0]        din;
  logic [2:0]           sel;
  logic [N-1:0][TW-1:0] dout;

  slut_demux #(.N(N), .TW(TW)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 500; r++) begin
      din = TW'({$urandom, $urandom}) | TW'(1);   // never all zero
      sel = 3'(r % N);
      #1;
      for (int j = 0; j < N; j++) begin
        checks++;
        if (dout[j] != ((j == int'(sel)) ? din : '0)) begin
          failures++;
          $display("FAIL: sel=%0d out %0d = %h", sel, j, dout[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
