// tb_slut_priority_mux: random inputs, each with a random chance of carrying a
// template (non-zero sequence field) or nothing; checks that the output is the
// highest-indexed input that carries a template, or zero when none does.
module tb_slut_priority_mux;
  localparam int K = 4, TW = 23, SEQ_W = 3;
  int checks = 0, failures = 0;
  logic [K-1:0][TW-1:0] din;
  logic [TW-1:0]        dout;

  slut_priority_mux #(.K(K), .TW(TW), .SEQ_W(SEQ_W)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [TW-1:0] exp_out;
    for (int r = 0; r < 3000; r++) begin
      exp_out = '0;
      for (int i = 0; i < K; i++) begin
        if ($urandom_range(1)) din[i] = {SEQ_W'(i + 1), 20'($urandom)};
        else                   din[i] = '0;
      end
      for (int i = K - 1; i >= 0; i--)
        if (din[i] != '0) begin exp_out = din[i]; break; end
      #1;
      checks++;
      if (dout != exp_out) begin
        failures++;
        $display("FAIL: din=%h got %h exp %h", din, dout, exp_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
