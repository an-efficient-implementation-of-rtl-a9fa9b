// tb_ones_complement: checks that every bit of the multiplicand is inverted,
// for all 256 values at N = 8, by comparing a + a_n with all ones.
module tb_ones_complement;
  localparam int N = 8;
  logic [N-1:0] a, a_n;
  int checks = 0, failures = 0;

  ones_complement #(.N(N)) dut (.a(a), .a_n(a_n));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      a = N'(v);
      #1;
      checks++;
      // a + ~a is all ones; the one's complement is -a-1.
      if (N'(a + a_n) != '1 || $signed(a_n) != -$signed(a) - 1) begin
        failures++;
        $display("MISMATCH a=%h a_n=%h", a, a_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
