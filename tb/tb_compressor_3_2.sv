// tb_compressor_3_2: all eight input combinations; s + 2c must equal the
// number of ones among p1, p2, p3.
module tb_compressor_3_2;
  logic p1, p2, p3, s, c;
  int checks = 0, failures = 0;

  compressor_3_2 dut (.p1(p1), .p2(p2), .p3(p3), .s(s), .c(c));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {p1, p2, p3} = 3'(v);
      #1;
      checks++;
      if (int'(s) + 2 * int'(c) != int'(p1) + int'(p2) + int'(p3)) begin
        failures++;
        $display("MISMATCH p=%b%b%b s=%b c=%b", p1, p2, p3, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
