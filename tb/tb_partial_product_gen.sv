// tb_partial_product_gen: drives the row generator with every multiplicand
// (N = 8) and every valid Booth selection, and checks the signed N+1 bit row
// plus the correction bit against M * A for the digit M the selection stands
// for (M in {+0, +1, +2, -2, -1, -0}).
module tb_partial_product_gen;
  import booth_pkg::*;
  localparam int N = 8;
  logic [N-1:0] a, a_n;
  booth_sel_t   sel;
  logic [N:0]   pp;
  int checks = 0, failures = 0;

  partial_product_gen #(.N(N)) dut (.a(a), .a_n(a_n), .sel(sel), .pp(pp));

  assign a_n = ~a;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Digit, and the selection word for it.
    int digit [6] = '{0, 1, 2, -2, -1, 0};
    logic [4:0] code [6] = '{5'b00010, 5'b00100, 5'b01000, 5'b11001, 5'b10101, 5'b10010};
    int got, want;
    for (int v = 0; v < (1 << N); v++) begin
      for (int k = 0; k < 6; k++) begin
        a   = N'(v);
        sel = booth_sel_t'(code[k]);
        #1;
        want = digit[k] * int'($signed(a));
        got  = int'($signed(pp)) + int'(sel.cor);
        checks++;
        if (got != want) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH a=%0d digit=%0d pp=%b got=%0d want=%0d",
                     $signed(a), digit[k], pp, got, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
