// tb_wallace_tree: drives the tree (N = 8) with random partial product rows
// and correction bits and checks that the two output rows add up to the value
// the inputs stand for: sum over rows of (signed row + cor) * 4^i, modulo
// 2^(2N). Rows of all ones, all zeros and the most negative value are mixed
// in so that the sign-extension constant is exercised at its extremes.
module tb_wallace_tree;
  localparam int N = 8;
  localparam int R = N / 2;
  logic [N:0]     pp [R];
  logic [R-1:0]   cor;
  logic [2*N-1:0] row0, row1;
  int checks = 0, failures = 0;

  wallace_tree #(.N(N)) dut (.pp(pp), .cor(cor), .row0(row0), .row1(row1));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint want;
    logic [2*N-1:0] got;
    for (int t = 0; t < 50000; t++) begin
      want = 0;
      for (int i = 0; i < R; i++) begin
        case ($urandom_range(0, 7))
          0: pp[i] = '0;
          1: pp[i] = '1;
          2: pp[i] = {1'b1, {N{1'b0}}};
          default: pp[i] = (N+1)'($urandom);
        endcase
        cor[i] = 1'($urandom);
        want += (longint'($signed(pp[i])) + longint'(cor[i])) <<< (2 * i);
      end
      #1;
      got = row0 + row1;
      checks++;
      if (got !== (2*N)'(want)) begin
        failures++;
        if (failures < 10) $display("MISMATCH got=%h want=%h", got, (2*N)'(want));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
