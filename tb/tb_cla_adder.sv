// tb_cla_adder: the 16-bit adder against the simulator's own addition, on
// random operands plus the carry-chain corner cases (all-ones plus one, and
// operands that propagate through every group).
module tb_cla_adder;
  localparam int W = 16;
  logic [W-1:0] a, b, sum;
  int checks = 0, failures = 0;

  cla_adder #(.W(W)) dut (.a(a), .b(b), .sum(sum));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] va, input logic [W-1:0] vb);
    logic [W-1:0] want;
    a = va;
    b = vb;
    #1;
    want = va + vb;
    checks++;
    if (sum !== want) begin
      failures++;
      if (failures < 10) $display("MISMATCH %h + %h = %h, expected %h", va, vb, sum, want);
    end
  endtask

  initial begin
    check('1, 1);
    check('1, '1);
    check(16'h5555, 16'hAAAB);
    check(16'h0FFF, 16'h0001);
    check(0, 0);
    for (int i = 0; i < W; i++) check((W)'(1) << i, (W)'(1) << i);
    for (int i = 0; i < 20000; i++) check(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
