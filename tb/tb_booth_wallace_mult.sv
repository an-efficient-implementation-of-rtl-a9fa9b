// tb_booth_wallace_mult: end-to-end test of the signed Booth / Wallace tree
// multiplier at its default size (N = 8).
//
// Every one of the 65536 operand pairs is applied; the product is compared
// with a * x computed by the simulator on sign-extended integers. Besides the
// product, the test counts how often each Booth digit (+0, +A, +2A, -2A, -A,
// -0) was selected in each row, how often the correction bit was used, and how
// often the largest-magnitude product (-2^(N-1))^2 occurred; a mechanism that
// never happened counts as a failure. The design has no clock; a virtual clock
// paces the stimulus and drives the watchdog.
module tb_booth_wallace_mult;
  import booth_pkg::*;
  localparam int N = 8;
  localparam int R = N / 2;

  logic [N-1:0]   a, x;
  logic [2*N-1:0] z;
  logic           clk = 1'b0;
  int checks = 0, failures = 0;
  int digit_seen [8];  // indexed by the Booth triplet value
  int cor_seen = 0;
  int corner_seen = 0;

  booth_wallace_mult dut (.a(a), .x(x), .z(z));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic signed [2*N-1:0] expected;
    logic [N:0] xe;
    for (int t = 0; t < 8; t++) digit_seen[t] = 0;
    for (int ia = 0; ia < (1 << N); ia++) begin
      for (int ix = 0; ix < (1 << N); ix++) begin
        a = N'(ia);
        x = N'(ix);
        @(posedge clk);
        expected = (2*N)'($signed(a)) * (2*N)'($signed(x));
        checks++;
        if (z !== expected) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH a=%0d x=%0d z=%0d expected=%0d",
                     $signed(a), $signed(x), $signed(z), expected);
        end
        xe = {x, 1'b0};
        for (int i = 0; i < R; i++) begin
          digit_seen[xe[2*i +: 3]]++;
          if (dut.sel[i].cor) cor_seen++;
        end
        if (a == {1'b1, {(N-1){1'b0}}} && x == {1'b1, {(N-1){1'b0}}}) corner_seen++;
      end
    end
    for (int t = 0; t < 8; t++) begin
      checks++;
      if (digit_seen[t] == 0) begin
        failures++;
        $display("Booth triplet %0d never selected", t);
      end
    end
    checks++;
    if (cor_seen == 0) begin failures++; $display("correction bit never used"); end
    checks++;
    if (corner_seen == 0) begin failures++; $display("most negative operands never applied"); end
    $display("Booth triplets seen: 000=%0d 001=%0d 010=%0d 011=%0d 100=%0d 101=%0d 110=%0d 111=%0d, cor=%0d",
             digit_seen[0], digit_seen[1], digit_seen[2], digit_seen[3],
             digit_seen[4], digit_seen[5], digit_seen[6], digit_seen[7], cor_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
