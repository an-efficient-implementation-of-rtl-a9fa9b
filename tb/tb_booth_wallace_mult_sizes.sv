// tb_booth_wallace_mult_sizes: the multiplier at widths other than its
// default, to show that the generated Wallace tree stays correct when the
// number of partial product rows and reduction stages changes.
// N = 4 and N = 6 are checked exhaustively, N = 16 and N = 32 on random
// operands plus the extreme values (0, 1, -1, most positive, most negative).
module tb_booth_wallace_mult_sizes;
  int checks = 0, failures = 0;

  logic [3:0]  a4,  x4;   logic [7:0]  z4;
  logic [5:0]  a6,  x6;   logic [11:0] z6;
  logic [15:0] a16, x16;  logic [31:0] z16;
  logic [31:0] a32, x32;  logic [63:0] z32;

  booth_wallace_mult #(.N(4))  dut4  (.a(a4),  .x(x4),  .z(z4));
  booth_wallace_mult #(.N(6))  dut6  (.a(a6),  .x(x6),  .z(z6));
  booth_wallace_mult #(.N(16)) dut16 (.a(a16), .x(x16), .z(z16));
  booth_wallace_mult #(.N(32)) dut32 (.a(a32), .x(x32), .z(z32));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string tag, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("MISMATCH %s got=%0d want=%0d", tag, got, want);
    end
  endtask

  initial begin
    logic [31:0] edge_v [5] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h7FFF_FFFF, 32'h8000_0000};
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); x4 = 4'(j); #1;
        compare("N=4", longint'($signed(z4)), longint'($signed(a4)) * longint'($signed(x4)));
      end
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        a6 = 6'(i); x6 = 6'(j); #1;
        compare("N=6", longint'($signed(z6)), longint'($signed(a6)) * longint'($signed(x6)));
      end
    for (int t = 0; t < 20025; t++) begin
      if (t < 25) begin
        a32 = edge_v[t / 5];
        x32 = edge_v[t % 5];
        a16 = {a32[31], a32[14:0]};
        x16 = {x32[31], x32[14:0]};
      end else begin
        a32 = $urandom; x32 = $urandom;
        a16 = 16'($urandom); x16 = 16'($urandom);
      end
      #1;
      compare("N=16", longint'($signed(z16)), longint'($signed(a16)) * longint'($signed(x16)));
      compare("N=32", longint'($signed(z32)), longint'($signed(a32)) * longint'($signed(x32)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
