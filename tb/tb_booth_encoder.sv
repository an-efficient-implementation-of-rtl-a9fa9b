// tb_booth_encoder: checks the encoder against the Booth digit of each of the
// eight triplets. The expected outputs are derived from the digit value
// M = -2*D2 + D1 + D0 and the sign bit, not copied from a table: neg is the
// triplet's sign, two/one/zero are |M| = 2/1/0, cor is set for negative
// non-zero digits.
module tb_booth_encoder;
  import booth_pkg::*;
  logic [2:0] d;
  booth_sel_t sel;
  int checks = 0, failures = 0;

  booth_encoder dut (.d(d), .sel(sel));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m, mag;
    booth_sel_t exp_sel;
    for (int v = 0; v < 8; v++) begin
      d = 3'(v);
      #1;
      m   = -2 * int'(d[2]) + int'(d[1]) + int'(d[0]);
      mag = (m < 0) ? -m : m;
      exp_sel.neg  = d[2];
      exp_sel.two  = (mag == 2);
      exp_sel.one  = (mag == 1);
      exp_sel.zero = (mag == 0);
      exp_sel.cor  = (m < 0);
      checks++;
      if (sel !== exp_sel) begin
        failures++;
        $display("MISMATCH d=%b got %b expected %b", d, sel, exp_sel);
      end
      checks++;
      if (!$onehot({sel.two, sel.one, sel.zero})) begin
        failures++;
        $display("two/one/zero not one-hot for d=%b", d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
