// tb_booth_encoder: all eight triplets against the radix-4 Booth digit
// d = -2*y(2i+1) + y(2i) + y(2i-1), rebuilt from (one, two, neg); also checks
// that one and two are never both set and neg is 0 for a zero digit.
module tb_booth_encoder;
  logic [2:0] t;
  logic one, two, neg;
  int checks = 0, failures = 0;
  int d_ref, d_dut;

  booth_encoder dut (.triplet(t), .one(one), .two(two), .neg(neg));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      t = 3'(v);
      #1;
      d_ref = -2 * int'(t[2]) + int'(t[1]) + int'(t[0]);
      d_dut = (one ? 1 : 0) + (two ? 2 : 0);
      if (neg) d_dut = -d_dut;
      checks++;
      if (d_dut != d_ref || (one && two) || (neg && !one && !two)) begin
        failures++;
        $display("FAIL triplet=%b one=%0d two=%0d neg=%0d expected %0d", t, one, two, neg, d_ref);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
