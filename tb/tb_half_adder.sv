// tb_half_adder: exhaustive check of the 2:2 compressor, {cout, sum} = a + b.
module tb_half_adder;
  logic a, b, sum, cout;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (int'({cout, sum}) != int'(a) + int'(b)) begin
        failures++;
        $display("FAIL a=%0d b=%0d -> cout=%0d sum=%0d", a, b, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
