// tb_compressor_4_2: exhaustive check of the 4:2 compressor over all 32
// input patterns: x[0]+..+x[3]+cin = sum + 2*(cout1 + cout2), and the
// lateral carry cout2 must not change when only cin changes.
module tb_compressor_4_2;
  logic [3:0] x;
  logic cin, sum, cout1, cout2, cout2_cin0;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.x(x), .cin(cin), .sum(sum), .cout1(cout1), .cout2(cout2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      for (int c = 0; c < 2; c++) begin
        x = 4'(v);
        cin = 1'(c);
        #1;
        checks++;
        if (int'(sum) + 2 * (int'(cout1) + int'(cout2)) != $countones(x) + c) begin
          failures++;
          $display("FAIL x=%b cin=%0d -> sum=%0d cout1=%0d cout2=%0d", x, cin, sum, cout1, cout2);
        end
        if (c == 0) cout2_cin0 = cout2;
        else begin
          checks++;
          if (cout2 !== cout2_cin0) begin
            failures++;
            $display("FAIL cout2 depends on cin for x=%b", x);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
