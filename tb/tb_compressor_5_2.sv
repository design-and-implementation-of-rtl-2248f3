// tb_compressor_5_2: exhaustive check of the 5:2 compressor over all 128
// input patterns: sum(x) + cin1 + cin2 = sum + 2*(cout1 + cout2 + cout3),
// cout1 must depend on x only and cout2 not on cin2.
module tb_compressor_5_2;
  logic [4:0] x;
  logic cin1, cin2, sum, cout1, cout2, cout3;
  logic ref_c1, ref_c2;
  int checks = 0, failures = 0;

  compressor_5_2 dut (.x(x), .cin1(cin1), .cin2(cin2), .sum(sum),
                      .cout1(cout1), .cout2(cout2), .cout3(cout3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      for (int c = 0; c < 4; c++) begin
        x = 5'(v);
        {cin1, cin2} = 2'(c);
        #1;
        checks++;
        if (int'(sum) + 2 * (int'(cout1) + int'(cout2) + int'(cout3)) !=
            $countones(x) + int'(cin1) + int'(cin2)) begin
          failures++;
          $display("FAIL x=%b cin1=%0d cin2=%0d -> %0d %0d %0d %0d",
                   x, cin1, cin2, sum, cout1, cout2, cout3);
        end
        if (c == 0) ref_c1 = cout1;
        checks++;
        if (cout1 !== ref_c1) begin
          failures++;
          $display("FAIL cout1 depends on carry-ins for x=%b", x);
        end
        if (cin2 == 1'b0) ref_c2 = cout2;
        else begin
          checks++;
          if (cout2 !== ref_c2) begin
            failures++;
            $display("FAIL cout2 depends on cin2 for x=%b", x);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
