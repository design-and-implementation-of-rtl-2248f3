// tb_compressor_7_2: exhaustive check of the 7:2 compressor over all 512
// input patterns: sum(x) + cin1 + cin2 = sum + 2*(cout1 + cout2) + 4*cout3,
// and the lateral carries cout2, cout3 must depend on x only.
module tb_compressor_7_2;
  logic [6:0] x;
  logic cin1, cin2, sum, cout1, cout2, cout3;
  logic ref_c2, ref_c3;
  int checks = 0, failures = 0;

  compressor_7_2 dut (.x(x), .cin1(cin1), .cin2(cin2), .sum(sum),
                      .cout1(cout1), .cout2(cout2), .cout3(cout3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      for (int c = 0; c < 4; c++) begin
        x = 7'(v);
        {cin1, cin2} = 2'(c);
        #1;
        checks++;
        if (int'(sum) + 2 * (int'(cout1) + int'(cout2)) + 4 * int'(cout3) !=
            $countones(x) + int'(cin1) + int'(cin2)) begin
          failures++;
          $display("FAIL x=%b cin1=%0d cin2=%0d -> %0d %0d %0d %0d",
                   x, cin1, cin2, sum, cout1, cout2, cout3);
        end
        if (c == 0) begin
          ref_c2 = cout2;
          ref_c3 = cout3;
        end
        checks++;
        if (cout2 !== ref_c2 || cout3 !== ref_c3) begin
          failures++;
          $display("FAIL lateral carries depend on carry-ins for x=%b", x);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
