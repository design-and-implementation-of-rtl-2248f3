// tb_booth_pp_gen: checks the radix-4 Booth partial product rows (N = 16).
// For each digit d(i) = -2*y(2i+1) + y(2i) + y(2i-1) computed here, row i
// must equal d(i)*X shifted left by 2i (modulo 2^32), and the eight rows
// must sum to X*Y modulo 2^32. Zero digits (all-zero rows) are counted and
// must occur. Extreme operands -2^15 and 2^15-1 are included.
module tb_booth_pp_gen;
  localparam int N = 16, W = 32, D = 8, ROWS = 8;
  logic signed [N-1:0] x, y;
  logic [W-1:0] rows [ROWS];
  int checks = 0, failures = 0;
  int zero_rows = 0;

  booth_pp_gen #(.N(N)) dut (.multiplicand(x), .multiplier(y), .rows(rows));

  task automatic check();
    logic [W-1:0] total, exp_row;
    logic [N:0] yb;
    longint d;
    #1;
    yb = {y, 1'b0};
    total = '0;
    for (int i = 0; i < D; i++) begin
      d = -2 * longint'(yb[2*i+2]) + longint'(yb[2*i+1]) + longint'(yb[2*i]);
      exp_row = W'((d * longint'(x)) <<< (2*i));
      checks++;
      if (rows[i] !== exp_row) begin
        failures++;
        $display("FAIL x=%h y=%h row %0d = %h expected %h", x, y, i, rows[i], exp_row);
      end
      if (d == 0) zero_rows++;
    end
    for (int i = 0; i < ROWS; i++) total += rows[i];
    checks++;
    if (total !== W'(longint'(x) * longint'(y))) begin
      failures++;
      $display("FAIL x=%0d y=%0d rows sum %h", x, y, total);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = -16'sd1; y = 16'sd3; check();
    x = 16'sh8000; y = 16'sh8000; check();
    x = 16'sh7FFF; y = 16'sh8000; check();
    x = 16'sh1234; y = 16'sh5555; check();
    for (int i = 0; i < 3000; i++) begin
      x = 16'($urandom);
      y = 16'($urandom);
      check();
    end
    checks++;
    if (zero_rows == 0) begin
      failures++;
      $display("FAIL no zero digit seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
