// tb_multiplier_top: end-to-end test of the whole design at its default
// sizes: the 16 x 16 signed DRD multiplier with 7:2 compressors and the two
// 8 x 8 unsigned tree multipliers (Wallace, Dadda), all driven at once.
// Each product is compared with integer arithmetic. Counted mechanisms, each
// of which must occur at least once:
//   - the DRD interchanges the operands / keeps them;
//   - the Booth-encoded operand has zero digits (rows that are all zero);
//   - a negative product (sign handling of the Booth rows);
// The worked example -1 * 3 = -3 with interchange is checked first.
module tb_multiplier_top;
  logic signed [15:0] drd_a, drd_b;
  logic [31:0] drd_p;
  logic        drd_swapped;
  logic [7:0]  wal_a, wal_b, dad_a, dad_b;
  logic [15:0] wal_p, dad_p;
  int checks = 0, failures = 0;
  int n_swap = 0, n_keep = 0, n_zero_digit = 0, n_neg = 0;

  multiplier_top dut (
    .drd_a(drd_a), .drd_b(drd_b), .drd_p(drd_p), .drd_swapped(drd_swapped),
    .wal_a(wal_a), .wal_b(wal_b), .wal_p(wal_p),
    .dad_a(dad_a), .dad_b(dad_b), .dad_p(dad_p)
  );

  // Number of radix-4 Booth digits equal to zero in v.
  function automatic int zero_digits(logic [15:0] v);
    logic [16:0] y = {v, 1'b0};
    int n = 0;
    for (int i = 0; i < 8; i++)
      if (y[2*i +: 3] == 3'b000 || y[2*i +: 3] == 3'b111) n++;
    return n;
  endfunction

  task automatic check();
    logic [31:0] e;
    #1;
    e = 32'(longint'(drd_a) * longint'(drd_b));
    checks++;
    if (drd_p !== e) begin
      failures++;
      $display("FAIL drd %0d * %0d = %h expected %h", drd_a, drd_b, drd_p, e);
    end
    checks++;
    if (wal_p !== 16'(wal_a * wal_b) || dad_p !== 16'(dad_a * dad_b)) begin
      failures++;
      $display("FAIL tree: %0d*%0d=%0d  %0d*%0d=%0d", wal_a, wal_b, wal_p, dad_a, dad_b, dad_p);
    end
    if (drd_swapped) n_swap++; else n_keep++;
    if (zero_digits(drd_swapped ? drd_a : drd_b) > 0) n_zero_digit++;
    if (e[31]) n_neg++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    drd_a = -16'sd1; drd_b = 16'sd3;
    wal_a = 8'd255; wal_b = 8'd255; dad_a = 8'd255; dad_b = 8'd255;
    check();
    checks++;
    if (drd_p !== 32'hFFFF_FFFD || !drd_swapped) begin
      failures++;
      $display("FAIL worked example: p=%h swapped=%0d", drd_p, drd_swapped);
    end
    for (int i = 0; i < 20000; i++) begin
      drd_a = 16'($urandom);
      drd_b = 16'($urandom);
      if (i % 3 == 0) drd_a = drd_a >>> ($urandom % 16);
      if (i % 4 == 1) drd_b = drd_b >>> ($urandom % 16);
      {wal_a, wal_b} = 16'($urandom);
      {dad_a, dad_b} = 16'($urandom);
      check();
    end
    $display("interchanged %0d, kept %0d, zero Booth digits in %0d, negative products %0d",
             n_swap, n_keep, n_zero_digit, n_neg);
    checks++;
    if (n_swap == 0 || n_keep == 0 || n_zero_digit == 0 || n_neg == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
