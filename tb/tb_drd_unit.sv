// tb_drd_unit: checks the operand interchange. With the reference rule
// "swap when, in any byte, A has more all-equal Booth groups than B" the
// outputs must be (b, a) when swapping and (a, b) otherwise. The worked
// example A = -1, B = 3 must swap, making -1 the Booth-encoded multiplier.
// A second instance with USE_DRD = 0 must never swap.
module tb_drd_unit;
  localparam int N = 16;
  logic [N-1:0] a, b, mc, mp, mc0, mp0;
  logic swapped, swapped0;
  int checks = 0, failures = 0;
  int n_swap = 0, n_keep = 0;

  drd_unit #(.N(N)) dut (.a(a), .b(b), .multiplicand(mc), .multiplier(mp), .swapped(swapped));
  drd_unit #(.N(N), .USE_DRD(1'b0)) dut_off (.a(a), .b(b), .multiplicand(mc0),
                                              .multiplier(mp0), .swapped(swapped0));

  function automatic int zcount(logic [7:0] v);
    int n = 0;
    for (int lo = 1; lo <= 5; lo += 2)
      if (v[lo +: 3] == 3'b000 || v[lo +: 3] == 3'b111) n++;
    return n;
  endfunction

  task automatic check();
    logic exp_swap;
    #1;
    exp_swap = (zcount(a[7:0]) > zcount(b[7:0])) || (zcount(a[15:8]) > zcount(b[15:8]));
    checks++;
    if (exp_swap) n_swap++; else n_keep++;
    if (swapped !== exp_swap || mc !== (exp_swap ? b : a) || mp !== (exp_swap ? a : b)) begin
      failures++;
      $display("FAIL a=%h b=%h swapped=%0d mc=%h mp=%h", a, b, swapped, mc, mp);
    end
    checks++;
    if (swapped0 !== 1'b0 || mc0 !== a || mp0 !== b) begin
      failures++;
      $display("FAIL USE_DRD=0 instance changed the operands");
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 16'hFFFF; b = 16'h0003; check();
    checks++;
    if (!swapped || mp !== 16'hFFFF || mc !== 16'h0003) begin
      failures++;
      $display("FAIL worked example not interchanged");
    end
    for (int i = 0; i < 3000; i++) begin
      a = 16'($urandom);
      b = 16'($urandom);
      if (i % 2 == 0) a = 16'($signed(a) >>> ($urandom % 16));
      if (i % 3 == 0) b = 16'($signed(b) >>> ($urandom % 16));
      check();
    end
    checks++;
    if (n_swap == 0 || n_keep == 0) begin
      failures++;
      $display("FAIL swap never / always happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
