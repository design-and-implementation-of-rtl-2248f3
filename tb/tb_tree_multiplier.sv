// tb_tree_multiplier: Wallace and Dadda tree multipliers, 4 x 4 and 8 x 8,
// checked exhaustively against a * b. Also checks the reduction plans
// against the adder counts of the two trees for 8 x 8: four stages each,
// Dadda 35 full adders and 7 half adders, Wallace 38 and 15.
module tb_tree_multiplier;
  import mult_pkg::*;
  logic [7:0] a8, b8;
  logic [3:0] a4, b4;
  logic [15:0] pw8, pd8;
  logic [7:0]  pw4, pd4;
  int checks = 0, failures = 0;

  tree_multiplier #(.N(8), .TREE(WALLACE)) dut_w8 (.a(a8), .b(b8), .p(pw8));
  tree_multiplier #(.N(8), .TREE(DADDA))   dut_d8 (.a(a8), .b(b8), .p(pd8));
  tree_multiplier #(.N(4), .TREE(WALLACE)) dut_w4 (.a(a4), .b(b4), .p(pw4));
  tree_multiplier #(.N(4), .TREE(DADDA))   dut_d4 (.a(a4), .b(b4), .p(pd4));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nfa, nha, wfa, wha, k;
    nfa = 0;
    nha = 0;
    for (int s = 0; s < tree_stages(8, DADDA); s++)
      for (int c = 0; c < 16; c++) begin
        nfa += dadda_plan(8, s, c, 1);
        nha += dadda_plan(8, s, c, 2);
      end
    wfa = 0;
    wha = 0;
    for (int s = 0; s < tree_stages(8, WALLACE); s++)
      for (int g = 0; g < wallace_rows(8, s) / 3; g++)
        for (int c = 0; c < 16; c++) begin
          k = int'(wallace_mask(8, s, 3*g)[c]) + int'(wallace_mask(8, s, 3*g+1)[c]) +
              int'(wallace_mask(8, s, 3*g+2)[c]);
          if (k == 3) wfa++;
          if (k == 2) wha++;
        end
    checks++;
    if (nfa != 35 || nha != 7 || wfa != 38 || wha != 15 ||
        tree_stages(8, DADDA) != 4 || tree_stages(8, WALLACE) != 4) begin
      failures++;
      $display("FAIL plan: Dadda %0d FA %0d HA, Wallace %0d FA %0d HA", nfa, nha, wfa, wha);
    end
    for (int i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i);
      {a4, b4} = 8'(i);
      #1;
      checks++;
      if (pw8 !== 16'(a8 * b8) || pd8 !== 16'(a8 * b8)) begin
        failures++;
        $display("FAIL 8x8 %0d * %0d: wallace %0d dadda %0d", a8, b8, pw8, pd8);
      end
      if (i < 256) begin
        checks++;
        if (pw4 !== 8'(a4 * b4) || pd4 !== 8'(a4 * b4)) begin
          failures++;
          $display("FAIL 4x4 %0d * %0d: wallace %0d dadda %0d", a4, b4, pw4, pd4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
