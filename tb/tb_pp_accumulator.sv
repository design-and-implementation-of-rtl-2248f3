// tb_pp_accumulator: the carry-save accumulation with each compressor order.
// Instances: 8 rows x 32 bits (16 x 16 multiplier) with ORDER 3, 4, 5, 7 and
// 4 rows x 16 bits (8 x 8 multiplier) with ORDER 3 and 4; a 9-row instance
// with 7:2 compressors also exercises a padded leftover group. For random rows,
// sum_row + carry_row must equal the sum of all rows modulo 2^W. The number
// of stages each instance elaborates is checked against the counts worked
// out by hand: 8 rows take 4/2/2/2 stages with 3:2/4:2/5:2/7:2 compressors.
module tb_pp_accumulator;
  import mult_pkg::*;
  localparam int W = 32, R = 8, W8 = 16, R8 = 4;
  localparam int ORDERS [4] = '{3, 4, 5, 7};
  localparam int EXP_STAGES [4] = '{4, 2, 2, 2};

  logic [W-1:0]  rows  [R];
  logic [W8-1:0] rows8 [R8];
  logic [W-1:0]  s [4], c [4];
  logic [W8-1:0] s8 [2], c8 [2];
  logic [W-1:0]  rows9 [9];
  logic [W-1:0]  s9, c9;
  int checks = 0, failures = 0;

  for (genvar k = 0; k < 4; k++) begin : g_dut
    pp_accumulator #(.ROWS(R), .W(W), .ORDER(ORDERS[k])) dut (
      .rows(rows), .sum_row(s[k]), .carry_row(c[k]));
  end
  pp_accumulator #(.ROWS(9), .W(W), .ORDER(7)) dut9 (.rows(rows9), .sum_row(s9), .carry_row(c9));
  pp_accumulator #(.ROWS(R8), .W(W8), .ORDER(3)) dut8_3 (.rows(rows8), .sum_row(s8[0]), .carry_row(c8[0]));
  pp_accumulator #(.ROWS(R8), .W(W8), .ORDER(4)) dut8_4 (.rows(rows8), .sum_row(s8[1]), .carry_row(c8[1]));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] total;
    logic [W8-1:0] total8;
    logic [W-1:0] total9;
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (accum_stages(R, ORDERS[k]) != EXP_STAGES[k]) begin
        failures++;
        $display("FAIL order %0d: %0d stages", ORDERS[k], accum_stages(R, ORDERS[k]));
      end
    end
    for (int i = 0; i < 3000; i++) begin
      total = '0;
      total8 = '0;
      for (int r = 0; r < R; r++) begin
        rows[r] = (i < 4) ? {W{i[0]}} : $urandom;
        total += rows[r];
      end
      total9 = '0;
      for (int r = 0; r < 9; r++) begin
        rows9[r] = $urandom;
        total9 += rows9[r];
      end
      for (int r = 0; r < R8; r++) begin
        rows8[r] = (i < 4) ? {W8{i[1]}} : 16'($urandom);
        total8 += rows8[r];
      end
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (s[k] + c[k] !== total) begin
          failures++;
          $display("FAIL order %0d: %h + %h != %h", ORDERS[k], s[k], c[k], total);
        end
      end
      checks++;
      if (s9 + c9 !== total9) begin
        failures++;
        $display("FAIL 9-row 7:2 instance");
      end
      for (int k = 0; k < 2; k++) begin
        checks++;
        if (s8[k] + c8[k] !== total8) begin
          failures++;
          $display("FAIL 8-bit order %0d", k + 3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
