// tb_drd_multiplier: the signed DRD Booth multiplier in the configurations
// the design supports: 16 x 16 with 3:2, 4:2, 5:2 and 7:2 compressors,
// 16 x 16 without DRD, and 8 x 8 with 3:2 and 4:2 compressors. Every product
// is compared with a * b computed in integer arithmetic. Directed cases
// include the worked example -1 * 3 = -3 (the DRD must interchange the
// operands) and the extreme values -2^(N-1) and 2^(N-1)-1. The test counts
// how often the operands were interchanged and not, and fails if either
// never happened.
module tb_drd_multiplier;
  localparam int NCFG = 5;
  localparam int ORD16 [NCFG] = '{3, 4, 5, 7, 7};
  localparam bit DRD16 [NCFG] = '{1'b1, 1'b1, 1'b1, 1'b1, 1'b0};

  logic signed [15:0] a, b;
  logic [31:0] p [NCFG];
  logic        sw [NCFG];
  logic signed [7:0] a8, b8;
  logic [15:0] p8 [2];
  logic        sw8 [2];
  int checks = 0, failures = 0;
  int n_swap = 0, n_keep = 0;

  for (genvar k = 0; k < NCFG; k++) begin : g_dut
    drd_multiplier #(.N(16), .ORDER(ORD16[k]), .USE_DRD(DRD16[k])) dut (
      .a(a), .b(b), .p(p[k]), .swapped(sw[k]));
  end
  drd_multiplier #(.N(8), .ORDER(3)) dut8_3 (.a(a8), .b(b8), .p(p8[0]), .swapped(sw8[0]));
  drd_multiplier #(.N(8), .ORDER(4)) dut8_4 (.a(a8), .b(b8), .p(p8[1]), .swapped(sw8[1]));

  task automatic check();
    logic [31:0] e16;
    logic [15:0] e8;
    #1;
    e16 = 32'(longint'(a) * longint'(b));
    e8  = 16'(int'(a8) * int'(b8));
    for (int k = 0; k < NCFG; k++) begin
      checks++;
      if (p[k] !== e16) begin
        failures++;
        $display("FAIL cfg %0d: %0d * %0d = %h expected %h", k, a, b, p[k], e16);
      end
    end
    checks++;
    if (sw[4] !== 1'b0) begin
      failures++;
      $display("FAIL design without DRD interchanged operands");
    end
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (p8[k] !== e8) begin
        failures++;
        $display("FAIL 8x8 cfg %0d: %0d * %0d = %h expected %h", k, a8, b8, p8[k], e8);
      end
    end
    if (sw[3]) n_swap++; else n_keep++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = -16'sd1; b = 16'sd3; a8 = -8'sd1; b8 = 8'sd3; check();
    checks++;
    if (p[3] !== 32'hFFFF_FFFD || !sw[3] || !sw8[0]) begin
      failures++;
      $display("FAIL worked example: p=%h swapped=%0d", p[3], sw[3]);
    end
    a = 16'sh8000; b = 16'sh8000; a8 = 8'sh80; b8 = 8'sh80; check();
    a = 16'sh7FFF; b = 16'sh8000; a8 = 8'sh7F; b8 = 8'sh80; check();
    a = 16'sh7FFF; b = 16'sh7FFF; a8 = 8'sh7F; b8 = 8'sh7F; check();
    for (int i = 0; i < 20000; i++) begin
      a = 16'($urandom);
      b = 16'($urandom);
      if (i % 3 == 0) a = a >>> ($urandom % 16);
      if (i % 4 == 0) b = b >>> ($urandom % 16);
      a8 = 8'($urandom);
      b8 = 8'($urandom);
      check();
    end
    checks++;
    if (n_swap == 0 || n_keep == 0) begin
      failures++;
      $display("FAIL interchange happened %0d times, not %0d times", n_swap, n_keep);
    end
    $display("operands interchanged %0d times, kept %0d times", n_swap, n_keep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
