// tb_drd_detector: checks the dynamic range detector (N = 16) against a
// reference that counts, per byte, the 3-bit groups (7..5), (5..3), (3..1)
// whose bits are all equal, and sets SW when A's count exceeds B's. The
// range flags are checked against direct comparisons of the bit fields.
// Directed cases include the worked example A = -1, B = 3 (SW_LL = 1,
// SW_HH = 0), then 4000 random pairs biased towards small magnitudes.
module tb_drd_detector;
  localparam int N = 16;
  logic [N-1:0] a, b;
  logic [1:0] sw, a_r71, a_r73, b_r71, b_r73;
  int checks = 0, failures = 0;
  int sw_seen [2][2];

  drd_detector #(.N(N)) dut (.a(a), .b(b), .sw(sw),
    .a_r71(a_r71), .a_r73(a_r73), .b_r71(b_r71), .b_r73(b_r73));

  function automatic int zcount(logic [7:0] v);
    int n = 0;
    for (int lo = 1; lo <= 5; lo += 2) begin
      logic [2:0] g = v[lo +: 3];
      if (g == 3'b000 || g == 3'b111) n++;
    end
    return n;
  endfunction

  function automatic logic all_same(logic [7:0] v, int hi, int lo);
    logic [7:0] m = '0;
    for (int i = lo; i <= hi; i++) m[i] = 1'b1;
    return ((v & m) == m) || ((v & m) == '0);
  endfunction

  task automatic check();
    #1;
    for (int k = 0; k < 2; k++) begin
      logic [7:0] sa = a[8*k +: 8];
      logic [7:0] sb = b[8*k +: 8];
      logic exp_sw = zcount(sa) > zcount(sb);
      checks++;
      sw_seen[k][sw[k]]++;
      if (sw[k] !== exp_sw || a_r71[k] !== all_same(sa, 7, 1) || a_r73[k] !== all_same(sa, 7, 3) ||
          b_r71[k] !== all_same(sb, 7, 1) || b_r73[k] !== all_same(sb, 7, 3)) begin
        failures++;
        $display("FAIL a=%h b=%h slice %0d sw=%0d exp %0d", a, b, k, sw[k], exp_sw);
      end
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
    if (sw !== 2'b01) begin
      failures++;
      $display("FAIL worked example: sw=%b", sw);
    end
    a = 16'h0003; b = 16'hFFFF; check();
    a = 16'h0000; b = 16'h0000; check();
    for (int i = 0; i < 4000; i++) begin
      a = 16'($urandom);
      b = 16'($urandom);
      if (i % 3 == 0) a = 16'($signed(a) >>> ($urandom % 16));
      if (i % 5 == 0) b = 16'($signed(b) >>> ($urandom % 16));
      check();
    end
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (sw_seen[k][0] == 0 || sw_seen[k][1] == 0) begin
        failures++;
        $display("FAIL slice %0d switching signal never took both values", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
