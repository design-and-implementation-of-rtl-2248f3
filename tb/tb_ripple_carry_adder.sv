// tb_ripple_carry_adder: 32-bit ripple adder against a + b + cin computed
// with a 64-bit integer; includes the full carry-chain case 0xFFFFFFFF + 1.
module tb_ripple_carry_adder;
  localparam int W = 32;
  logic [W-1:0] a, b, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  ripple_carry_adder #(.W(W)) dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  task automatic check();
    logic [W:0] exp_v;
    #1;
    exp_v = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
    checks++;
    if ({cout, s} !== exp_v) begin
      failures++;
      $display("FAIL %h + %h + %0d = %h expected %h", a, b, cin, {cout, s}, exp_v);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '1; b = '0; cin = 1'b1; check();
    a = '1; b = '1; cin = 1'b1; check();
    a = '0; b = '0; cin = 1'b0; check();
    for (int i = 0; i < 5000; i++) begin
      a = $urandom; b = $urandom; cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
