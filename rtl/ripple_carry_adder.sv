// ripple_carry_adder: W-bit carry propagate adder made of W full adders in a
// chain, the carry-out of bit i being the carry-in of bit i+1. It adds the
// two rows left by the partial product accumulation:
//   {cout, s} = a + b + cin.
// The worst-case path runs from bit 0 through every carry to s[W-1]/cout.
// Structure as described in the document. Combinational.
module ripple_carry_adder #(
  parameter int W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(s[i]), .cout(c[i+1]));
  end
  assign cout = c[W];
endmodule
