// compressor_4_2: four bits of rank j plus a lateral carry-in (from column j-1)
// are reduced to one bit of rank j (sum) and two bits of rank j+1 (cout1, cout2).
// Two 3:2 compressors in series: the first adds x[2:0]; its sum, x[3] and cin
// go to the second, which gives sum and cout1. The first stage's carry leaves
// as cout2, the lateral carry to column j+1; it does not depend on cin, so a
// row of these cells has no carry ripple.
//   x[0]+x[1]+x[2]+x[3]+cin = sum + 2*(cout1 + cout2)
// The cell structure follows the document's figure of the 4:2 compressor.
// Combinational.
module compressor_4_2 (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       sum,
  output logic       cout1,
  output logic       cout2
);
  logic s1;

  full_adder u_fa1 (.a(x[0]), .b(x[1]), .cin(x[2]), .sum(s1),  .cout(cout2));
  full_adder u_fa2 (.a(s1),   .b(x[3]), .cin(cin),  .sum(sum), .cout(cout1));
endmodule
