// compressor_5_2: five bits of rank j plus two lateral carry-ins (cin1, cin2,
// from column j-1) are reduced to a sum of rank j and three carries of rank
// j+1. Three 3:2 compressors in series: x[2:0] -> (s1, cout1); s1, x[3], cin1
// -> (s2, cout2); s2, x[4], cin2 -> (sum, cout3). In a row of these cells
// cout1 feeds the next column's cin1 and cout2 its cin2; sum and cout3 are the
// two output bits. cout1 depends on x only and cout2 on x and cin1, so the
// lateral path crosses at most one column boundary per carry.
//   sum(x) + cin1 + cin2 = sum + 2*(cout1 + cout2 + cout3)
// The chain of three 3:2 compressors and the naming of the carries follow
// the document's figure of the 5:2 compressor. Combinational.
module compressor_5_2 (
  input  logic [4:0] x,
  input  logic       cin1,
  input  logic       cin2,
  output logic       sum,
  output logic       cout1,
  output logic       cout2,
  output logic       cout3
);
  logic s1, s2;

  full_adder u_fa1 (.a(x[0]), .b(x[1]), .cin(x[2]), .sum(s1),  .cout(cout1));
  full_adder u_fa2 (.a(s1),   .b(x[3]), .cin(cin1), .sum(s2),  .cout(cout2));
  full_adder u_fa3 (.a(s2),   .b(x[4]), .cin(cin2), .sum(sum), .cout(cout3));
endmodule
