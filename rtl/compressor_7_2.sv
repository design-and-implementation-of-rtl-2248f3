// compressor_7_2: seven bits of rank j plus two carry-ins of rank j are
// reduced with five 3:2 compressors.
//   - two 3:2 compressors add x[2:0] and x[5:3];
//   - a third adds their two sums and x[6];
//   - a fourth adds that sum and cin1, cin2, giving sum (rank j) and cout1
//     (rank j+1), the two output bits of the column;
//   - a fifth adds the three rank-(j+1) carries of the first three, giving
//     cout2 (rank j+1) and cout3 (rank j+2).
//   sum(x) + cin1 + cin2 = sum + 2*(cout1 + cout2) + 4*cout3
// In a row of these cells, cout2 of column j-1 and cout3 of column j-2 arrive
// as cin1 and cin2 of column j. cout2 and cout3 depend on x only, so the row
// has no carry ripple. The five-cell arrangement is taken from the document's
// figure of the 7:2 compressor; which output of each 3:2 cell is the sum and
// which the carry is this design's reading, fixed by the ranks above.
// Combinational.
module compressor_7_2 (
  input  logic [6:0] x,
  input  logic       cin1,
  input  logic       cin2,
  output logic       sum,
  output logic       cout1,
  output logic       cout2,
  output logic       cout3
);
  logic sa, ca, sb, cb, sm, cm;

  full_adder u_fa_a (.a(x[0]), .b(x[1]), .cin(x[2]), .sum(sa),    .cout(ca));
  full_adder u_fa_b (.a(x[3]), .b(x[4]), .cin(x[5]), .sum(sb),    .cout(cb));
  full_adder u_fa_m (.a(sa),   .b(sb),   .cin(x[6]), .sum(sm),    .cout(cm));
  full_adder u_fa_s (.a(sm),   .b(cin1), .cin(cin2), .sum(sum),   .cout(cout1));
  full_adder u_fa_c (.a(ca),   .b(cb),   .cin(cm),   .sum(cout2), .cout(cout3));
endmodule
