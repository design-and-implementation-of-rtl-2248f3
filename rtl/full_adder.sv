// full_adder: the 3:2 compressor, the basic cell of every reduction tree in
// this design. It adds three bits of the same rank (bit position) and returns
// a sum of that rank and a carry of the next rank, so a + b + cin = sum + 2*cout.
// Purely combinational, no clock. The gate equations are the usual XOR/majority
// form; the document describes the cell only by its inputs and outputs.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
