// half_adder: the 2:2 compressor used by the Wallace and Dadda trees. It adds
// two bits of one rank into a sum of that rank and a carry of the next rank,
// a + b = sum + 2*cout. Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = a ^ b;
    cout = a & b;
  end
endmodule
