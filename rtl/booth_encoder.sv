// booth_encoder: radix-4 (modified) Booth recoding of one overlapping
// triplet {y(2i+1), y(2i), y(2i-1)} of the multiplier into a signed digit
// in {-2, -1, 0, +1, +2}, given as a magnitude select (one, two) and a sign
// (neg). 000 and 111 are zero digits; neg is 0 for them, so a zero digit
// selects neither +X nor -X and its row is all zeros.
//   triplet : 000 001 010 011 100 101 110 111
//   digit   :  0  +1  +1  +2  -2  -1  -1   0
// The recoding table is the standard radix-4 Booth table named by the
// document; the one/two/neg encoding is this design's choice. Combinational.
module booth_encoder (
  input  logic [2:0] triplet,
  output logic       one,
  output logic       two,
  output logic       neg
);
  always_comb begin
    one = triplet[1] ^ triplet[0];
    two = (triplet[2] & ~triplet[1] & ~triplet[0]) |
          (~triplet[2] & triplet[1] & triplet[0]);
    neg = triplet[2] & ~(triplet[1] & triplet[0]);
  end
endmodule
