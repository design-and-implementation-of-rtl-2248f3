// drd_detector: dynamic range detector. It estimates, byte by byte, how many
// radix-4 Booth digits of each operand would be zero and flags each byte in
// which operand A would give more zero digits than operand B.
//
// Each 8-bit slice of an operand is cut into three overlapping 3-bit groups,
// bits (7,6,5), (5,4,3) and (3,2,1) of the slice. A group whose three bits are
// all equal (000 or 111) is a Booth triplet that encodes to a zero partial
// product; a comparator per group detects this. Per slice and operand the
// three comparator outputs are turned into a thermometer count:
//   ge1 = at least one zero group, ge2 = at least two, all3 = all three.
// The switching signal of slice k is
//   sw[k] = (ge1A & ~ge1B) | (ge2A & ~ge2B) | (all3A & ~all3B),
// i.e. 1 when the count of A is strictly larger than the count of B, so that
// interchanging the operands makes more partial product rows zero.
// sw[0] is SW_LL (bits 7..0) and, for N = 16, sw[1] is SW_HH (bits 15..8).
// The range flags report where an operand is only sign extension:
// a_r71[k] = bits 8k+7..8k+1 all equal (A(7,1), A(15,9) in the upper byte),
// a_r73[k] = bits 8k+7..8k+3 all equal (A(7,3)); likewise for B.
//
// The grouping of bits, the comparator, the thermometer signals and the names
// SW_LL, SW_HH, A(7,1), A(7,3), A(15,9) follow the document's detector
// figure. The comparison rule is written from the text. Cross-byte
// switching signals (SW_HL, SW_LH: a byte of A against the other byte of B)
// are not described there and are not produced here.
// Combinational; N must be a multiple of 8.
module drd_detector #(
  parameter int N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [N/8-1:0] sw,
  output logic [N/8-1:0] a_r71,
  output logic [N/8-1:0] a_r73,
  output logic [N/8-1:0] b_r71,
  output logic [N/8-1:0] b_r73
);
  localparam int SLICES = N / 8;

  if (N % 8 != 0) begin : g_bad_n
    $error("drd_detector: N must be a multiple of 8");
  end

  // 1 when a 3-bit group is 000 or 111.
  function automatic logic group_zero(logic [2:0] g);
    return (&g) | ~(|g);
  endfunction

  for (genvar k = 0; k < SLICES; k++) begin : g_slice
    logic [7:0] sa, sb;
    logic [2:0] za, zb;  // [2] = bits 7..5, [1] = 5..3, [0] = 3..1
    logic ge1a, ge2a, all3a, ge1b, ge2b, all3b;

    always_comb begin
      sa = a[8*k +: 8];
      sb = b[8*k +: 8];
      za = {group_zero(sa[7:5]), group_zero(sa[5:3]), group_zero(sa[3:1])};
      zb = {group_zero(sb[7:5]), group_zero(sb[5:3]), group_zero(sb[3:1])};
      ge1a  = |za;
      ge2a  = (za[2] & za[1]) | (za[2] & za[0]) | (za[1] & za[0]);
      all3a = &za;
      ge1b  = |zb;
      ge2b  = (zb[2] & zb[1]) | (zb[2] & zb[0]) | (zb[1] & zb[0]);
      all3b = &zb;
      sw[k]    = (ge1a & ~ge1b) | (ge2a & ~ge2b) | (all3a & ~all3b);
      a_r71[k] = all3a;
      a_r73[k] = za[2] & za[1];
      b_r71[k] = all3b;
      b_r73[k] = zb[2] & zb[1];
    end
  end
endmodule
