// drd_unit: the dynamic range detection stage in front of the Booth
// multiplier. It runs drd_detector on the two operands and, when any slice's
// switching signal is set (SW_LL or SW_HH), interchanges them, so that the
// operand expected to give more zero Booth digits becomes the multiplier
// (the operand that is Booth encoded) and the other the multiplicand.
// Because multiplication commutes, the product is unchanged; only the
// number of non-zero partial product rows, and with it the switching
// activity, changes.
//
// The rule "swap when SW_LL or SW_HH is 1" follows the text, which says
// either signal set means the interchange makes more rows zero. Swapping the
// whole operands (rather than only the byte whose signal is set) is this
// design's choice, as only a whole-operand swap keeps the product correct.
// With USE_DRD = 0 the operands pass unchanged (the comparison design without
// DRD). Combinational.
module drd_unit #(
  parameter int N       = 16,
  parameter bit USE_DRD = 1'b1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] multiplicand,
  output logic [N-1:0] multiplier,
  output logic         swapped
);
  logic [N/8-1:0] sw;
  logic [N/8-1:0] a_r71, a_r73, b_r71, b_r73;

  drd_detector #(.N(N)) u_det (
    .a(a), .b(b), .sw(sw),
    .a_r71(a_r71), .a_r73(a_r73), .b_r71(b_r71), .b_r73(b_r73)
  );

  always_comb begin
    swapped      = USE_DRD && (|sw);
    multiplicand = swapped ? b : a;
    multiplier   = swapped ? a : b;
  end
endmodule
