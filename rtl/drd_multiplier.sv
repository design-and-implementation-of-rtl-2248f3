// drd_multiplier: N x N signed (two's complement) multiplier with dynamic
// range detection, the design this RTL is built around. Four stages, all
// combinational:
//   1. drd_unit picks which operand is Booth encoded: the one whose bytes
//      hold more 000/111 triplets, so that more partial product rows are zero
//      and fewer nodes toggle.
//   2. booth_pp_gen forms N/2 radix-4 Booth partial product rows.
//   3. pp_accumulator reduces the rows to two with 3:2, 4:2, 5:2 or 7:2
//      compressors (ORDER).
//   4. ripple_carry_adder adds the two rows into the 2N-bit product.
// Interface: a, b in; p = a * b (2N bits, two's complement); swapped tells
// whether the operands were interchanged. No clock: the product settles one
// combinational delay after the operands change.
// Defaults: N = 16 and 7:2 compressors, the document's largest multiplier
// with the compressor it found fastest; USE_DRD = 0 gives its comparison
// design without the detector. Stage order and stage contents follow the
// document's block diagram.
module drd_multiplier #(
  parameter int N       = 16,
  parameter int ORDER   = 7,
  parameter bit USE_DRD = 1'b1
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p,
  output logic           swapped
);
  localparam int W    = 2 * N;
  localparam int ROWS = N / 2;

  logic [N-1:0] mcand, mplier;
  logic [W-1:0] pp [ROWS];
  logic [W-1:0] sum_row, carry_row;
  logic         cout_unused;

  drd_unit #(.N(N), .USE_DRD(USE_DRD)) u_drd (
    .a(a), .b(b), .multiplicand(mcand), .multiplier(mplier), .swapped(swapped)
  );

  booth_pp_gen #(.N(N)) u_ppg (
    .multiplicand(mcand), .multiplier(mplier), .rows(pp)
  );

  pp_accumulator #(.ROWS(ROWS), .W(W), .ORDER(ORDER)) u_acc (
    .rows(pp), .sum_row(sum_row), .carry_row(carry_row)
  );

  ripple_carry_adder #(.W(W)) u_cpa (
    .a(sum_row), .b(carry_row), .cin(1'b0), .s(p), .cout(cout_unused)
  );
endmodule
