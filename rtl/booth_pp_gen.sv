// booth_pp_gen: radix-4 Booth partial product generator for an N x N signed
// (two's complement) multiplication, giving N/2 rows.
// The multiplier (mr = multiplier with y(-1) = 0 appended) is recoded into
// N/2 digits d(i) by booth_encoder, from the overlapping triplets
// y(2i+1), y(2i), y(2i-1). The multiples of the multiplicand are prepared
// once, N+1 bits wide: mp = X and negmp = -X, and +/-2X are these shifted
// left by one. Row i selects 0, +X, -X, +2X or -2X by d(i), sign extends it
// to the full 2N-bit width and shifts it left by 2i, as in the document's
// example of fully sign-extended rows. The sum of the rows modulo 2^(2N) is
// the product, so no correction bits are needed.
// Forming -X once (one N+1-bit negation) and the names mr, mp, negmp follow
// the document's simulation of the 16 x 16 design; the (N+1)-bit width of
// negmp, which keeps -(-2^(N-1)) exact, is this design's choice.
// Combinational.
module booth_pp_gen #(
  parameter int N = 16,
  localparam int W    = 2 * N,
  localparam int ROWS = N / 2
) (
  input  logic [N-1:0] multiplicand,
  input  logic [N-1:0] multiplier,
  output logic [W-1:0] rows [ROWS]
);
  logic [N:0] mr;      // multiplier with y(-1) = 0 appended
  logic [N:0] mp;      // +X, sign extended to N+1 bits
  logic [N:0] negmp;   // -X
  logic [ROWS-1:0] one, two, neg;

  always_comb begin
    mr    = {multiplier, 1'b0};
    mp    = {multiplicand[N-1], multiplicand};
    negmp = -mp;
  end

  for (genvar i = 0; i < ROWS; i++) begin : g_digit
    logic [N:0]   x1;  // +X or -X
    logic [W-1:0] m;   // selected multiple, sign extended

    booth_encoder u_enc (
      .triplet(mr[2*i +: 3]), .one(one[i]), .two(two[i]), .neg(neg[i])
    );

    always_comb begin
      x1 = neg[i] ? negmp : mp;
      if (one[i])      m = W'(signed'(x1));
      else if (two[i]) m = W'(signed'({x1, 1'b0}));
      else             m = '0;
      rows[i] = m << (2*i);
    end
  end
endmodule
