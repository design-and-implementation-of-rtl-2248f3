// multiplier_top: the multipliers of this design side by side, each with its
// own ports:
//   - drd_*: the 16 x 16 signed dynamic-range-detection Booth multiplier
//     with 7:2 compressors (drd_multiplier at its defaults);
//   - wal_*: an 8 x 8 unsigned Wallace tree multiplier;
//   - dad_*: an 8 x 8 unsigned Dadda tree multiplier.
// The three do not share logic; the tree multipliers are the document's
// separate study of reduction trees. All paths are combinational.
module multiplier_top
  import mult_pkg::*;
(
  input  logic [15:0] drd_a,
  input  logic [15:0] drd_b,
  output logic [31:0] drd_p,
  output logic        drd_swapped,
  input  logic [7:0]  wal_a,
  input  logic [7:0]  wal_b,
  output logic [15:0] wal_p,
  input  logic [7:0]  dad_a,
  input  logic [7:0]  dad_b,
  output logic [15:0] dad_p
);
  drd_multiplier u_drd (.a(drd_a), .b(drd_b), .p(drd_p), .swapped(drd_swapped));

  tree_multiplier #(.N(8), .TREE(WALLACE)) u_wallace (.a(wal_a), .b(wal_b), .p(wal_p));
  tree_multiplier #(.N(8), .TREE(DADDA))   u_dadda   (.a(dad_a), .b(dad_b), .p(dad_p));
endmodule
