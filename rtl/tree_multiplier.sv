// tree_multiplier: N x N unsigned multiplier with a Wallace or a Dadda
// reduction tree, both built from full adders (3:2) and half adders (2:2).
//   - An array of N*N AND gates forms the partial product bits a[i] & b[j];
//     bit j of row i sits in column i+j.
//   - TREE = WALLACE: each stage takes the rows in groups of three. In a
//     group, a column with three bits gets a full adder, a column with two
//     bits a half adder, and a lone bit passes; the group leaves a sum row
//     and a carry row (shifted one column left). Rows left over (one or two)
//     pass to the next stage. mult_pkg::wallace_mask tells, per stage and
//     row, which columns hold a bit. 8 x 8: 38 full adders, 15 half adders,
//     4 stages with 6, 4, 3 and 2 rows.
//   - TREE = DADDA: each stage reduces the columns only as far as needed to
//     reach the next height of the sequence 2, 3, 4, 6, 9, ... (from the
//     top down); mult_pkg::dadda_plan gives the adders per column. Bits in a
//     column of the next stage are ordered: sums of the column's full adders,
//     sums of its half adders, bits that passed, then carries from the
//     column to the right. 8 x 8: 35 full adders, 7 half adders, heights
//     6, 4, 3, 2.
//   - A ripple_carry_adder adds the last two rows into the 2N-bit product.
// Both rules and their adder counts follow the document's description of the
// two trees. Adding the full 2N-bit rows in the final adder, rather than
// only the columns that still hold two bits, is this design's choice.
// Combinational: p = a * b.
module tree_multiplier
  import mult_pkg::*;
#(
  parameter int    N    = 8,
  parameter tree_e TREE = DADDA
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int C  = 2 * N;
  localparam int NS = tree_stages(N, TREE);

  logic [C-1:0] row0, row1;
  logic         cout_unused;

  if (TREE == WALLACE) begin : g_wallace
    // Stage s reads the rows cur and drives nxt.
    for (genvar s = 0; s < NS; s++) begin : g_stage
      localparam int RIN  = wallace_rows(N, s);
      localparam int ROUT = wallace_rows(N, s + 1);
      logic [C-1:0] cur [N];
      logic [C:0]   nxt [N];

      if (s == 0) begin : g_first
        for (genvar r = 0; r < N; r++) begin : g_and
          assign cur[r] = C'({{N{1'b0}}, a & {N{b[r]}}}) << r;
        end
      end else begin : g_later
        for (genvar r = 0; r < N; r++) begin : g_r
          assign cur[r] = g_stage[s-1].nxt[r][C-1:0];
        end
      end

      for (genvar g = 0; g < RIN / 3; g++) begin : g_group
        localparam colmask_t M0 = wallace_mask(N, s, 3*g);
        localparam colmask_t M1 = wallace_mask(N, s, 3*g + 1);
        localparam colmask_t M2 = wallace_mask(N, s, 3*g + 2);
        logic [C:0] srow, crow;
        assign srow[C] = 1'b0;
        assign crow[0] = 1'b0;

        for (genvar c = 0; c < C; c++) begin : g_col
          localparam int K = int'(M0[c]) + int'(M1[c]) + int'(M2[c]);
          // the occupied bits of this column, lowest row first
          logic [2:0] x;
          assign x = M0[c] ? {cur[3*g+2][c], cur[3*g+1][c], cur[3*g][c]} :
                     M1[c] ? {1'b0, cur[3*g+2][c], cur[3*g+1][c]} :
                             {2'b00, cur[3*g+2][c]};
          if (K == 3) begin : g_fa
            full_adder u_fa (.a(x[0]), .b(x[1]), .cin(x[2]), .sum(srow[c]), .cout(crow[c+1]));
          end else if (K == 2) begin : g_ha
            logic [1:0] y;
            assign y = (M0[c] && M1[c]) ? {cur[3*g+1][c], cur[3*g][c]} :
                       M0[c]            ? {cur[3*g+2][c], cur[3*g][c]} :
                                          {cur[3*g+2][c], cur[3*g+1][c]};
            half_adder u_ha (.a(y[0]), .b(y[1]), .sum(srow[c]), .cout(crow[c+1]));
          end else if (K == 1) begin : g_pass
            assign srow[c]   = x[0];
            assign crow[c+1] = 1'b0;
          end else begin : g_empty
            assign srow[c]   = 1'b0;
            assign crow[c+1] = 1'b0;
          end
        end
        assign nxt[2*g]     = srow;
        assign nxt[2*g + 1] = crow;
      end

      for (genvar r = 3 * (RIN / 3); r < RIN; r++) begin : g_left
        assign nxt[ROUT - RIN + r] = {1'b0, cur[r]};
      end
      for (genvar r = ROUT; r < N; r++) begin : g_unused
        assign nxt[r] = '0;
      end
    end

    assign row0 = g_stage[NS-1].nxt[0][C-1:0];
    assign row1 = g_stage[NS-1].nxt[1][C-1:0];

  end else begin : g_dadda
    localparam int MAXH = N + 2;
    logic and_bits [C][MAXH];

    for (genvar c = 0; c < C; c++) begin : g_and_col
      localparam int LO = (c - (N - 1) > 0) ? c - (N - 1) : 0;
      localparam int H  = and_height(N, c);
      for (genvar k = 0; k < MAXH; k++) begin : g_bit
        if (k < H) begin : g_pp
          assign and_bits[c][k] = a[LO + k] & b[c - LO - k];
        end else begin : g_zero
          assign and_bits[c][k] = 1'b0;
        end
      end
    end

    // Stage s reads the columns cur and drives nxt.
    for (genvar s = 0; s < NS; s++) begin : g_stage
      logic cur [C][MAXH];
      logic nxt [C][MAXH];
      if (s == 0) begin : g_first
        assign cur = and_bits;
      end else begin : g_later
        assign cur = g_stage[s-1].nxt;
      end

      for (genvar c = 0; c < C; c++) begin : g_col
        localparam int H    = dadda_plan(N, s, c, 0);
        localparam int NFA  = dadda_plan(N, s, c, 1);
        localparam int NHA  = dadda_plan(N, s, c, 2);
        localparam int NFAR = (c == 0) ? 0 : dadda_plan(N, s, c - 1, 1);
        localparam int NHAR = (c == 0) ? 0 : dadda_plan(N, s, c - 1, 2);
        localparam int PASS = H - 3*NFA - 2*NHA;
        localparam int HOUT = NFA + NHA + PASS + NFAR + NHAR;

        // carries produced here, consumed by column c+1 (dropped past the MSB)
        logic [NFA:0] fa_c;
        logic [NHA:0] ha_c;
        assign fa_c[NFA] = 1'b0;
        assign ha_c[NHA] = 1'b0;

        for (genvar f = 0; f < NFA; f++) begin : g_fa
          full_adder u_fa (
            .a(cur[c][3*f]), .b(cur[c][3*f+1]), .cin(cur[c][3*f+2]),
            .sum(nxt[c][f]), .cout(fa_c[f])
          );
        end
        for (genvar h = 0; h < NHA; h++) begin : g_ha
          half_adder u_ha (
            .a(cur[c][3*NFA + 2*h]), .b(cur[c][3*NFA + 2*h + 1]),
            .sum(nxt[c][NFA + h]), .cout(ha_c[h])
          );
        end
        for (genvar k = 0; k < PASS; k++) begin : g_pass
          assign nxt[c][NFA + NHA + k] = cur[c][3*NFA + 2*NHA + k];
        end
        if (c > 0) begin : g_cin
          for (genvar k = 0; k < NFAR; k++) begin : g_fcin
            assign nxt[c][NFA + NHA + PASS + k] = g_col[c-1].fa_c[k];
          end
          for (genvar k = 0; k < NHAR; k++) begin : g_hcin
            assign nxt[c][NFA + NHA + PASS + NFAR + k] = g_col[c-1].ha_c[k];
          end
        end
        for (genvar k = HOUT; k < MAXH; k++) begin : g_zero
          assign nxt[c][k] = 1'b0;
        end
      end
    end

    for (genvar c = 0; c < C; c++) begin : g_final
      assign row0[c] = g_stage[NS-1].nxt[c][0];
      assign row1[c] = g_stage[NS-1].nxt[c][1];
    end
  end

  ripple_carry_adder #(.W(C)) u_cpa (
    .a(row0), .b(row1), .cin(1'b0), .s(p), .cout(cout_unused)
  );
endmodule
