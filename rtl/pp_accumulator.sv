// pp_accumulator: partial product accumulation. ROWS rows of W bits are
// reduced by carry-save addition, without any carry propagation, to two rows
// (sum_row, carry_row) whose sum modulo 2^W equals the sum of all rows; a
// carry propagate adder then finishes the product.
//
// Each stage splits its rows, in order, into groups of ORDER rows and reduces
// every group to two rows with a compressor_row of order ORDER (3:2, 4:2, 5:2
// or 7:2 compressors). A last group of one or two rows passes to the next
// stage unchanged; a last group of three or more rows (fewer than ORDER) is
// padded with zero rows and compressed like the others. Stages repeat until
// two rows remain; mult_pkg::accum_stages gives how many. For the 16 x 16
// multiplier (8 rows) that is 2 stages with 7:2, 5:2 or 4:2 compressors and
// 4 with 3:2.
//
// The document gives the compressors and that they reduce the rows to two;
// the grouping of rows into stages is this design's choice. Combinational.
module pp_accumulator
  import mult_pkg::*;
#(
  parameter int ROWS  = 8,
  parameter int W     = 32,
  parameter int ORDER = 7
) (
  input  logic [W-1:0] rows [ROWS],
  output logic [W-1:0] sum_row,
  output logic [W-1:0] carry_row
);
  localparam int NST = accum_stages(ROWS, ORDER);

  // Stage s reads cur (rows entering it; only the first accum_rows(s) are
  // used) and drives nxt.
  for (genvar s = 0; s < NST; s++) begin : g_stage
    logic [W-1:0] cur [ROWS];
    logic [W-1:0] nxt [ROWS];
    if (s == 0) begin : g_first
      assign cur = rows;
    end else begin : g_later
      assign cur = g_stage[s-1].nxt;
    end
    localparam int RIN    = accum_rows(ROWS, ORDER, s);
    localparam int ROUT   = accum_rows(ROWS, ORDER, s + 1);
    localparam int GROUPS = (RIN + ORDER - 1) / ORDER;

    for (genvar g = 0; g < GROUPS; g++) begin : g_group
      localparam int SIZE = (RIN - g*ORDER < ORDER) ? RIN - g*ORDER : ORDER;
      if (SIZE <= 2) begin : g_pass
        for (genvar r = 0; r < SIZE; r++) begin : g_r
          assign nxt[2*g + r] = cur[g*ORDER + r];
        end
      end else begin : g_comp
        logic [W-1:0] grp [ORDER];
        for (genvar r = 0; r < ORDER; r++) begin : g_r
          if (r < SIZE) begin : g_used
            assign grp[r] = cur[g*ORDER + r];
          end else begin : g_pad
            assign grp[r] = '0;
          end
        end
        compressor_row #(.ORDER(ORDER), .W(W)) u_row (
          .in_rows(grp), .sum_row(nxt[2*g]), .carry_row(nxt[2*g+1])
        );
      end
    end

    for (genvar r = ROUT; r < ROWS; r++) begin : g_unused
      assign nxt[r] = '0;
    end
  end

  if (NST == 0) begin : g_none
    assign sum_row   = rows[0];
    assign carry_row = (ROWS > 1) ? rows[ROWS-1] : '0;
  end else begin : g_out
    assign sum_row   = g_stage[NST-1].nxt[0];
    assign carry_row = g_stage[NST-1].nxt[1];
  end
endmodule
