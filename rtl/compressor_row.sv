// compressor_row: one group of ORDER partial product rows, W bits wide,
// reduced to two rows (sum_row, carry_row) whose sum equals the sum of the
// inputs modulo 2^W. One compressor cell per column:
//   ORDER 3: full_adder; carry of column j goes to carry_row[j+1].
//   ORDER 4: compressor_4_2; cout2 of column j is cin of column j+1,
//            cout1 goes to carry_row[j+1].
//   ORDER 5: compressor_5_2; cout1/cout2 of column j are cin1/cin2 of
//            column j+1, cout3 goes to carry_row[j+1].
//   ORDER 7: compressor_7_2; cout2 of column j is cin1 of column j+1,
//            cout3 of column j is cin2 of column j+2, cout1 goes to
//            carry_row[j+1].
// Lateral carries leaving column W-1 have weight 2^W and are dropped, which
// is exact because the products are computed modulo 2^W. The cells follow the
// document's compressor figures; the lateral wiring is derived from the ranks
// of their outputs. Combinational.
module compressor_row #(
  parameter int ORDER = 7,
  parameter int W     = 32
) (
  input  logic [W-1:0] in_rows [ORDER],
  output logic [W-1:0] sum_row,
  output logic [W-1:0] carry_row
);
  logic [W:0] c_out;   // carry to carry_row, index j+1
  logic [W:0] lat1;    // lateral carry into column j (cin / cin1)
  logic [W:0] lat2;    // second lateral carry into column j (cin2)
  logic [W+1:0] lat3;  // rank-2 lateral carry of the 7:2 cell

  if (!(ORDER inside {3, 4, 5, 7})) begin : g_bad_order
    $error("compressor_row: ORDER must be 3, 4, 5 or 7");
  end

  assign lat1[0] = 1'b0;
  assign lat2[0] = 1'b0;
  assign lat3[1:0] = 2'b00;
  assign c_out[0] = 1'b0;

  for (genvar j = 0; j < W; j++) begin : g_col
    logic [ORDER-1:0] x;
    for (genvar r = 0; r < ORDER; r++) begin : g_in
      assign x[r] = in_rows[r][j];
    end

    if (ORDER == 3) begin : g_fa
      full_adder u_c (.a(x[0]), .b(x[1]), .cin(x[2]), .sum(sum_row[j]), .cout(c_out[j+1]));
      assign lat1[j+1] = 1'b0;
      assign lat2[j+1] = 1'b0;
      assign lat3[j+2] = 1'b0;
    end else if (ORDER == 4) begin : g_c42
      compressor_4_2 u_c (.x(x), .cin(lat1[j]), .sum(sum_row[j]),
                          .cout1(c_out[j+1]), .cout2(lat1[j+1]));
      assign lat2[j+1] = 1'b0;
      assign lat3[j+2] = 1'b0;
    end else if (ORDER == 5) begin : g_c52
      compressor_5_2 u_c (.x(x), .cin1(lat1[j]), .cin2(lat2[j]), .sum(sum_row[j]),
                          .cout1(lat1[j+1]), .cout2(lat2[j+1]), .cout3(c_out[j+1]));
      assign lat3[j+2] = 1'b0;
    end else begin : g_c72
      compressor_7_2 u_c (.x(x), .cin1(lat1[j]), .cin2(lat3[j]), .sum(sum_row[j]),
                          .cout1(c_out[j+1]), .cout2(lat1[j+1]), .cout3(lat3[j+2]));
      assign lat2[j+1] = 1'b0;
    end
  end

  assign carry_row = c_out[W-1:0];
endmodule
