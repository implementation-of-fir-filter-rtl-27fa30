// array_multiplier: W x W two's complement array multiplier, p = a * x.
//
// All partial products a_i x_j are formed at once with AND gates (the dot
// matrix of hand multiplication). Those that pair exactly one sign bit with a
// non-sign bit have negative weight. They are summed by W-1 carry-save rows of
// mult_cell adders followed by one ripple row:
//   * the first row adds the partial products of the two lowest x bits;
//   * each further row adds the next x bit's partial products to the sums and
//     carries of the row above;
//   * in every carry-save row but the last, the cells that receive a
//     negative-weight bit are of kind II, the others of kind I;
//   * the last carry-save row (sign bit of x) and the ripple row use kind II'
//     cells, so that every product bit except the MSB leaves with positive
//     weight; the carry out of the ripple row is the product's sign bit.
// The arrangement and the three cell kinds follow the published multiplier
// diagram, which is drawn for W = 4; the generalisation to other square sizes
// is this design's. Internally, as in that diagram, index 0 is the
// MSB (A(0), X(0) are the sign bits); the ports use the usual LSB-0 order.
// Fully combinational; the longest path runs through about 2W cells.
module array_multiplier
  import mult_pkg::*;
#(
  parameter int W = 4   // word length of both operands, at least 3
) (
  input  logic [W-1:0]   a,   // coefficient, two's complement
  input  logic [W-1:0]   x,   // data, two's complement
  output logic [2*W-1:0] p    // product, two's complement
);
  // MSB-first views of the operands and of the product.
  logic [W-1:0]   am, xm;
  logic [2*W-1:0] ym;
  for (genvar k = 0; k < W; k++) begin : g_rev_in
    assign am[k] = a[W-1-k];
    assign xm[k] = x[W-1-k];
  end
  for (genvar k = 0; k < 2*W; k++) begin : g_rev_out
    assign p[k] = ym[2*W-1-k];
  end

  // Partial product a_i x_j, MSB-first indices.
  logic pp [W][W];
  always_comb
    for (int i = 0; i < W; i++)
      for (int j = 0; j < W; j++)
        pp[i][j] = am[i] & xm[j];

  // Carry-save rows r = 0 .. W-2, cells i = 0 .. W-2; each cell's sum and
  // carry are g_row[r].g_cell[i].s and .c.
  for (genvar r = 0; r < W-1; r++) begin : g_row
    for (genvar i = 0; i < W-1; i++) begin : g_cell
      localparam int J = W - 2 - r;  // x bit whose products enter from the right
      logic top, right, cin, s, c;
      if (r == 0) begin : g_first
        assign top = pp[i][W-1];
        assign cin = 1'b0;
      end else begin : g_next
        if (i == 0) begin : g_edge
          assign top = pp[0][J+1];
        end else begin : g_inner
          assign top = g_row[r-1].g_cell[i-1].s;
        end
        assign cin = g_row[r-1].g_cell[i].c;
      end
      assign right = pp[i+1][J];

      if (r == W-2) begin : g_iip
        // top and right carry negative weight, the carry from above positive.
        mult_cell #(.KIND(CELL_IIP)) u_cell (
          .x(cin), .y(top), .z(right), .c(c), .s(s));
      end else if (i <= r) begin : g_ii
        // top carries negative weight.
        mult_cell #(.KIND(CELL_II)) u_cell (
          .x(right), .y(cin), .z(top), .c(c), .s(s));
      end else begin : g_i
        mult_cell #(.KIND(CELL_I)) u_cell (
          .x(top), .y(right), .z(cin), .c(c), .s(s));
      end
    end
  end

  // Low product bits: the LSB partial product and the rightmost sum of each row.
  assign ym[2*W-1] = pp[W-1][W-1];
  for (genvar r = 0; r < W-1; r++) begin : g_low
    assign ym[2*W-2-r] = g_row[r].g_cell[W-2].s;
  end

  // Ripple row: carries of negative weight run from right to left.
  logic rc [W];
  assign rc[W-1] = 1'b0;  // constant input, read as a negative-weight zero
  for (genvar i = 0; i < W-1; i++) begin : g_ripple
    logic top;
    if (i == 0) begin : g_edge
      assign top = pp[0][0];
    end else begin : g_inner
      assign top = g_row[W-2].g_cell[i-1].s;
    end
    mult_cell #(.KIND(CELL_IIP)) u_cell (
      .x(top), .y(g_row[W-2].g_cell[i].c), .z(rc[i+1]), .c(rc[i]), .s(ym[i+1]));
  end
  assign ym[0] = rc[0];
endmodule
