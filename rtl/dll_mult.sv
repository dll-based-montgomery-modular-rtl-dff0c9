// dll_mult -- W x W unsigned dual-logic-level (DLL) multiplier, 2W outputs.
//
// The multiplier is organised in three layers and 2W-1 parts (columns of
// equal weight; 3 parts for 2 bits, 7 for 4 bits, 63 for 32 bits).
//   Layer 1: AND gates form every partial product pp[i][j] = a[j] & b[i].
//   Layer 2: two-output XOR/AND cells (dll_ha) add two bits of a part; the
//            XOR goes down the part, the AND moves to the next part.
//   Layer 3: where a part holds a third bit, the cell is extended by a second
//            XOR/AND cell whose AND output is merged with the first by an OR
//            gate (dll_fa).
// Row i of the array adds partial-product row i to the sum and carry bits
// left by row i-1, so no carry runs sideways inside a row; row i retires
// product bit i. The W upper bits are then resolved by one carry chain of the
// same cells, whose last carry is brought out as cout (it is 0 whenever the
// circuit is correct, since a*b < 2^(2W)). For W = 2 this reduces to the
// four-output circuit of three parts: one AND for c[0], one XOR/AND cell for
// c[1], one XOR/AND cell for c[3:2].
//
// Interface: a, b (W bits) in; c (2W bits) = a*b and cout out.
// Timing: purely combinational; the longest path runs through W-1 array rows
// and the W-cell carry chain, about 2W cells.
//
// The layer and part structure and the XOR/AND/OR cells follow the
// multiplier description; the row-by-row carry-save arrangement of the cells
// for W above 2 and the final carry chain are this design's reading of how
// the parts are chained.
module dll_mult #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] c,
  output logic           cout
);
  if (W < 2) begin : g_w_check
    $error("dll_mult: W must be at least 2");
  end

  // Layer 1: partial products. pp[i][j] has weight i+j.
  logic pp [W][W];

  for (genvar i = 0; i < W; i++) begin : g_pp_row
    for (genvar j = 0; j < W; j++) begin : g_pp_col
      assign pp[i][j] = a[j] & b[i];
    end
  end

  // Layers 2 and 3: the carry-save rows. In row i, sum[j] is the bit left at
  // weight i+j and cry[j] the carry left at weight i+j+1.
  for (genvar i = 0; i < W; i++) begin : g_row
    logic [W-1:0] sum;
    logic [W-1:0] cry;
    if (i == 0) begin : g_top
      for (genvar j = 0; j < W; j++) begin : g_cell
        assign sum[j] = pp[0][j];
      end
      assign cry = '0;
    end else begin : g_body
      for (genvar j = 0; j < W; j++) begin : g_cell
        if (j < W-1 && i == 1) begin : g_two
          dll_ha u_ha (.x(pp[i][j]), .y(g_row[i-1].sum[j+1]),
                       .s(sum[j]), .co(cry[j]));
        end else if (j < W-1) begin : g_three
          dll_fa u_fa (.x(pp[i][j]), .y(g_row[i-1].sum[j+1]),
                       .z(g_row[i-1].cry[j]), .s(sum[j]), .co(cry[j]));
        end else if (i == 1) begin : g_edge_first
          assign sum[j] = pp[i][j];
          assign cry[j] = 1'b0;
        end else begin : g_edge
          dll_ha u_ha (.x(pp[i][j]), .y(g_row[i-1].cry[j]),
                       .s(sum[j]), .co(cry[j]));
        end
      end
    end
    assign c[i] = sum[0];
  end

  // Final carry chain over the upper W product bits; g_chain[j].co has
  // weight W+j+1.
  for (genvar j = 0; j < W; j++) begin : g_chain
    logic co;
    if (j == 0) begin : g_first
      dll_ha u_ha (.x(g_row[W-1].sum[1]), .y(g_row[W-1].cry[0]),
                   .s(c[W]), .co(co));
    end else if (j < W-1) begin : g_mid
      dll_fa u_fa (.x(g_row[W-1].sum[j+1]), .y(g_row[W-1].cry[j]),
                   .z(g_chain[j-1].co), .s(c[W+j]), .co(co));
    end else begin : g_last
      dll_ha u_ha (.x(g_row[W-1].cry[j]), .y(g_chain[j-1].co),
                   .s(c[W+j]), .co(co));
    end
  end

  assign cout = g_chain[W-1].co;
endmodule
