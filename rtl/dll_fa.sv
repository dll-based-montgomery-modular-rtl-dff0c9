// dll_fa -- third-layer cell of the dual-logic-level (DLL) multiplier.
//
// Adds three bits of equal weight. The first XOR/AND cell combines x and y;
// its XOR output feeds a second XOR/AND cell together with z. The XOR of the
// second cell is the sum that goes down the column. The two AND outputs are
// never both 1, so a single OR gate merges them into the carry for the next
// column. This is the "AND first, then XOR" ordering of the third layer: the
// carry path through the cell is one AND and one OR, while the sum needs the
// two XORs.
//
// Interface: x, y, z in; s (sum) and co (carry) out. Combinational.
//
// The cell structure (two XOR/AND cells and an OR gate) follows the
// multiplier description.
module dll_fa (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic s,
  output logic co
);
  logic s1, c1, c2;

  dll_ha u_ha1 (.x(x),  .y(y), .s(s1), .co(c1));
  dll_ha u_ha2 (.x(s1), .y(z), .s(s),  .co(c2));

  assign co = c1 | c2;
endmodule
