// dll_ha -- the two-output cell of the dual-logic-level (DLL) multiplier.
//
// Each cell receives two bits and presents both of its logic functions at
// once: the XOR, which is the sum bit that stays in the current column
// ("part") of the multiplier and goes down, and the AND, which is the carry
// handed to the next, more significant part. The cell is the second-layer
// element of the multiplier; two of them plus an OR gate form the third-layer
// element (dll_fa).
//
// Interface: x, y in; s = x ^ y, co = x & y out. Purely combinational, one
// gate level per output.
//
// The XOR/AND pairing follows the multiplier description; writing the cell
// as a module of its own is this design's choice.
module dll_ha (
  input  logic x,
  input  logic y,
  output logic s,
  output logic co
);
  assign s  = x ^ y;
  assign co = x & y;
endmodule
