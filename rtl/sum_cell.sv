// sum_cell: summation cell of a factorized mod 2^n-1 adder.
//
// The carry into bit i is c_{i-1} = D_{i-1} F_{i-1}, where D comes from the
// D (factor) tree and F from the F (simplified carry) tree. Since
// s_i = h_i xor c_{i-1}, the cell precomputes h_i xor D_{i-1} and lets the
// late-arriving F_{i-1} select: s_i = F_{i-1} ? (h_i xor D_{i-1}) : h_i
// (as in the document: an XOR feeding input 1 of a 2:1 mux, h_i on input 0).
// Purely combinational.
module sum_cell (
  input  logic h,
  input  logic d,
  input  logic f,
  output logic s
);
  assign s = f ? (h ^ d) : h;
endmodule
