// pre_hpg_cell: plain preprocessing cell of one bit of a prefix adder.
//
// Computes the half-sum h = a xor b, the propagate p = a + b (the OR form,
// which is what lets the Ling-style factorizations pull p_i out of a carry)
// and the generate g = a b. The 16- and 64-bit adders use this cell for
// their initial level, which does no factorization.
// Purely combinational; one gate level.
module pre_hpg_cell (
  input  logic a,
  input  logic b,
  output logic h,
  output logic p,
  output logic g
);
  assign h = a ^ b;
  assign p = a | b;
  assign g = a & b;
endmodule
