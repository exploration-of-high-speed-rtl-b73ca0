// pre_ling3_cell: preprocessing cell of bit i for the 3-term factorization.
//
// Inputs are the operand bits of positions i, i-1 and i-2 (bit 2 = i,
// bit 0 = i-2; positions wrap modulo n in the adder that uses the cell).
// Outputs:
//   h = a_i xor b_i                       half sum
//   r = g_i + g_{i-1}                     Ling generate R_i
//   q = p_i p_{i-1}                       Ling propagate Q_i
//   d = g_i + p_i g_{i-1} + p_i p_{i-1} p_{i-2}   factor D_i
// with g = a b and p = a + b. The carry into bit i+1 is then c_i = D_i F_i,
// where F_i is built from R and Q alone by the prefix tree. The equations
// are the document's; the gate arrangement is left to synthesis (the
// document maps R, Q and D onto AOI/OAI compound gates).
// Purely combinational.
module pre_ling3_cell (
  input  logic [2:0] a,
  input  logic [2:0] b,
  output logic       h,
  output logic       r,
  output logic       q,
  output logic       d
);
  // Only bit i-2's propagate enters D_i; its generate is never needed.
  logic [2:1] g;
  logic [2:0] p;

  assign g = a[2:1] & b[2:1];
  assign p = a | b;

  assign h = a[2] ^ b[2];
  assign r = g[2] | g[1];
  assign q = p[2] & p[1];
  assign d = g[2] | (p[2] & g[1]) | (p[2] & p[1] & p[0]);
endmodule
