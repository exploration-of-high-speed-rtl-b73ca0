// modadd8: modulo 2^8-1 adder, organization M^(3) with one valency-4 level.
//
// s = |a + b| mod 255 with an end-around carry; a sum of all ones is the
// second representation of zero (it is what 0xFF + 0x00 gives).
//
// How it works. The carry into bit i+1 of a mod 2^n-1 adder needs every
// generate/propagate pair, taken cyclically from bit i down to bit i+1.
// Factoring three terms out of it gives c_i = D_i F_i with
//   D_i = g_i + p_i g_{i-1} + p_i p_{i-1} p_{i-2}            (preprocessing)
//   F_i = R_i + R_{i-2} + Q_{i-3} R_{i-4} + Q_{i-3} Q_{i-5} R_{i-6}
// where R_i = g_i + g_{i-1} and Q_i = p_i p_{i-1} pair up neighbouring bits,
// so for n = 8 all of F_i is a single simplified valency-4 operator.
// Stages: 8 pre_ling3_cell -> 8 prefix_op4 (top propagate tied to 1) ->
// 8 sum_cell, with s_i selected by F_{i-1}; bit 0 uses F_7 and D_7.
// Bit positions below 0 wrap around modulo 8. The structure and equations
// follow the document's 8-bit example and its table of fastest adders.
// Interface: a, b, s, all 8 bits. Purely combinational.
module modadd8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [7:0] s
);
  import modadd_pkg::wrap;
  localparam int N = 8;

  logic [N-1:0] h, r, q, d, f;

  for (genvar i = 0; i < N; i++) begin : g_bit
    localparam int I1 = wrap(i - 1, N);
    localparam int I2 = wrap(i - 2, N);
    localparam int I3 = wrap(i - 3, N);
    localparam int I4 = wrap(i - 4, N);
    localparam int I5 = wrap(i - 5, N);
    localparam int I6 = wrap(i - 6, N);

    pre_ling3_cell u_pre (
      .a ({a[i], a[I1], a[I2]}),
      .b ({b[i], b[I1], b[I2]}),
      .h (h[i]), .r (r[i]), .q (q[i]), .d (d[i])
    );

    // F_i = (R_i,1) o (R_{i-2},Q_{i-3}) o (R_{i-4},Q_{i-5}) o (R_{i-6},-)
    prefix_op4 u_f (
      .g  ({r[i], r[I2], r[I4], r[I6]}),
      .p  ({1'b1, q[I3], q[I5]}),
      .gg (f[i])
    );

    sum_cell u_sum (.h (h[i]), .d (d[I1]), .f (f[I1]), .s (s[i]));
  end
endmodule
