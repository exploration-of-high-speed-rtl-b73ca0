// modadd32: modulo 2^32-1 adder, organization M^(3),(-),(-) with two
// valency-4 prefix levels.
//
// s = |a + b| mod (2^32-1) with an end-around carry; all ones is the second
// zero.
//
// How it works. As in modadd8, a 3-term factorization in preprocessing
// gives c_i = D_i F_i with D_i = g_i + p_i g_{i-1} + p_i p_{i-1} p_{i-2}, so
// the D tree ends right after preprocessing. F_i spans all 32 bits and is
// computed by two levels of valency-4 operators on the Ling pairs
// R_i = g_i + g_{i-1}, Q_i = p_i p_{i-1}:
//   level 1 (simplified, covers 8 bits)
//     F1_i = R_i + R_{i-2} + Q_{i-3} R_{i-4} + Q_{i-3} Q_{i-5} R_{i-6}
//     Q1_i = Q_i Q_{i-2} Q_{i-4} (R_{i-5} + Q_{i-6})
//   level 2 (full operator, covers 32 bits)
//     F2_i = F1_i + Q1_{i-3} F1_{i-8} + Q1_{i-3} Q1_{i-11} F1_{i-16}
//          + Q1_{i-3} Q1_{i-11} Q1_{i-19} F1_{i-24}
// The (R + Q) factor in Q1 carries the missing Q of the next group's
// first Ling term. Summation: s_i = F2_{i-1} ? h_i ^ D_{i-1} : h_i.
// All indices wrap modulo 32. This is the organization the document found
// fastest for n = 32 (its "Adder 2"); the variant that also factors level 1
// was slower there and is not built.
// Interface: a, b, s, all 32 bits. Purely combinational.
module modadd32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] s
);
  import modadd_pkg::wrap;
  localparam int N = 32;

  logic [N-1:0] h, r, q, d;
  logic [N-1:0] f1, q1;
  logic [N-1:0] f2;

  for (genvar i = 0; i < N; i++) begin : g_l1
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

    prefix_op4 u_f1 (
      .g  ({r[i], r[I2], r[I4], r[I6]}),
      .p  ({1'b1, q[I3], q[I5]}),
      .gg (f1[i])
    );

    assign q1[i] = q[i] & q[I2] & q[I4] & (r[I5] | q[I6]);
  end

  for (genvar i = 0; i < N; i++) begin : g_l2
    localparam int I1  = wrap(i - 1, N);
    localparam int I3  = wrap(i - 3, N);
    localparam int I8  = wrap(i - 8, N);
    localparam int I11 = wrap(i - 11, N);
    localparam int I16 = wrap(i - 16, N);
    localparam int I19 = wrap(i - 19, N);
    localparam int I24 = wrap(i - 24, N);

    prefix_op4 u_f2 (
      .g  ({f1[i], f1[I8], f1[I16], f1[I24]}),
      .p  ({q1[I3], q1[I11], q1[I19]}),
      .gg (f2[i])
    );

    sum_cell u_sum (.h (h[i]), .d (d[I1]), .f (f2[I1]), .s (s[i]));
  end
endmodule
