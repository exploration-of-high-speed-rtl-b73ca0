// modadd64: modulo 2^64-1 adder, organization M^(-),(1),(1),(-) with three
// valency-4 prefix levels.
//
// s = |a + b| mod (2^64-1) with an end-around carry; all ones is the second
// zero.
//
// How it works. Preprocessing is plain h/p/g. Each of the first two prefix
// levels builds 4-wide groups of the level below and factors one term out
// of the carry into the D tree; the last level is a simplified operator:
//   level 1  F1_i = g_i + g_{i-1} + p_{i-1} g_{i-2} + p_{i-1} p_{i-2} g_{i-3}
//            Q1_i = p_i p_{i-1} p_{i-2} p_{i-3}
//            D1_i = p_i (F1_i + Q1_{i-1})
//   level 2  F2_i = F1_i + F1_{i-4} + Q1_{i-5} F1_{i-8} + Q1_{i-5} Q1_{i-9} F1_{i-12}
//            Q2_i = Q1_i Q1_{i-4} Q1_{i-8} (F1_{i-11} + Q1_{i-12})
//            D2_i = D1_i (F2_i + Q2_{i-5})
//   level 3  F3_i = F2_i + F2_{i-16} + Q2_{i-21} F2_{i-32} + Q2_{i-21} Q2_{i-37} F2_{i-48}
// giving c_i = D2_i F3_i and s_i = F3_{i-1} ? h_i ^ D2_{i-1} : h_i.
// All indices wrap modulo 64. The organization, level 1 (F1, Q1) and level
// 3 are the document's. D1, Q2, F2 and D2 are derived here with the same
// factorization pattern the document uses for its 32-bit adders
// (Q1_i = Q_i Q_{i-2} Q_{i-4} (R_{i-5} + Q_{i-6}), D1_i = D_i (F1_i + Q1_{i-3}));
// F2 is the 16-bit adder's level 2. The result is exact.
// Interface: a, b, s, all 64 bits. Purely combinational.
module modadd64 (
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] s
);
  import modadd_pkg::wrap;
  localparam int N = 64;

  logic [N-1:0] h, p, g;
  logic [N-1:0] f1, q1, d1;
  logic [N-1:0] f2, q2, d2;
  logic [N-1:0] f3;

  for (genvar i = 0; i < N; i++) begin : g_pre
    pre_hpg_cell u_pre (.a (a[i]), .b (b[i]), .h (h[i]), .p (p[i]), .g (g[i]));
  end

  for (genvar i = 0; i < N; i++) begin : g_l1
    localparam int I1 = wrap(i - 1, N);
    localparam int I2 = wrap(i - 2, N);
    localparam int I3 = wrap(i - 3, N);

    prefix_op4 u_f1 (
      .g  ({g[i], g[I1], g[I2], g[I3]}),
      .p  ({1'b1, p[I1], p[I2]}),
      .gg (f1[i])
    );

    assign q1[i] = p[i] & p[I1] & p[I2] & p[I3];
    assign d1[i] = p[i] & (f1[i] | q1[I1]);
  end

  for (genvar i = 0; i < N; i++) begin : g_l2
    localparam int I4  = wrap(i - 4, N);
    localparam int I5  = wrap(i - 5, N);
    localparam int I8  = wrap(i - 8, N);
    localparam int I9  = wrap(i - 9, N);
    localparam int I11 = wrap(i - 11, N);
    localparam int I12 = wrap(i - 12, N);

    prefix_op4 u_f2 (
      .g  ({f1[i], f1[I4], f1[I8], f1[I12]}),
      .p  ({1'b1, q1[I5], q1[I9]}),
      .gg (f2[i])
    );

    assign q2[i] = q1[i] & q1[I4] & q1[I8] & (f1[I11] | q1[I12]);
  end

  for (genvar i = 0; i < N; i++) begin : g_l3
    localparam int I1  = wrap(i - 1, N);
    localparam int I5  = wrap(i - 5, N);
    localparam int I16 = wrap(i - 16, N);
    localparam int I21 = wrap(i - 21, N);
    localparam int I32 = wrap(i - 32, N);
    localparam int I37 = wrap(i - 37, N);
    localparam int I48 = wrap(i - 48, N);

    assign d2[i] = d1[i] & (f2[i] | q2[I5]);

    prefix_op4 u_f3 (
      .g  ({f2[i], f2[I16], f2[I32], f2[I48]}),
      .p  ({1'b1, q2[I21], q2[I37]}),
      .gg (f3[i])
    );

    sum_cell u_sum (.h (h[i]), .d (d2[I1]), .f (f3[I1]), .s (s[i]));
  end
endmodule
