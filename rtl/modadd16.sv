// modadd16: modulo 2^16-1 adder, organization M^(-),(1),(-) with two
// valency-4 prefix levels.
//
// s = |a + b| mod (2^16-1) with an end-around carry; all ones is the second
// zero.
//
// How it works. Preprocessing is plain h/p/g (no factorization). Prefix
// level 1 forms 4-bit Ling group carries and factors one term out:
//   F1_i = g_i + g_{i-1} + p_{i-1} g_{i-2} + p_{i-1} p_{i-2} g_{i-3}
//   Q1_i = p_i p_{i-1} p_{i-2} p_{i-3}
//   D1_i = p_i (F1_i + Q1_{i-1})                          (D tree)
// so that c_i = D1_i F2_i with the simplified level-2 operator
//   F2_i = F1_i + F1_{i-4} + Q1_{i-5} F1_{i-8} + Q1_{i-5} Q1_{i-9} F1_{i-12}.
// D1 is ready one level before F2, early enough for the XOR of the
// summation cell: s_i = F2_{i-1} ? h_i ^ D1_{i-1} : h_i.
// All indices wrap modulo 16. Organization, F1, Q1 and F2 are the
// document's. D1 is derived here as p_i (F1_i + Q1_{i-1}), the same
// pattern as the document's level-1 factor D1_i = D_i (F1_i + Q1_{i-3});
// it makes the sum exact.
// Interface: a, b, s, all 16 bits. Purely combinational.
module modadd16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [15:0] s
);
  import modadd_pkg::wrap;
  localparam int N = 16;

  logic [N-1:0] h, p, g;
  logic [N-1:0] f1, q1, d1;
  logic [N-1:0] f2;

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
  end

  for (genvar i = 0; i < N; i++) begin : g_l2
    localparam int I1  = wrap(i - 1, N);
    localparam int I4  = wrap(i - 4, N);
    localparam int I5  = wrap(i - 5, N);
    localparam int I8  = wrap(i - 8, N);
    localparam int I9  = wrap(i - 9, N);
    localparam int I12 = wrap(i - 12, N);

    assign d1[i] = p[i] & (f1[i] | q1[I1]);

    prefix_op4 u_f2 (
      .g  ({f1[i], f1[I4], f1[I8], f1[I12]}),
      .p  ({1'b1, q1[I5], q1[I9]}),
      .gg (f2[i])
    );

    sum_cell u_sum (.h (h[i]), .d (d1[I1]), .f (f2[I1]), .s (s[i]));
  end
endmodule
