// tb_pre_ling3_cell: exhaustive test of the 3-term preprocessing cell.
// All 64 combinations of three operand bit pairs are applied. The expected
// R, Q and D are computed from their definitions in terms of carries:
// D_i is 1 exactly when the 3-bit slice i..i-2 either generates a carry by
// itself or would pass on an incoming one (p_i p_{i-1} p_{i-2}), i.e. the
// carry out of the slice with a carry-in of 1 OR-ed with the all-propagate
// case. Here it is worked out by adding the slices as integers.
module tb_pre_ling3_cell;
  logic [2:0] a, b;
  logic h, r, q, d;
  int checks = 0, failures = 0;

  pre_ling3_cell dut (.a, .b, .h, .r, .q, .d);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      logic e_h, e_r, e_q, e_d;
      logic [2:0] sum_hi;   // bits i, i-1 added with carry-in 1
      {a, b} = 6'(v);
      #1;
      e_h = a[2] ^ b[2];
      // g_i or g_{i-1}: either upper pair has both bits set
      e_r = (a[2] & b[2]) | (a[1] & b[1]);
      // p_i p_{i-1}: neither upper pair is 0/0
      e_q = (a[2] | b[2]) & (a[1] | b[1]);
      // D_i = carry out of bits i..i-1 when bit i-2 supplies a carry,
      // where bit i-2 "supplies" one whenever it is not a kill (p_{i-2}).
      sum_hi = 3'(a[2:1]) + 3'(b[2:1]) + 3'(a[0] | b[0]);
      e_d = sum_hi[2];
      checks++;
      if ({h, r, q, d} !== {e_h, e_r, e_q, e_d}) begin
        failures++;
        $display("FAIL a=%b b=%b got hrqd=%b%b%b%b exp %b%b%b%b",
                 a, b, h, r, q, d, e_h, e_r, e_q, e_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
