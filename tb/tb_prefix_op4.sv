// tb_prefix_op4: exhaustive test of the valency-4 prefix operator.
// All 128 input combinations are applied. The expected group generate is
// found by scanning from the most significant pair down: the result is 1
// if some g_k is 1 and every propagate above it is 1.
module tb_prefix_op4;
  logic [3:0] g;
  logic [3:1] p;
  logic gg;
  int checks = 0, failures = 0;

  prefix_op4 dut (.g, .p, .gg);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      logic exp_gg, live;
      {g, p} = 7'(v);
      #1;
      exp_gg = 1'b0;
      live   = 1'b1;
      for (int k = 3; k >= 0; k--) begin
        if (live && g[k]) exp_gg = 1'b1;
        if (k > 0) live = live & p[k];
      end
      checks++;
      if (gg !== exp_gg) begin
        failures++;
        $display("FAIL g=%b p=%b gg=%b exp %b", g, p, gg, exp_gg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
