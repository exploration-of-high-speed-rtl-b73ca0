// tb_pre_hpg_cell: exhaustive test of the h/p/g preprocessing cell.
// All four input pairs are applied; h, p and g are compared with the sum
// and carry of a 1-bit addition (h = sum, g = carry, p = a or b).
module tb_pre_hpg_cell;
  logic a, b, h, p, g;
  int checks = 0, failures = 0;

  pre_hpg_cell dut (.a, .b, .h, .p, .g);

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      logic [1:0] sum;
      {a, b} = 2'(v);
      #1;
      sum = 2'(a) + 2'(b);
      checks++;
      if (h !== sum[0] || g !== sum[1] || p !== (sum != 0)) begin
        failures++;
        $display("FAIL a=%b b=%b h=%b p=%b g=%b", a, b, h, p, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
