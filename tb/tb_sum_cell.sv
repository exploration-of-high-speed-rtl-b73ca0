// tb_sum_cell: exhaustive test of the summation cell.
// With the carry c = d & f, the sum bit must be h xor c for all 8 inputs.
module tb_sum_cell;
  logic h, d, f, s;
  int checks = 0, failures = 0;

  sum_cell dut (.h, .d, .f, .s);

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {h, d, f} = 3'(v);
      #1;
      checks++;
      if (s !== (h ^ (d & f))) begin
        failures++;
        $display("FAIL h=%b d=%b f=%b s=%b", h, d, f, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
