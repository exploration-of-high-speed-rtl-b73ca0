// tb_modadd8: exhaustive test of the modulo 255 adder.
// All 65536 operand pairs are applied. The reference is the end-around
// carry sum: the 9-bit integer sum folded once, (a+b) mod 256 + carry out,
// which yields 0xFF (the second zero) for 0xFF + 0x00 and its permutations.
// Counts how many pairs produced an end-around carry and how many gave the
// all-ones result, and fails if either never happened.
module tb_modadd8;
  logic [7:0] a, b, s;
  int checks = 0, failures = 0;
  int n_wrap = 0, n_ones = 0;

  modadd8 dut (.a, .b, .s);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      logic [8:0] full;
      logic [7:0] exp_s;
      {a, b} = 16'(v);
      #1;
      full  = 9'(a) + 9'(b);
      exp_s = full[7:0] + 8'(full[8]);
      if (full[8]) n_wrap++;
      if (exp_s == 8'hFF) n_ones++;
      checks++;
      if (s !== exp_s) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h s=%h exp %h", a, b, s, exp_s);
      end
    end
    if (n_wrap == 0) begin failures++; $display("no end-around carry seen"); end
    if (n_ones == 0) begin failures++; $display("no all-ones result seen"); end
    $display("end-around carries=%0d all-ones results=%0d", n_wrap, n_ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
