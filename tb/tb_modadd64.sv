// tb_modadd64: self-checking test of the modulo 2^64-1 adder.
//
// Reference: the end-around-carry sum, (a+b) mod 2^64 plus the carry out,
// computed on a 65-bit integer sum. Vectors:
//   - corner cases: 0+0, all-ones+0, all-ones+all-ones, all-ones+1;
//   - for every bit k, a single generate at k with every other bit
//     propagating (a = 2^k, b = all ones), so the carry travels the whole
//     ring from bit k back round to bit k-1;
//   - a + ~a with a few bits flipped (long propagate runs broken by a
//     handful of generates or kills);
//   - uniformly random pairs.
// Counts end-around carries and all-ones results; either never happening
// is a failure.
module tb_modadd64;
  localparam int N = 64;
  localparam int NRAND = 20000;

  logic [N-1:0] a, b, s;
  int checks = 0, failures = 0;
  int n_wrap = 0, n_ones = 0, n_ring = 0;

  modadd64 dut (.a, .b, .s);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rnd();
    logic [63:0] w;
    w = {$urandom(), $urandom()};
    return w[N-1:0];
  endfunction

  task automatic apply(input logic [N-1:0] va, input logic [N-1:0] vb);
    logic [N:0]   full;
    logic [N-1:0] exp_s;
    a = va;
    b = vb;
    #1;
    full  = {1'b0, va} + {1'b0, vb};
    exp_s = full[N-1:0] + N'(full[N]);
    if (full[N]) n_wrap++;
    if (exp_s == '1) n_ones++;
    checks++;
    if (s !== exp_s) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h s=%h exp %h", va, vb, s, exp_s);
    end
  endtask

  initial begin
    apply('0, '0);
    apply('1, '0);
    apply('0, '1);
    apply('1, '1);
    apply('1, N'(1));
    for (int k = 0; k < N; k++) begin
      apply(N'(1) << k, '1);
      apply('1, N'(1) << k);
      n_ring++;
    end
    for (int t = 0; t < NRAND; t++) begin
      logic [N-1:0] x, y;
      x = rnd();
      y = ~x;
      for (int f = 0; f < int'($urandom_range(0, 3)); f++)
        y[$urandom_range(0, N-1)] ^= 1'b1;
      apply(x, y);
      apply(rnd(), rnd());
    end
    if (n_wrap == 0) begin failures++; $display("no end-around carry seen"); end
    if (n_ones == 0) begin failures++; $display("no all-ones result seen"); end
    $display("end-around carries=%0d all-ones results=%0d full-ring carries=%0d",
             n_wrap, n_ones, 2 * n_ring);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
