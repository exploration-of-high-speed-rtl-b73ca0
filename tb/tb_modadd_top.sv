// tb_modadd_top: end-to-end test of the registered four-adder top.
//
// Every clock cycle a new operand pair is applied to each of the four
// adders (n = 8, 16, 32, 64). Operands set up before rising edge k are
// captured by the input registers at edge k and their sum must be on the
// outputs right after edge k+1, which checks the latency of two edges and
// the rate of one result per cycle as well as the values. Stimulus mixes corner cases,
// full-ring carries (a = 2^k, b = all ones), near-complement pairs and
// random pairs. Per adder it counts end-around carries, all-ones results
// (second zero) and full-ring carries; any of them never happening is a
// failure. The top is used with its defaults.
module tb_modadd_top;
  localparam int NCYC = 6000;

  logic        clk;
  logic [7:0]  a8,  b8,  s8;
  logic [15:0] a16, b16, s16;
  logic [31:0] a32, b32, s32;
  logic [63:0] a64, b64, s64;

  int checks = 0, failures = 0;
  int n_wrap [4];
  int n_ones [4];
  int n_ring [4];

  // expected results of the operands captured at the previous edge
  logic [63:0] exp_q [4];
  logic        vld_q;
  int          widths [4];

  modadd_top dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] fold(input int n, input logic [63:0] x,
                                       input logic [63:0] y, output logic wrap);
    logic [64:0]  full;
    logic [63:0]  mask, r;
    mask = (n == 64) ? '1 : ((64'd1 << n) - 1);
    full = {1'b0, x & mask} + {1'b0, y & mask};
    wrap = (n == 64) ? full[64] : full[n];
    r    = (full[63:0] & mask) + 64'(wrap);
    return r & mask;
  endfunction

  // operand pair for adder of width n in cycle t
  task automatic pick(input int n, input int t, output logic [63:0] x, output logic [63:0] y,
                      output logic ring);
    logic [63:0] mask;
    int mode;
    mask = (n == 64) ? '1 : ((64'd1 << n) - 1);
    ring = 1'b0;
    mode = t % 4;
    if (t < 4) begin
      x = (t[0]) ? mask : '0;
      y = (t[1]) ? mask : '0;
    end else if (mode == 0) begin
      x = 64'd1 << (t / 4 % n);
      y = mask;
      ring = 1'b1;
    end else if (mode == 1) begin
      x = {$urandom(), $urandom()};
      y = ~x;
      y = y ^ (64'd1 << $urandom_range(0, n-1));
    end else begin
      x = {$urandom(), $urandom()};
      y = {$urandom(), $urandom()};
    end
    x &= mask;
    y &= mask;
  endtask

  initial begin
    widths = '{8, 16, 32, 64};
    vld_q  = 1'b0;
    for (int k = 0; k < 4; k++) begin
      n_wrap[k] = 0; n_ones[k] = 0; n_ring[k] = 0;
    end
    for (int t = 0; t < NCYC + 1; t++) begin
      logic [63:0] x [4];
      logic [63:0] y [4];
      logic [63:0] e [4];
      // apply new operands away from the clock edge
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        logic w, ring;
        pick(widths[k], t, x[k], y[k], ring);
        e[k] = fold(widths[k], x[k], y[k], w);
        if (t < NCYC) begin
          if (w) n_wrap[k]++;
          if (e[k] == ((widths[k] == 64) ? '1 : ((64'd1 << widths[k]) - 1))) n_ones[k]++;
          if (ring) n_ring[k]++;
        end
      end
      a8  = x[0][7:0];  b8  = y[0][7:0];
      a16 = x[1][15:0]; b16 = y[1][15:0];
      a32 = x[2][31:0]; b32 = y[2][31:0];
      a64 = x[3];       b64 = y[3];
      @(posedge clk);   // operands sampled here
      #1;
      // the outputs now hold the sums of the operands captured one edge earlier
      if (vld_q) begin
        checks++;
        if ({s8, s16, s32, s64} !== {exp_q[0][7:0], exp_q[1][15:0],
                                      exp_q[2][31:0], exp_q[3]}) begin
          failures++;
          if (failures < 10)
            $display("FAIL cycle %0d: s8=%h/%h s16=%h/%h s32=%h/%h s64=%h/%h", t,
                     s8, exp_q[0][7:0], s16, exp_q[1][15:0],
                     s32, exp_q[2][31:0], s64, exp_q[3]);
        end
      end
      for (int k = 0; k < 4; k++) exp_q[k] = e[k];
      vld_q = (t < NCYC);
    end
    for (int k = 0; k < 4; k++) begin
      $display("n=%0d: end-around carries=%0d all-ones results=%0d full-ring carries=%0d",
               widths[k], n_wrap[k], n_ones[k], n_ring[k]);
      if (n_wrap[k] == 0 || n_ones[k] == 0 || n_ring[k] == 0) begin
        failures++;
        $display("n=%0d: a mechanism was never exercised", widths[k]);
      end
    end
    if (checks != NCYC) begin
      failures++;
      $display("expected %0d results at one per cycle, checked %0d", NCYC, checks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
