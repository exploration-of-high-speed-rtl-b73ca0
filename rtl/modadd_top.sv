// modadd_top: the four fastest modulo 2^n-1 adders, n = 8, 16, 32 and 64,
// each between an input and an output register.
//
// The adders are independent designs of one family; they share no signal
// and stand side by side, each with its own operand and sum ports.
// Following the evaluation set-up, every adder input is driven by a
// flip-flop and every sum bit drives one, so the register-to-register path
// is exactly one adder.
// Timing: operands sampled on one rising edge of clk appear on s8..s64
// after the next rising edge (latency 2 edges, one result per cycle).
// The registers have no reset: they only pipeline data, and a valid result
// follows two edges after valid operands.
module modadd_top (
  input  logic        clk,
  input  logic [7:0]  a8,
  input  logic [7:0]  b8,
  output logic [7:0]  s8,
  input  logic [15:0] a16,
  input  logic [15:0] b16,
  output logic [15:0] s16,
  input  logic [31:0] a32,
  input  logic [31:0] b32,
  output logic [31:0] s32,
  input  logic [63:0] a64,
  input  logic [63:0] b64,
  output logic [63:0] s64
);
  logic [7:0]  a8_q,  b8_q,  s8_d;
  logic [15:0] a16_q, b16_q, s16_d;
  logic [31:0] a32_q, b32_q, s32_d;
  logic [63:0] a64_q, b64_q, s64_d;

  always_ff @(posedge clk) begin
    a8_q  <= a8;   b8_q  <= b8;
    a16_q <= a16;  b16_q <= b16;
    a32_q <= a32;  b32_q <= b32;
    a64_q <= a64;  b64_q <= b64;
  end

  modadd8  u_add8  (.a (a8_q),  .b (b8_q),  .s (s8_d));
  modadd16 u_add16 (.a (a16_q), .b (b16_q), .s (s16_d));
  modadd32 u_add32 (.a (a32_q), .b (b32_q), .s (s32_d));
  modadd64 u_add64 (.a (a64_q), .b (b64_q), .s (s64_d));

  always_ff @(posedge clk) begin
    s8  <= s8_d;
    s16 <= s16_d;
    s32 <= s32_d;
    s64 <= s64_d;
  end
endmodule
