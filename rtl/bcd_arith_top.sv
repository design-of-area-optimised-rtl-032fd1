// bcd_arith_top: the two BCD arithmetic units of the design, side by side.
//
//   - mul_a * mul_b -> mul_p : the BCD multiplier (BCD-to-binary conversion of
//     both operands, binary vertical-and-crosswise multiplication,
//     binary-to-BCD conversion of the product);
//   - add_a + add_b -> add_sum, add_cout : the cell-level BCD adder with
//     decimal correction.
// The two share no signals; each has its own ports. DIGITS sets the operand
// size of both (default 2 digits = 8-bit BCD operands).
//
// Interface widths: mul_a, mul_b, add_a, add_b, add_sum: 4*DIGITS bits;
// mul_p: 8*DIGITS bits; add_cout: 1 bit. Timing: purely combinational.
//
// Placing the adder beside the multiplier, rather than inside it, is this
// design's own choice: the multiplier's data flow uses no BCD adder.
module bcd_arith_top #(
  parameter int unsigned DIGITS = 2
) (
  input  logic [4*DIGITS-1:0] mul_a,
  input  logic [4*DIGITS-1:0] mul_b,
  output logic [8*DIGITS-1:0] mul_p,
  input  logic [4*DIGITS-1:0] add_a,
  input  logic [4*DIGITS-1:0] add_b,
  output logic [4*DIGITS-1:0] add_sum,
  output logic                add_cout
);
  bcd_mult  #(.DIGITS(DIGITS)) u_mult  (.a(mul_a), .b(mul_b), .p(mul_p));
  bcd_adder #(.DIGITS(DIGITS)) u_adder (.a(add_a), .b(add_b), .sum(add_sum), .cout(add_cout));
endmodule
