// bcd_mult: DIGITS x DIGITS BCD multiplier (default 2 digits, the 8-bit BCD
// multiplier).
//
// How it works, in three stages:
//   1. each BCD operand goes through its own BCD-to-binary converter
//      (bcd_to_bin), giving bin_width(DIGITS) bits (7 bits for 0..99);
//   2. the two binary values, zero-extended to the power-of-two width
//      mult_width(DIGITS) (8 bits), are multiplied by the
//      vertical-and-crosswise multiplier (vc_mult);
//   3. the low 2*bin_width(DIGITS) bits of the product (14 bits, up to 9801)
//      are converted back to 2*DIGITS BCD digits (bin_to_bcd).
//
// Interface: a, b: BCD operands (4*DIGITS bits, nibbles 0..9);
// p: BCD product (8*DIGITS bits). Timing: purely combinational.
//
// The three-stage flow (two converters in, binary vertical-crosswise
// multiplication, one converter out) follows the original description; the widths between
// stages are this design's own choice.
module bcd_mult #(
  parameter int unsigned DIGITS = 2
) (
  input  logic [4*DIGITS-1:0] a,
  input  logic [4*DIGITS-1:0] b,
  output logic [8*DIGITS-1:0] p
);
  localparam int unsigned BW = bcd_pkg::bin_width(DIGITS);
  localparam int unsigned MW = bcd_pkg::mult_width(DIGITS);

  logic [BW-1:0]   a_bin, b_bin;
  logic [2*MW-1:0] p_bin;
  logic [2*BW-1:0] p_used;

  bcd_to_bin #(.DIGITS(DIGITS)) u_a2b (.bcd(a), .bin(a_bin));
  bcd_to_bin #(.DIGITS(DIGITS)) u_b2b (.bcd(b), .bin(b_bin));

  vc_mult #(.W(MW)) u_mul (.a(MW'(a_bin)), .b(MW'(b_bin)), .p(p_bin));

  // The product of two BW-bit values fits in 2*BW bits; the upper bits of the
  // power-of-two multiplier are always zero here.
  assign p_used = p_bin[2*BW-1:0];

  bin_to_bcd #(.IN_W(2*BW), .DIGITS(2*DIGITS)) u_b2d (.bin(p_used), .bcd(p));
endmodule
