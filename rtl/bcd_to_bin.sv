// bcd_to_bin: converts a DIGITS-digit BCD number to binary
// (default 2 digits: 8-bit BCD in, 7-bit binary out, 0..99).
//
// How it works: Horner's rule from the most significant digit down,
// value = value*10 + digit, where the multiplication by ten is done as
// (value << 3) + (value << 1), so the converter is a chain of adders with no
// multiplier. For two digits this reduces to tens*8 + tens*2 + ones.
//
// Interface: bcd (4*DIGITS bits, nibbles 0..9), bin (bin_width(DIGITS) bits).
// Timing: purely combinational.
//
// The conversion step and its place in front of the multiplier follow the
// design; the shift-and-add structure is this design's own choice.
module bcd_to_bin #(
  parameter int unsigned DIGITS = 2
) (
  input  logic [4*DIGITS-1:0]                bcd,
  output logic [bcd_pkg::bin_width(DIGITS)-1:0] bin
);
  localparam int unsigned BW = bcd_pkg::bin_width(DIGITS);

  // acc[d] holds the value of the top d digits
  logic [BW-1:0] acc [DIGITS+1];
  assign acc[0] = '0;
  for (genvar d = 0; d < DIGITS; d++) begin : g_horner
    logic [3:0] digit;
    assign digit    = bcd[4*(DIGITS-1-d) +: 4];
    assign acc[d+1] = (acc[d] << 3) + (acc[d] << 1) + BW'(digit);
  end
  assign bin = acc[DIGITS];
endmodule
