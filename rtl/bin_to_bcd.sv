// bin_to_bcd: converts an IN_W-bit binary number to DIGITS BCD digits
// (default 14 bits to 4 digits, enough for the product 99*99 = 9801).
//
// How it works: the shift-and-add-3 ("double dabble") method unrolled into
// combinational logic. The input bits enter from the most significant end one
// at a time; before each shift every BCD digit that is 5 or more gets 3 added,
// so that the shift (a doubling) carries it correctly into the next digit.
// After IN_W steps the BCD register holds the decimal value.
//
// Interface: bin (IN_W bits); bcd (4*DIGITS bits). Values of 10**DIGITS or
// more are reported modulo 10**DIGITS. Timing: purely combinational.
//
// That the binary product is converted back to BCD follows the original description; the
// double-dabble structure is this design's own choice.
module bin_to_bcd #(
  parameter int unsigned IN_W   = 14,
  parameter int unsigned DIGITS = 4
) (
  input  logic [IN_W-1:0]     bin,
  output logic [4*DIGITS-1:0] bcd
);
  always_comb begin
    logic [4*DIGITS-1:0] r;
    r = '0;
    for (int i = IN_W - 1; i >= 0; i--) begin
      for (int d = 0; d < int'(DIGITS); d++) begin
        if (r[4*d +: 4] >= 4'd5) r[4*d +: 4] = r[4*d +: 4] + 4'd3;
      end
      r = {r[4*DIGITS-2:0], bin[i]};
    end
    bcd = r;
  end
endmodule
