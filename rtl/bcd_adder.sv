// bcd_adder: DIGITS-digit BCD adder built from full/half adder cells
// (default 2 digits, the 8-bit BCD adder).
//
// How it works. The two BCD words are first added as plain binary numbers in
// one ripple-carry chain: a half adder on bit 0, full adders above it, no
// carry input. The carry out of bit 4i+3 of that chain (h[i]) has already
// been passed on to digit i+1. Each 4-bit slice s of the binary sum is then
// corrected to a decimal digit in a second row of cells:
//   - decimal carry  K = h | s3&s2 | s3&s1 | (ci & s3&s0)
//     (binary nibble carry, slice 10..15, or slice 9 plus an incoming
//     correction carry ci),
//   - the slice gets ci + (K ? 6 : 0) added, modulo 16,
//   - the carry out of that correction slice is the ci of the next digit
//     (it is 1 exactly when K = 1 and h = 0, i.e. when the decimal carry has
//     not already travelled up the binary chain).
// Digit 0 has no ci, so its correction row is: bit 0 passed through, half
// adder, full adder, half adder. Higher digits use half, full, full, half.
// cout is K of the top digit.
//
// Interface: a, b: BCD inputs (4*DIGITS bits, each nibble 0..9);
// sum: BCD sum; cout: hundreds (10**DIGITS) carry. Inputs with nibbles above 9
// are outside the adder's range and give no meaningful result.
// Timing: purely combinational, no clock.
//
// The two-row structure (binary FA/HA chain, per-digit carry detection,
// correction row of HA/FA cells, bit 0 bypassing the correction) follows the
// original adder design. The exact carry-detect equation of the upper
// digit and its correction cells (HA FA FA HA) are this design's choice,
// made so that the adder is correct for every pair of BCD inputs.
module bcd_adder #(
  parameter int unsigned DIGITS = 2
) (
  input  logic [4*DIGITS-1:0] a,
  input  logic [4*DIGITS-1:0] b,
  output logic [4*DIGITS-1:0] sum,
  output logic                cout
);
  localparam int unsigned N = 4 * DIGITS;

  // ---- row 1: binary ripple-carry adder ----
  logic [N-1:0] s;       // binary sum
  logic [N-1:0] c;       // carry out of each bit
  half_adder u_ha0 (.a(a[0]), .b(b[0]), .s(s[0]), .c(c[0]));
  for (genvar i = 1; i < N; i++) begin : g_bin
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i-1]), .s(s[i]), .co(c[i]));
  end

  // ---- row 2: per-digit decimal correction ----
  logic [DIGITS:0]   ci;   // correction carry into each digit
  logic [DIGITS-1:0] k;    // decimal carry out of each digit
  assign ci[0] = 1'b0;

  for (genvar d = 0; d < DIGITS; d++) begin : g_dig
    logic [3:0] sl;        // binary slice of this digit
    logic       h;         // binary nibble carry already sent upward
    logic [2:0] cc;        // carries inside the correction slice
    assign sl = s[4*d +: 4];
    assign h  = c[4*d+3];

    if (d == 0) begin : g_low
      assign k[d] = h | (sl[3] & sl[2]) | (sl[3] & sl[1]);
      assign sum[0] = sl[0];
      assign cc[0]  = 1'b0;
      half_adder u_c1 (.a(sl[1]), .b(k[d]),         .s(sum[1]), .c(cc[1]));
      full_adder u_c2 (.a(sl[2]), .b(k[d]), .ci(cc[1]), .s(sum[2]), .co(cc[2]));
      half_adder u_c3 (.a(sl[3]), .b(cc[2]),        .s(sum[3]), .c(ci[1]));
    end else begin : g_high
      assign k[d] = h | (sl[3] & sl[2]) | (sl[3] & sl[1]) | (ci[d] & sl[3] & sl[0]);
      half_adder u_c0 (.a(sl[0]), .b(ci[d]),                .s(sum[4*d]),   .c(cc[0]));
      full_adder u_c1 (.a(sl[1]), .b(k[d]), .ci(cc[0]),     .s(sum[4*d+1]), .co(cc[1]));
      full_adder u_c2 (.a(sl[2]), .b(k[d]), .ci(cc[1]),     .s(sum[4*d+2]), .co(cc[2]));
      half_adder u_c3 (.a(sl[3]), .b(cc[2]),                .s(sum[4*d+3]), .c(ci[d+1]));
    end
  end

  assign cout = k[DIGITS-1];
endmodule
