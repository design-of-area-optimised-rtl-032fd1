// vc_mult: unsigned W x W binary multiplier by the vertical-and-crosswise
// method with one divide-and-conquer step. Default W = 8, enough for two
// binary-converted BCD digits (0..99).
//
// How it works. Each operand is split into a low and a high half of H = W/2
// bits. Four half-width products come from urdhva_mult instances:
//   vertical  (step 1): ll = aL*bL
//   crosswise (step 2): x  = aL*bH + aH*bL
//   vertical  (step 3): hh = aH*bH
// and the result is assembled column by column, each column taking the carry
// of the one below (step 4):
//   p[H-1:0]   = ll[H-1:0]
//   t          = x + ll[W-1:H];   p[W-1:H] = t[H-1:0]
//   p[2W-1:W]  = hh + t[W:H]
// W must be even and at least 2.
//
// Interface: a, b (W bits), p (2W bits). Timing: purely combinational.
//
// The three products, the cross-term sum and the column-wise carry follow
// the described method; the adder widths are this design's own choice.
module vc_mult #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  localparam int unsigned H = W / 2;

  initial begin
    assert (W >= 2 && W % 2 == 0)
      else $error("vc_mult: W=%0d must be even and >= 2", W);
  end

  logic [W-1:0] ll, lh, hl, hh;   // half-width partial products
  logic [W:0]   t;                // middle column with its carry

  urdhva_mult #(.N(H)) u_ll (.a(a[H-1:0]), .b(b[H-1:0]), .p(ll));
  urdhva_mult #(.N(H)) u_lh (.a(a[H-1:0]), .b(b[W-1:H]), .p(lh));
  urdhva_mult #(.N(H)) u_hl (.a(a[W-1:H]), .b(b[H-1:0]), .p(hl));
  urdhva_mult #(.N(H)) u_hh (.a(a[W-1:H]), .b(b[W-1:H]), .p(hh));

  assign p[H-1:0]   = ll[H-1:0];
  assign t          = (W+1)'(lh) + (W+1)'(hl) + (W+1)'(ll[W-1:H]);
  assign p[W-1:H]   = t[H-1:0];
  assign p[2*W-1:W] = hh + W'(t[W:H]);
endmodule
