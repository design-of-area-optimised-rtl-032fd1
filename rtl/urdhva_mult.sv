// urdhva_mult: unsigned N x N binary multiplier, vertical-and-crosswise
// (column) form at bit level. Default N = 4, the half-width products of the
// 8-bit multiplier.
//
// How it works: result column k collects every bit product a[i]&b[j] with
// i + j = k (the "vertical" terms i = j and the "crosswise" pairs), plus the
// carry handed on by column k-1. The low bit of that column sum is p[k]; the
// rest is the carry into column k+1. The last carry is the top product bit.
//
// Interface: a, b (N bits), p (2N bits). Timing: purely combinational.
//
// The column-by-column vertical/crosswise scheme follows the described
// multiplication steps; applying it at single-bit granularity inside each
// half-width product is this design's own choice.
module urdhva_mult #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned CW = 2 * N;   // wide enough for any column sum

  always_comb begin
    logic [CW-1:0] col;
    logic [CW-1:0] carry;
    carry = '0;
    p     = '0;
    for (int k = 0; k < 2 * int'(N) - 1; k++) begin
      col = carry;
      for (int i = 0; i < int'(N); i++) begin
        if (k - i >= 0 && k - i < int'(N)) col = col + CW'(a[i] & b[k-i]);
      end
      p[k]  = col[0];
      carry = col >> 1;
    end
    p[2*N-1] = carry[0];
  end
endmodule
