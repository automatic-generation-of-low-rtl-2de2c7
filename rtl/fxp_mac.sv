// fxp_mac: one Horner step, acc * x + c, in fixed point.
//
// The running value acc is two's complement with NP fractional bits, the
// argument x is unsigned with XF fractional bits, and the coefficient c is two's
// complement with CF fractional bits (CF <= NP). The full product is truncated
// (rounded toward minus infinity) back to NP fractional bits, the coefficient
// is sign-extended and shifted left by the NP-CF guard bits, and the two are
// added. The result keeps AW bits; the caller sizes AW so the value range of
// its polynomial cannot overflow, which is why the upper bits of the
// truncated product are dropped unused.
//
// Purely combinational. Truncation as the rounding of each intermediate result
// is this design's choice; the method only requires that the rounding be the
// one whose error was bounded when n' was chosen.
module fxp_mac #(
  parameter int unsigned AW = poly_pkg::EXP2_AW,  // accumulator width
  parameter int unsigned NP = poly_pkg::EXP2_NP,  // accumulator fractional bits (n')
  parameter int unsigned XW = poly_pkg::EXP2_XW,  // argument width
  parameter int unsigned XF = poly_pkg::EXP2_XF,  // argument fractional bits
  parameter int unsigned CW = poly_pkg::EXP2_CW,  // coefficient width (n)
  parameter int unsigned CF = poly_pkg::EXP2_CF   // coefficient fractional bits
) (
  input  logic signed [AW-1:0] acc,
  input  logic        [XW-1:0] x,
  input  logic signed [CW-1:0] c,
  output logic signed [AW-1:0] y
);

  localparam int unsigned PW = AW + XW + 1;

  logic signed [PW-1:0] prod;
  logic signed [PW-1:0] prod_t;
  logic signed [AW-1:0] c_al;

  always_comb begin
    prod   = PW'(acc) * $signed({1'b0, x});
    prod_t = prod >>> XF;
    c_al   = AW'(c) <<< (NP - CF);
    y      = AW'(prod_t) + c_al;
  end

endmodule
