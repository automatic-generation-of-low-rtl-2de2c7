// sqrt_op: post-optimised operator for sqrt(1+x), x in [0,1], 8 correct bits.
//
// The degree-2 approximation has recoded coefficients,
//   p(x) = 1 + (2^-1 - 2^-6) x - (2^-4 + 2^-7) x^2,
// so the only multiplier left is the squarer for x^2. p1*x becomes a
// difference of two right shifts of x (p1 written in borrow-save form as
// 0.10000(-1)), and p2*x^2 a sum of two right shifts of x^2 that is then
// subtracted. Every intermediate value is truncated to NP = 13 fractional
// bits (n' = 13), which keeps the total error below 2^-8.
//
// The argument is unsigned with one integer bit and XF fractional bits
// (x = 1.0 is representable). The result y is unsigned with one integer bit
// and NP fractional bits; it lies in [1, 1.415], so the two extra integer
// bits of the internal sum are always zero and are not output.
//
// Timing: one cycle. The shift-and-add network is combinational and the
// result is registered: y and out_valid appear the cycle after in_valid.
// Synchronous active-high reset clears out_valid and y. The argument and
// result widths, truncation, and the output register are this design's
// choices; the coefficients and n' are the method's results.
module sqrt_op #(
  parameter int unsigned XW = poly_pkg::SQRT_XW,
  parameter int unsigned XF = poly_pkg::SQRT_XF,
  parameter int unsigned NP = poly_pkg::SQRT_NP,
  parameter int unsigned YW = poly_pkg::SQRT_YW
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  logic [XW-1:0] x,
  output logic          out_valid,
  output logic [YW-1:0] y
);

  // internal width: 2 integer bits (values up to 1.5 plus margin) + NP
  localparam int unsigned IW = NP + 3;

  logic [2*XW-1:0] sq_full;   // x^2 with 2*XF fractional bits
  logic [IW-1:0]   xa;        // x aligned to NP fractional bits
  logic [IW-1:0]   sq;        // x^2 truncated to NP fractional bits
  logic [IW-1:0]   lin;       // x/2 - x/64
  logic [IW-1:0]   quad;      // x^2/16 + x^2/128
  logic [IW-1:0]   sum;

  always_comb begin
    sq_full = x * x;
    if (XF >= NP) xa = IW'(x >> (XF - NP));
    else          xa = IW'(x) << (NP - XF);
    if (2 * XF >= NP) sq = IW'(sq_full >> (2 * XF - NP));
    else              sq = IW'(sq_full) << (NP - 2 * XF);
    lin  = (xa >> 1) - (xa >> 6);
    quad = (sq >> 4) + (sq >> 7);
    sum  = (IW'(1) << NP) + lin - quad;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= YW'(sum);
    end
  end

endmodule
