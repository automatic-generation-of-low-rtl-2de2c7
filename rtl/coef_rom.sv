// coef_rom: read-only store for the d+1 polynomial coefficients.
//
// Each word is a coefficient in its stored format: CW bits (the method's
// coefficient size n), two's complement. Storing n rather than n' bits is what
// the guard bits save: the alignment to the wider datapath happens in the
// multiply-add. Word i holds p_i, the coefficient of x^i; the default contents
// are the coefficients of the 2^x operator.
//
// Two asynchronous read ports, so one Horner step can fetch both the leading
// coefficient and the coefficient to be added in its first cycle. Addresses
// beyond DEGREE read as zero.
module coef_rom #(
  parameter int unsigned DEGREE = poly_pkg::EXP2_DEGREE,
  parameter int unsigned CW     = poly_pkg::EXP2_CW,
  parameter int unsigned AB     = $clog2(DEGREE + 1),
  parameter logic signed [CW-1:0] COEF [DEGREE+1] = poly_pkg::EXP2_COEF
) (
  input  logic        [AB-1:0] raddr_a,
  output logic signed [CW-1:0] rdata_a,
  input  logic        [AB-1:0] raddr_b,
  output logic signed [CW-1:0] rdata_b
);

  always_comb begin
    rdata_a = '0;
    rdata_b = '0;
    for (int i = 0; i <= int'(DEGREE); i++) begin
      if (int'(raddr_a) == i) rdata_a = COEF[i];
      if (int'(raddr_b) == i) rdata_b = COEF[i];
    end
  end

endmodule
