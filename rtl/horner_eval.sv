// horner_eval: fixed-point polynomial operator using the Horner scheme
//   p(x) = p0 + x*(p1 + x*(p2 + ... + x*p_d)).
//
// One multiply-add (fxp_mac) is shared by all d steps, so the operator takes
// d clock cycles per result. The coefficients come from a small ROM
// (coef_rom) holding n-bit words; the running value is kept at n' fractional
// bits, the n' - n guard bits being supplied at alignment time. A controller
// (horner_ctrl) issues the steps.
//
// With the default parameters this is the 2^x operator on [0,1]: degree 3,
// coefficients 8191/8192, 2853/4096, 1837/8192, 649/8192 with 14 fractional
// bits, n' = 16 fractional bits in the datapath, result in 3 cycles with an
// error below 2^-12. The argument is unsigned with one integer bit so that
// x = 1.0 is representable; the result has 2 integer bits including the sign.
// These two widths, truncation as the rounding, and the start/done handshake
// are this design's own choices.
//
// Timing: raise 'start' for one cycle with 'x' valid while 'busy' is low.
// 'done' pulses DEGREE cycles later, with 'y' valid from then until the next
// accepted start.
module horner_eval #(
  parameter int unsigned DEGREE = poly_pkg::EXP2_DEGREE,
  parameter int unsigned CW     = poly_pkg::EXP2_CW,
  parameter int unsigned CF     = poly_pkg::EXP2_CF,
  parameter int unsigned NP     = poly_pkg::EXP2_NP,
  parameter int unsigned AW     = poly_pkg::EXP2_AW,
  parameter int unsigned XW     = poly_pkg::EXP2_XW,
  parameter int unsigned XF     = poly_pkg::EXP2_XF,
  parameter logic signed [CW-1:0] COEF [DEGREE+1] = poly_pkg::EXP2_COEF
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic        [XW-1:0] x,
  output logic                 busy,
  output logic                 done,
  output logic signed [AW-1:0] y
);

  localparam int unsigned AB = $clog2(DEGREE + 1);

  logic                 first, acc_en, x_load;
  logic        [AB-1:0] add_idx;
  logic        [XW-1:0] x_q;
  logic signed [AW-1:0] acc_q, acc_d;
  logic signed [CW-1:0] c_lead, c_add;
  logic signed [AW-1:0] mac_a;
  logic        [XW-1:0] mac_x;

  horner_ctrl #(.DEGREE(DEGREE), .AB(AB)) u_ctrl (
    .clk, .rst, .start, .busy, .first, .acc_en, .x_load, .add_idx, .done
  );

  coef_rom #(.DEGREE(DEGREE), .CW(CW), .AB(AB), .COEF(COEF)) u_rom (
    .raddr_a(AB'(DEGREE)), .rdata_a(c_lead),
    .raddr_b(add_idx),     .rdata_b(c_add)
  );

  // Step 0 multiplies the leading coefficient (aligned to n') by the incoming
  // argument; later steps multiply the running value by the stored argument.
  always_comb begin
    mac_a = first ? (AW'(c_lead) <<< (NP - CF)) : acc_q;
    mac_x = first ? x : x_q;
  end

  fxp_mac #(.AW(AW), .NP(NP), .XW(XW), .XF(XF), .CW(CW), .CF(CF)) u_mac (
    .acc(mac_a), .x(mac_x), .c(c_add), .y(acc_d)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      x_q   <= '0;
      acc_q <= '0;
    end else begin
      if (x_load) x_q   <= x;
      if (acc_en) acc_q <= acc_d;
    end
  end

  assign y = acc_q;

endmodule
