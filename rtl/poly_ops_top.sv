// poly_ops_top: the two generated polynomial operators side by side.
//
//   * exp2: 2^x on [0,1] to 12 bits, degree-3 Horner evaluation with one
//     shared multiply-add, coefficients on n = 15 bits, datapath n' = 16
//     fractional bits, one result every 3 cycles (horner_eval).
//   * sqrt: sqrt(1+x) on [0,1] to 8 bits, the post-optimised degree-2
//     operator with a single squarer and shift-and-add terms, n' = 13,
//     one result per cycle (sqrt_op).
//
// The two operators share only clock and reset; each keeps its own ports.
// See horner_eval and sqrt_op for formats and timing.
module poly_ops_top (
  input  logic                                   clk,
  input  logic                                   rst,
  // 2^x operator
  input  logic                                   exp2_start,
  input  logic        [poly_pkg::EXP2_XW-1:0]    exp2_x,
  output logic                                   exp2_busy,
  output logic                                   exp2_done,
  output logic signed [poly_pkg::EXP2_AW-1:0]    exp2_y,
  // sqrt(1+x) operator
  input  logic                                   sqrt_in_valid,
  input  logic        [poly_pkg::SQRT_XW-1:0]    sqrt_x,
  output logic                                   sqrt_out_valid,
  output logic        [poly_pkg::SQRT_YW-1:0]    sqrt_y
);

  horner_eval u_exp2 (
    .clk, .rst,
    .start(exp2_start), .x(exp2_x),
    .busy(exp2_busy), .done(exp2_done), .y(exp2_y)
  );

  sqrt_op u_sqrt (
    .clk, .rst,
    .in_valid(sqrt_in_valid), .x(sqrt_x),
    .out_valid(sqrt_out_valid), .y(sqrt_y)
  );

endmodule
