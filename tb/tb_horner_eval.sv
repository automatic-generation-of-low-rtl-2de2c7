// tb_horner_eval: exhaustive check of the 2^x operator over every argument
// x = k / 2^16, k = 0 .. 65536 (the whole of [0,1]).
// For each argument it checks
//   * the result bit for bit against an integer Horner model with truncation,
//   * |y - 2^x| < 2^-12, the accuracy target of the operator,
//   * that done arrives exactly 3 cycles after the accepted start.
// Requests are issued back to back, a new start in the cycle of done.
module tb_horner_eval;
  import poly_ref_pkg::*;

  logic clk = 0, rst = 1, start = 0;
  logic [16:0] x = '0;
  logic busy, done;
  logic signed [17:0] y;
  int checks = 0, failures = 0;
  real max_err = 0.0;

  horner_eval dut (.clk, .rst, .start, .x, .busy, .done, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int k = 0; k <= 65536; k++) begin
      int lat;
      real err;
      longint expv;
      start <= 1'b1;
      x     <= 17'(k);
      @(posedge clk);
      start <= 1'b0;
      x     <= 17'($urandom);          // the argument must be held internally
      lat = 1;
      while (1) begin
        @(negedge clk);
        if (done) break;
        lat++;
        @(posedge clk);
        if (lat > 10) break;
      end
      checks++;
      if (lat != 3) begin
        failures++;
        $display("FAIL latency %0d for x=%0d", lat, k);
      end
      expv = exp2_model(longint'(k));
      checks++;
      if (longint'(y) != expv) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d y=%0d model=%0d", k, y, expv);
      end
      err = real'(y) / 65536.0 - $pow(2.0, real'(k) / 65536.0);
      if (err < 0.0) err = -err;
      if (err > max_err) max_err = err;
      checks++;
      if (err >= 1.0 / 4096.0) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d error %g", k, err);
      end
    end
    $display("max |error| = %g (%0.2f correct bits)", max_err, -$ln(max_err) / $ln(2.0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
