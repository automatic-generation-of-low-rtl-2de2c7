// tb_horner_eval_alt: the 2^x operator loaded with the second, equally good
// coefficient set, p2 = 919/4096 instead of 1837/8192, through the COEF
// parameter. Every argument in [0,1] is checked bit for bit against the integer
// Horner model and against the 2^-12 accuracy target, with the 3-cycle latency.
// This set reaches exactly 2.0 at x = 1.0, so the accumulator needs one more
// integer bit (AW = 19) than the default set.
module tb_horner_eval_alt;
  import poly_ref_pkg::*;

  localparam logic signed [14:0] ALT_COEF [4] = '{15'sd16382, 15'sd11412, 15'sd3676, 15'sd1298};

  logic clk = 0, rst = 1, start = 0;
  logic [16:0] x = '0;
  logic busy, done;
  logic signed [18:0] y;
  int checks = 0, failures = 0;
  real max_err = 0.0;

  horner_eval #(.AW(19), .COEF(ALT_COEF)) dut (.clk, .rst, .start, .x, .busy, .done, .y);

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
      expv = exp2_model(longint'(k), 919 * 4);
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
