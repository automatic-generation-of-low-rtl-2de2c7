// tb_sqrt_op: exhaustive check of the sqrt(1+x) operator over every argument
// x = k / 2^13, k = 0 .. 8192, streamed one per cycle.
// Each result is checked bit for bit against an integer model of the
// shift-and-add network, against the target |y - sqrt(1+x)| < 2^-8, and for
// its one-cycle latency (out_valid the cycle after in_valid).
module tb_sqrt_op;
  import poly_ref_pkg::*;

  logic clk = 0, rst = 1, in_valid = 0;
  logic [13:0] x = '0;
  logic out_valid;
  logic [13:0] y;
  int checks = 0, failures = 0;
  real max_err = 0.0;
  int sent = 0, got = 0;

  sqrt_op dut (.clk, .rst, .in_valid, .x, .out_valid, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // driver: one argument per cycle, with an idle cycle every 100
  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    while (sent <= 8192) begin
      @(posedge clk);
      if (sent % 100 == 99 && !in_valid) begin
        in_valid <= 1'b0;
        x        <= 14'($urandom);
      end else begin
        in_valid <= 1'b1;
        x        <= 14'(sent);
        sent++;
      end
    end
    @(posedge clk);
    in_valid <= 1'b0;
  end

  // checker: the result of the argument presented in cycle t appears in t+1
  logic        prev_valid = 0;
  logic [13:0] prev_x     = '0;
  always @(posedge clk) begin
    if (!rst) begin
      checks++;
      if (out_valid != prev_valid) begin
        failures++;
        $display("FAIL out_valid=%b expected %b", out_valid, prev_valid);
      end
      if (out_valid && prev_valid) begin
        longint expv;
        real err;
        expv = sqrt_model(longint'(prev_x));
        err  = real'(y) / 8192.0 - $sqrt(1.0 + real'(prev_x) / 8192.0);
        if (err < 0.0) err = -err;
        if (err > max_err) max_err = err;
        checks += 2;
        if (longint'(y) != expv) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d y=%0d model=%0d", prev_x, y, expv);
        end
        if (err >= 1.0 / 256.0) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d error %g", prev_x, err);
        end
        got++;
        if (got == 8193) begin
          $display("max |error| = %g (%0.2f correct bits)", max_err, -$ln(max_err) / $ln(2.0));
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
    prev_valid <= in_valid;
    prev_x     <= x;
  end
endmodule
