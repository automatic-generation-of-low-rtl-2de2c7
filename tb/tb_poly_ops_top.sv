// tb_poly_ops_top: end-to-end test of both operators running at the same time,
// at the default sizes.
//
// The 2^x operator is fed random arguments (plus the end points 0 and 1.0)
// in a mix of back-to-back requests (start in the cycle of done), requests
// after idle gaps, and extra start pulses while busy, which must be ignored.
// The sqrt(1+x) operator is streamed in parallel with random gaps. Every
// result is checked bit for bit against integer models and against the
// accuracy targets (2^-12 and 2^-8), and the 2^x latency against 3 cycles.
// Each mechanism is counted; one that never occurred counts as a failure.
module tb_poly_ops_top;
  import poly_ref_pkg::*;

  localparam int N_EXP2 = 3000;
  localparam int N_SQRT = 6000;

  logic clk = 0, rst = 1;
  logic exp2_start = 0;
  logic [16:0] exp2_x = '0;
  logic exp2_busy, exp2_done;
  logic signed [17:0] exp2_y;
  logic sqrt_in_valid = 0;
  logic [13:0] sqrt_x = '0;
  logic sqrt_out_valid;
  logic [13:0] sqrt_y;

  int checks = 0, failures = 0;
  int n_exp2_ops = 0, n_back_to_back = 0, n_after_gap = 0, n_ignored_start = 0;
  int n_exp2_ends = 0, n_sqrt_ops = 0, n_sqrt_bubbles = 0, n_sqrt_ends = 0, n_overlap = 0;
  bit exp2_finished = 0, sqrt_finished = 0;

  poly_ops_top dut (.*);

  always #5 clk = ~clk;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- 2^x requests and checks ----------------
  initial begin
    int cyc;
    longint xv, expv;
    real err;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < N_EXP2; i++) begin
      int mode;
      mode = $urandom_range(0, 2);
      xv = (i == 0) ? 0 : (i == 1) ? 65536 : longint'($urandom_range(0, 65536));
      if (xv == 0 || xv == 65536) n_exp2_ends++;
      // mode 0 and 2 issue the next request as soon as possible
      exp2_start <= 1'b1;
      exp2_x     <= 17'(xv);
      @(posedge clk);
      cyc = 1;
      exp2_start <= 1'b0;
      exp2_x     <= 17'($urandom);
      // a stray start while busy (mode 2) must change nothing
      while (1) begin
        @(negedge clk);
        if (exp2_done) break;
        if (mode == 2 && cyc == 1) begin
          exp2_start = 1'b1;
          n_ignored_start++;
        end
        @(posedge clk);
        exp2_start <= 1'b0;
        cyc++;
        if (cyc > 10) break;
      end
      checks++;
      if (cyc != 3) fail($sformatf("2^x latency %0d", cyc));
      expv = exp2_model(xv);
      checks++;
      if (longint'(exp2_y) != expv) fail($sformatf("2^x x=%0d y=%0d model=%0d", xv, exp2_y, expv));
      err = real'(exp2_y) / 65536.0 - $pow(2.0, real'(xv) / 65536.0);
      checks++;
      if (err >= 1.0 / 4096.0 || err <= -1.0 / 4096.0) fail($sformatf("2^x x=%0d err %g", xv, err));
      n_exp2_ops++;
      if (!sqrt_finished) n_overlap++;
      if (mode == 1) begin
        n_after_gap++;
        @(posedge clk);
        repeat ($urandom_range(0, 3)) @(posedge clk);
      end else begin
        n_back_to_back++;     // next start driven in the cycle of done
      end
    end
    exp2_finished = 1;
  end

  // ---------------- sqrt(1+x) stream and checks ----------------
  initial begin
    int sent;
    sent = 0;
    repeat (3) @(posedge clk);
    while (sent < N_SQRT) begin
      @(posedge clk);
      if ($urandom_range(0, 7) == 0) begin
        sqrt_in_valid <= 1'b0;
        n_sqrt_bubbles++;
      end else begin
        longint xv;
        xv = (sent == 0) ? 0 : (sent == 1) ? 8192 : longint'($urandom_range(0, 8192));
        sqrt_in_valid <= 1'b1;
        sqrt_x        <= 14'(xv);
        if (xv == 0 || xv == 8192) n_sqrt_ends++;
        sent++;
      end
    end
    @(posedge clk);
    sqrt_in_valid <= 1'b0;
    repeat (2) @(posedge clk);
    sqrt_finished = 1;
  end

  logic        sq_prev_valid = 0;
  logic [13:0] sq_prev_x     = '0;
  always @(posedge clk) begin
    if (!rst) begin
      checks++;
      if (sqrt_out_valid != sq_prev_valid) fail("sqrt out_valid timing");
      if (sqrt_out_valid && sq_prev_valid) begin
        longint expv;
        real err;
        expv = sqrt_model(longint'(sq_prev_x));
        err  = real'(sqrt_y) / 8192.0 - $sqrt(1.0 + real'(sq_prev_x) / 8192.0);
        checks += 2;
        if (longint'(sqrt_y) != expv) fail($sformatf("sqrt x=%0d y=%0d model=%0d", sq_prev_x, sqrt_y, expv));
        if (err >= 1.0 / 256.0 || err <= -1.0 / 256.0) fail($sformatf("sqrt x=%0d err %g", sq_prev_x, err));
        n_sqrt_ops++;
      end
    end
    sq_prev_valid <= sqrt_in_valid;
    sq_prev_x     <= sqrt_x;
  end

  // ---------------- end of test ----------------
  task automatic need(string what, int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) fail($sformatf("mechanism never exercised: %s", what));
  endtask

  initial begin
    wait (exp2_finished && sqrt_finished);
    $display("mechanism counts:");
    need("2^x Horner evaluations", n_exp2_ops);
    need("2^x back-to-back requests", n_back_to_back);
    need("2^x requests after a gap", n_after_gap);
    need("2^x starts ignored (busy)", n_ignored_start);
    need("2^x end points 0 / 1.0", n_exp2_ends);
    need("sqrt evaluations", n_sqrt_ops);
    need("sqrt input bubbles", n_sqrt_bubbles);
    need("sqrt end points 0 / 1.0", n_sqrt_ends);
    need("2^x while sqrt streaming", n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
