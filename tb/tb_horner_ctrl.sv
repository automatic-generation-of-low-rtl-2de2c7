// tb_horner_ctrl: checks the step sequence of the Horner controller for
// degree 3: on an accepted start the coefficient indices 2, 1, 0 are issued in
// three consecutive cycles, done pulses exactly 3 cycles after start, and a
// start raised while busy is ignored.
module tb_horner_ctrl;
  logic clk = 0, rst = 1, start = 0;
  logic busy, first, acc_en, x_load, done;
  logic [1:0] add_idx;
  int checks = 0, failures = 0;
  int cyc = 0;

  horner_ctrl dut (.clk, .rst, .start, .busy, .first, .acc_en, .x_load, .add_idx, .done);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d (cycle %0d)", what, got, exp, cyc);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int op = 0; op < 4; op++) begin
      // cycle 0: idle, start accepted
      @(negedge clk);
      expect_eq("idle busy", busy, 0);
      expect_eq("first", first, 1);
      start = 1;
      #1;
      expect_eq("x_load", x_load, 1);
      expect_eq("acc_en", acc_en, 1);
      expect_eq("idx step0", add_idx, 2);
      // cycles 1, 2: busy, a start here must be ignored
      for (int k = 1; k < 3; k++) begin
        @(negedge clk);
        start = (op % 2 == 1);
        #1;
        expect_eq("busy", busy, 1);
        expect_eq("first low", first, 0);
        expect_eq("x_load low", x_load, 0);
        expect_eq("acc_en", acc_en, 1);
        expect_eq("idx", add_idx, 2 - k);
        expect_eq("no early done", done, 0);
      end
      // cycle 3: done pulse, idle again
      @(negedge clk);
      start = 0;
      #1;
      expect_eq("done", done, 1);
      expect_eq("busy after", busy, 0);
      @(negedge clk);
      expect_eq("done is a pulse", done, 0);
      expect_eq("still idle", busy, 0);
      expect_eq("acc_en idle", acc_en, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
