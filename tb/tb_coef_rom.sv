// tb_coef_rom: reads every word of the default coefficient ROM on both ports
// and compares with the 2^x coefficients 8191/8192, 2853/4096, 1837/8192 and
// 649/8192, scaled by 2^14.
module tb_coef_rom;
  logic        [1:0]  ra, rb;
  logic signed [14:0] da, db;
  int checks = 0, failures = 0;
  longint expv [4] = '{16382, 11412, 3674, 1298};

  coef_rom dut (.raddr_a(ra), .rdata_a(da), .raddr_b(rb), .rdata_b(db));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      ra = 2'(i); rb = 2'(3 - i);
      #1;
      checks += 2;
      if (longint'(da) != expv[i])     begin failures++; $display("FAIL a[%0d]=%0d", i, da); end
      if (longint'(db) != expv[3 - i]) begin failures++; $display("FAIL b[%0d]=%0d", 3 - i, db); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
