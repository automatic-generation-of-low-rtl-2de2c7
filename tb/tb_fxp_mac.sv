// tb_fxp_mac: random and corner-case check of the Horner multiply-add against
// an integer model: y = floor(acc*x / 2^16) + 4*c for the 2^x formats.
module tb_fxp_mac;
  import poly_ref_pkg::*;

  logic signed [17:0] acc;
  logic        [16:0] x;
  logic signed [14:0] c;
  logic signed [17:0] y;
  int checks = 0, failures = 0;

  fxp_mac dut (.acc, .x, .c, .y);

  task automatic check_one(longint a, longint xv, longint cv);
    longint exp;
    acc = 18'(a); x = 17'(xv); c = 15'(cv);
    #1;
    exp = floor_shr(a * xv, 16) + cv * 4;
    checks++;
    if (longint'(y) != exp) begin
      failures++;
      $display("FAIL acc=%0d x=%0d c=%0d y=%0d exp=%0d", a, xv, cv, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(0, 0, 0);
    check_one(65536, 65536, 0);          // 1.0 * 1.0
    check_one(-1, 1, 0);                 // floor of a tiny negative product
    check_one(-65536, 32768, 100);       // -1.0 * 0.5 + c
    check_one(1298 * 4, 65536, 3674);    // first 2^x step at x = 1
    for (int i = 0; i < 2000; i++) begin
      longint a  = longint'($signed($urandom_range(0, 131071))) - 65536;
      longint xv = longint'($urandom_range(0, 65536));
      longint cv = longint'($urandom_range(0, 16383)) - 8192;
      // keep the sum inside the 18-bit range
      if (floor_shr(a * xv, 16) + cv * 4 < 131072 && floor_shr(a * xv, 16) + cv * 4 >= -131072)
        check_one(a, xv, cv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
