// tb_fp_f2f: checks double-to-single conversion against a rounding reference
// that picks the nearer of the two neighbouring single precision values
// (ties to even), for random values over the whole single range, exact
// halfway cases, overflow, underflow and zero.
module tb_fp_f2f;
  import tb_dft_pkg::*;
  logic [63:0] d;
  logic [31:0] f;
  int checks = 0, failures = 0;

  fp_f2f dut (.d(d), .f(f));

  task automatic check_one(input real r);
    logic [31:0] expv;
    d = $realtobits(r);
    #1;
    expv = r2f(r);
    checks++;
    if (f !== expv) begin
      failures++;
      if (failures < 10) $display("FAIL f2f(%g): got %h exp %h", r, f, expv);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(0.0);
    check_one(1.0);
    check_one(-2.5);
    check_one(1.0 + 1.0 / 16777216.0);              // tie, rounds to even (down)
    check_one(1.0 + 3.0 / 16777216.0);              // tie, rounds up
    check_one(1.0 + 1.0 / 16777216.0 + 1e-12);      // just above the tie
    check_one(3.0e38);
    check_one(1.0e39);                              // overflow
    check_one(1.0e-39);                             // below normal range
    check_one(-0.1);
    for (int i = 0; i < 3000; i++)
      check_one(urand_real(-1.0, 1.0) * pow2(int'($urandom % 240) - 120));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
