// tb_facc: feeds sums of random length (1..40 terms, random signs and
// magnitudes from 2^-20 to 2^20) into the accumulator and compares each
// finished sum, read as a fixed-point number with 56 fractional bits, with
// the sum of the inputs computed in double precision. Checks the two-clock
// delay from the 'last' term to 'sum_valid'.
module tb_facc;
  import tb_dft_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, first = 0, last = 0, sum_valid;
  logic [31:0] x = 0;
  logic [95:0] sum;
  int checks = 0, failures = 0;
  real    exp_q[$];
  longint t_q[$];
  longint cyc = 0;

  facc #(.ACC_W(96), .FRAC_W(56)) dut (.clk, .rst_n, .in_valid, .first, .last, .x, .sum_valid, .sum);

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && sum_valid) begin
      real e;
      checks++;
      e = exp_q.pop_front();
      if (cyc - t_q.pop_front() != 2 || !close(fix2r(sum, 56), e, 1e-12, 1e-15)) begin
        failures++;
        if (failures < 10) $display("FAIL sum %g exp %g", fix2r(sum, 56), e);
      end
    end
  end

  initial begin
    real acc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 400; s++) begin
      int n;
      n = 1 + $urandom % 40;
      acc = 0.0;
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        while ($urandom % 4 == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1;
        first    = (i == 0);
        last     = (i == n - 1);
        x        = r2f(urand_real(-1.0, 1.0) * pow2(int'($urandom % 40) - 20));
        acc     += f2r(x);
        if (last) begin
          exp_q.push_back(acc);
          t_q.push_back(cyc);
        end
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL sums missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
