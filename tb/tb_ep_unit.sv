// tb_ep_unit: sends random contracted shells (1..8 primitives, random C_i,
// alpha_i and r^2) to the exponential part unit, with idle gaps, and
// compares each result with sum_i C_i exp(-alpha_i r^2) in double precision
// (relative error 2^-18 of the sum of |terms|). Checks the nine-clock
// latency from the last primitive and that exactly one result comes per
// shell.
module tb_ep_unit;
  import tb_dft_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, first = 0, last = 0, ep_valid;
  logic [31:0] c = 0, alpha = 0, r2 = 0, ep;
  int checks = 0, failures = 0;
  real    exp_q[$], mag_q[$];
  longint t_q[$];
  longint cyc = 0;

  ep_unit dut (.clk, .rst_n, .in_valid, .c, .alpha, .r2, .first, .last, .ep_valid, .ep);

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
    if (rst_n && ep_valid) begin
      real e, m;
      longint t;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL extra result"); end
      else begin
        e = exp_q.pop_front(); m = mag_q.pop_front(); t = t_q.pop_front();
        if (cyc - t != 9 || !close(f2r(ep), e, 0.0, m / 262144.0 + 1e-30)) begin
          failures++;
          if (failures < 10) $display("FAIL ep %g exp %g lat %0d", f2r(ep), e, cyc - t);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 600; s++) begin
      int  n;
      real sum, mag, term;
      n   = 1 + $urandom % 8;
      sum = 0.0; mag = 0.0;
      @(negedge clk);
      r2 = r2f(urand_real(0.0, 6.0) * ((s % 4 == 0) ? 0.01 : 1.0));
      for (int i = 0; i < n; i++) begin
        if (i != 0) @(negedge clk);
        while ($urandom % 5 == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        first    = (i == 0);
        last     = (i == n - 1);
        c        = r2f(urand_real(-2.0, 2.0));
        alpha    = r2f(urand_real(0.05, 30.0));
        term     = f2r(c) * $exp(-f2r(alpha) * f2r(r2));
        sum     += term;
        mag     += absr(term);
      end
      exp_q.push_back(sum); mag_q.push_back(mag); t_q.push_back(cyc);
    end
    @(negedge clk) in_valid = 0;
    repeat (15) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
