// tb_smat_lane: feeds random upper-triangle sequences (orbital vectors of
// 1..30 elements and Delta elements) into one lane, with gaps, and compares
// the accumulated sum with sum_{i<=j} chi_i chi_j Delta'_ij, where the
// products are rounded to single precision like the lane's multipliers.
// Checks the seven-clock latency from the last term.
module tb_smat_lane;
  import tb_dft_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, first = 0, last = 0, sum_valid;
  logic [31:0] chi_i = 0, chi_j = 0, delta = 0;
  logic [95:0] sum;
  int checks = 0, failures = 0;
  real    exp_q[$];
  longint t_q[$];
  longint cyc = 0;

  smat_lane dut (.clk, .rst_n, .in_valid, .chi_i, .chi_j, .delta, .first, .last, .sum_valid, .sum);

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
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
      if (cyc - t_q.pop_front() != 7 || !close(fix2r(sum, 56), e, 1e-9, 1e-12)) begin
        failures++;
        if (failures < 10) $display("FAIL sum %g exp %g", fix2r(sum, 56), e);
      end
    end
  end

  initial begin
    real v[];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 60; s++) begin
      int  n;
      real acc;
      n = 1 + $urandom % 30;
      v = new[n];
      foreach (v[i]) v[i] = f2r(r2f(urand_real(-3.0, 3.0)));
      acc = 0.0;
      for (int i = 0; i < n; i++)
        for (int j = i; j < n; j++) begin
          real d;
          @(negedge clk);
          while ($urandom % 6 == 0) begin in_valid = 0; @(negedge clk); end
          in_valid = 1;
          chi_i = r2f(v[i]); chi_j = r2f(v[j]);
          d     = f2r(r2f(urand_real(-1.0, 1.0)));
          delta = r2f(d);
          first = (i == 0 && j == 0);
          last  = (i == n - 1 && j == n - 1);
          acc  += f2r(r2f(f2r(r2f(v[i] * v[j])) * d));
        end
      exp_q.push_back(acc); t_q.push_back(cyc);
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL sums missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
