// tb_smat_gen_1: the S matrix module in its single-thread configuration (one
// lane, full-size 512-entry buffers), three grid points of 13 orbitals each,
// so three groups and three Delta passes. Stimulus and checks are the same
// as in the four-lane test: orbital values with random gaps, Delta words
// (upper triangle, two per word) with random gaps, densities taken with
// random stalls and compared with sum_ij chi_i chi_j Delta_ij in double
// precision; one buffer swap per group, writer held off while both buffers
// are busy, exactly three passes of Delta consumed, and a group taking close
// to N(N+1)/2 clocks.
module tb_smat_gen_1;
  import dft_pkg::*;
  import tb_dft_pkg::*;
  localparam int L = 1, NP = 3, N = 13;
  localparam int NT = N * (N + 1) / 2, NW = (NT + 1) / 2;
  logic clk = 0, rst_n = 0, start = 0;
  logic chi_valid = 0, chi_end_point = 0, chi_ready, delta_valid, delta_pop;
  fp32_t chi = 0, rho;
  bus_word_t delta_word;
  logic rho_valid, rho_ready = 0, swap, busy;
  int checks = 0, failures = 0;
  real chiv[NP][N], dl[N][N];
  bus_word_t dwords[NW];
  int dw_idx = 0, d_consumed = 0, n_rho = 0, swaps = 0, wr_stall = 0;
  bit d_hold = 0;
  longint cyc = 0, run_start = 0, run_len = -1;

  smat_gen #(.NUM_TR_CALC(L)) dut (
    .clk, .rst_n, .start, .n_points(10'(NP)), .chi_valid, .chi, .chi_end_point, .chi_ready,
    .delta_valid, .delta_word, .delta_pop, .rho_valid, .rho, .rho_ready, .swap, .busy);

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  assign delta_valid = !d_hold && d_consumed < 3 * NW;
  assign delta_word  = dwords[dw_idx];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (delta_pop) begin
        dw_idx     <= (dw_idx == NW - 1) ? 0 : dw_idx + 1;
        d_consumed <= d_consumed + 1;
      end
      if (swap) begin
        swaps++;
        run_start = cyc;
      end
      if (chi_valid && !chi_ready) wr_stall++;
      if (rho_valid && rho_ready) begin
        real e, m;
        e = 0.0; m = 0.0;
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) begin
            e += chiv[n_rho][i] * chiv[n_rho][j] * dl[i][j];
            m += absr(chiv[n_rho][i] * chiv[n_rho][j] * dl[i][j]);
          end
        checks++;
        if (!close(f2r(rho), e, 0.0, 1e-5 * m + 1e-12)) begin
          failures++;
          if (failures < 10) $display("FAIL rho[%0d] = %g exp %g", n_rho, f2r(rho), e);
        end
        n_rho++;
      end
    end
  end

  // length of the first compute run (Delta never stalls during group 0)
  always @(posedge clk) begin
    if (rst_n && dut.cst == 2'd2 && run_len < 0) run_len = cyc - run_start;
  end

  initial begin
    logic [63:0] q[$];
    for (int p = 0; p < NP; p++)
      for (int i = 0; i < N; i++) chiv[p][i] = f2r(r2f(urand_real(-2.0, 2.0)));
    for (int i = 0; i < N; i++)
      for (int j = i; j < N; j++) begin
        dl[i][j] = f2r(r2f(urand_real(-1.0, 1.0)));
        dl[j][i] = dl[i][j];
        q.push_back($realtobits(dl[i][j]));
      end
    for (int w = 0; w < NW; w++)
      dwords[w] = {(2 * w + 1 < q.size()) ? q[2*w+1] : 64'd0, q[2*w]};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    fork
      begin : writer
        for (int p = 0; p < NP; p++)
          for (int i = 0; i < N; i++) begin
            chi_valid = 1;
            chi = r2f(chiv[p][i]);
            chi_end_point = (i == N - 1);
            @(posedge clk);
            while (!chi_ready) @(posedge clk);
            #1;
            if ($urandom % 4 == 0) begin chi_valid = 0; @(posedge clk); #1; end
          end
        chi_valid = 0;
      end
      begin : reader
        for (int i = 0; i < 4000; i++) begin
          @(negedge clk);
          rho_ready = ($urandom % 3) != 0;
          d_hold    = (swaps > 1) && (($urandom % 5) == 0);
        end
      end
    join
    checks++;
    if (n_rho != NP || swaps != (NP + L - 1) / L || wr_stall == 0 || d_consumed != 3 * NW) begin
      failures++;
      $display("FAIL %0d densities, %0d swaps, %0d writer stalls, %0d delta words", n_rho, swaps,
               wr_stall, d_consumed);
    end
    checks++;
    if (run_len < NT || run_len > NT + 12) begin
      failures++; $display("FAIL first group took %0d clocks for %0d terms", run_len, NT);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
