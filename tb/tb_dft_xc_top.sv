// tb_dft_xc_top: end-to-end run of the whole accelerator at its default
// sizes (16 S matrix lanes). A molecule with s, p, d and f shells (one f
// shell with six primitives) on 40 grid points: two full groups of 16 and a
// partial group of 8, so Delta is streamed three times. The host model lays
// out the SRAM; the behavioural SRAM answers with random latency and grant;
// densities are taken with random stalls. Every density is compared with
// Tr(S*Delta) from double precision orbitals (tolerance 1e-4 of the sum of
// |terms|). Counts and requires each mechanism at least once: burst
// requests to each of the four FIFOs, a ping-pong swap per group, the
// orbital stream held off by the S matrix module, EP issue throttled by
// the exp_part FIFO, the density output stalled, and both done pulses.
module tb_dft_xc_top;
  import dft_pkg::*;
  import tb_dft_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  load_cfg_t cfg;
  logic load_done, calc_done, mem_req, mem_gnt, mem_rvalid;
  logic [23:0] mem_addr;
  bus_word_t mem_rdata;
  logic rho_valid, rho_ready = 0, swap, orb_stall, smat_busy;
  fp32_t rho;
  logic [3:0] fifo_burst;
  int checks = 0, failures = 0;
  int n_rho = 0, bursts[4], swaps = 0, orb_stalls = 0, ep_throttle = 0, rho_stalls = 0,
      loads = 0, calcs = 0;
  dft_host h;

  dft_xc_top dut (
    .clk, .rst_n, .start, .cfg, .n_atoms(6'(h.n_atoms)), .n_points(10'(h.n_points)),
    .load_done, .calc_done, .mem_req, .mem_addr, .mem_gnt, .mem_rvalid, .mem_rdata,
    .rho_valid, .rho, .rho_ready, .fifo_burst, .swap, .orb_stall, .smat_busy);

  rasc_sram_model #(.DEPTH(16384)) u_sram (.clk, .req(mem_req), .addr(mem_addr), .gnt(mem_gnt),
                                           .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = !clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (rho_valid && rho_ready) begin
        real m;
        m = 0.0;
        for (int i = 0; i < h.n_orb; i++)
          for (int j = 0; j < h.n_orb; j++)
            m += absr(h.chi[n_rho][i] * h.chi[n_rho][j] * h.delta[i][j]);
        checks++;
        if (!close(f2r(rho), h.rho[n_rho], 0.0, 1e-4 * m + 1e-12)) begin
          failures++;
          if (failures < 10) $display("FAIL rho[%0d] = %g exp %g", n_rho, f2r(rho), h.rho[n_rho]);
        end
        n_rho++;
      end
      for (int f = 0; f < 4; f++) if (fifo_burst[f]) bursts[f]++;
      if (swap) swaps++;
      if (orb_stall) orb_stalls++;
      if (dut.u_orbital.u_control2.busy && !dut.u_orbital.room) ep_throttle++;
      if (rho_valid && !rho_ready) rho_stalls++;
      if (load_done) loads++;
      if (calc_done) calcs++;
    end
  end

  initial begin
    h = new(16);
    h.add_atom(0.1, -0.2, 0.3, '{1, 2, 3, 4}, '{3, 2, 2, 6});
    h.add_atom(1.2, 0.4, -0.5, '{1, 2, 3}, '{4, 1, 2});
    h.add_atom(-0.9, 0.8, 0.6, '{1, 1, 2}, '{2, 1, 3});
    h.make_points(40, 1.5);
    h.build();
    foreach (h.img[i]) u_sram.mem[i] = h.img[i];
    cfg.alpha_c = '{base: 24'(h.base_ac), words: 24'(h.n_ac)};
    cfg.kw_tp_a = '{base: 24'(h.base_kw), words: 24'(h.n_kw)};
    cfg.rx_ry   = '{base: 24'(h.base_xy), words: 24'(h.n_xy)};
    cfg.rz      = '{base: 24'(h.base_z),  words: 24'(h.n_z)};
    cfg.r2      = '{base: 24'(h.base_r2), words: 24'(h.n_r2)};
    cfg.delta   = '{base: 24'(h.base_d),  words: 24'(h.n_d)};
    cfg.delta_passes = 8'(h.passes());
    foreach (bursts[f]) bursts[f] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (n_rho < h.n_points) begin
      rho_ready = ($urandom % 3) != 0;
      @(negedge clk);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (n_rho != h.n_points || loads != 1 || calcs != 1 || smat_busy) begin
      failures++; $display("FAIL %0d densities, load %0d calc %0d", n_rho, loads, calcs);
    end
    $display("mechanisms: fifo bursts %0d/%0d/%0d/%0d, swaps %0d, orbital stalls %0d, EP throttled %0d, density stalls %0d",
             bursts[0], bursts[1], bursts[2], bursts[3], swaps, orb_stalls, ep_throttle, rho_stalls);
    checks++;
    if (bursts[0] == 0 || bursts[1] == 0 || bursts[2] == 0 || bursts[3] == 0 ||
        swaps != h.passes() || orb_stalls == 0 || ep_throttle == 0 || rho_stalls == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
