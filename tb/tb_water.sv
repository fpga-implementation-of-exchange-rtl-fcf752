// tb_water: the water molecule with a 6-31G-like basis (oxygen 1s, 2sp,
// 3sp; hydrogens 1s, 2s; 13 orbitals) on a block of 512 grid points, run
// through the whole accelerator at its default sizes. Every one of the 512
// densities is compared with Tr(S*Delta) from double precision orbitals
// (tolerance 1e-4 of the sum of |terms|), and the clock count from start to
// the last density is reported and bounded by the work the design does:
// 22 primitive steps per point in EP and 91 Delta terms for each of the 32
// groups of 16 points.
module tb_water;
  import dft_pkg::*;
  import tb_dft_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  load_cfg_t cfg;
  logic load_done, calc_done, mem_req, mem_gnt, mem_rvalid;
  logic [23:0] mem_addr;
  bus_word_t mem_rdata;
  logic rho_valid, rho_ready = 1, swap, orb_stall, smat_busy;
  fp32_t rho;
  logic [3:0] fifo_burst;
  int checks = 0, failures = 0, n_rho = 0, swaps = 0;
  longint cyc = 0, t_start = 0, t_end = 0;
  dft_host h;

  dft_xc_top dut (
    .clk, .rst_n, .start, .cfg, .n_atoms(6'(h.n_atoms)), .n_points(10'(h.n_points)),
    .load_done, .calc_done, .mem_req, .mem_addr, .mem_gnt, .mem_rvalid, .mem_rdata,
    .rho_valid, .rho, .rho_ready, .fifo_burst, .swap, .orb_stall, .smat_busy);

  rasc_sram_model #(.DEPTH(16384), .MIN_LAT(4), .MAX_LAT(6), .GNT_PCT(100)) u_sram (
    .clk, .req(mem_req), .addr(mem_addr), .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
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
        if (n_rho == h.n_points) t_end = cyc;
      end
      if (swap) swaps++;
    end
  end

  initial begin
    h = new(16);
    h.water();
    h.make_points(512, 2.0);
    h.build();
    foreach (h.img[i]) u_sram.mem[i] = h.img[i];
    cfg.alpha_c = '{base: 24'(h.base_ac), words: 24'(h.n_ac)};
    cfg.kw_tp_a = '{base: 24'(h.base_kw), words: 24'(h.n_kw)};
    cfg.rx_ry   = '{base: 24'(h.base_xy), words: 24'(h.n_xy)};
    cfg.rz      = '{base: 24'(h.base_z),  words: 24'(h.n_z)};
    cfg.r2      = '{base: 24'(h.base_r2), words: 24'(h.n_r2)};
    cfg.delta   = '{base: 24'(h.base_d),  words: 24'(h.n_d)};
    cfg.delta_passes = 8'(h.passes());
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    t_start = cyc;
    @(negedge clk) start = 0;
    while (n_rho < h.n_points) @(negedge clk);
    repeat (20) @(negedge clk);
    checks++;
    if (n_rho != 512 || h.n_orb != 13 || swaps != 32) begin
      failures++; $display("FAIL %0d densities, %0d orbitals, %0d swaps", n_rho, h.n_orb, swaps);
    end
    $display("water, 512 points: %0d clocks from start to the last density", t_end - t_start);
    checks++;
    if (t_end - t_start > 512 * 22 * 2 + 32 * 91 + 2000) begin
      failures++; $display("FAIL slower than expected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
