// tb_max_molecule: the largest basis the accelerator is sized for, run end
// to end at the default parameters: 32 atoms, each with an f shell and a d
// shell of 32 primitives (64 coefficient pairs per atom, 2048 in all, which
// fills the coefficient memory), giving 16 orbitals per atom and 512
// orbitals per point, the size of one ping-pong bank, on a block of 512 grid
// points (32 groups of 16). One Delta pass is 512*513/2 elements (65,664
// words) and is streamed 32 times.
// Every density is compared with Tr(S*Delta) computed from double precision
// orbitals (tolerance 1e-4 of the sum of |terms|). Also checks the number
// of buffer swaps and that the group time is close to the 131,328 steps of
// the upper triangle, i.e. that the Delta stream keeps up at this size.
module tb_max_molecule;
  import dft_pkg::*;
  import tb_dft_pkg::*;
  localparam int NP = 512;
  logic clk = 0, rst_n = 0, start = 0;
  load_cfg_t cfg;
  logic load_done, calc_done, mem_req, mem_gnt, mem_rvalid;
  logic [23:0] mem_addr;
  bus_word_t mem_rdata;
  logic rho_valid, rho_ready = 1, swap, orb_stall, smat_busy;
  fp32_t rho;
  logic [3:0] fifo_burst;
  int checks = 0, failures = 0, n_rho = 0, swaps = 0;
  longint cyc = 0, t_start = 0, t_swap = 0, t_end = 0;
  dft_host h;

  dft_xc_top dut (
    .clk, .rst_n, .start, .cfg, .n_atoms(6'(h.n_atoms)), .n_points(10'(h.n_points)),
    .load_done, .calc_done, .mem_req, .mem_addr, .mem_gnt, .mem_rvalid, .mem_rdata,
    .rho_valid, .rho, .rho_ready, .fifo_burst, .swap, .orb_stall, .smat_busy);

  rasc_sram_model #(.DEPTH(131072), .MIN_LAT(4), .MAX_LAT(6), .GNT_PCT(100)) u_sram (
    .clk, .req(mem_req), .addr(mem_addr), .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (6000000) @(posedge clk);
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
      if (swap) begin
        swaps++;
        t_swap = cyc;
      end
    end
  end

  initial begin
    h = new(16);
    for (int a = 0; a < 32; a++)
      h.add_atom(1.2 * (a % 4) - 1.8, 1.2 * ((a / 4) % 4) - 1.8, 1.5 * (a / 16) - 0.75,
                 '{4, 3}, '{32, 32});
    h.make_points(NP, 2.5);
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
    if (n_rho != NP || h.n_orb != 512 || h.n_ac != 2048 || swaps != h.passes()) begin
      failures++;
      $display("FAIL %0d densities, %0d orbitals, %0d coefficients, %0d swaps", n_rho, h.n_orb,
               h.n_ac, swaps);
    end
    $display("32 atoms, 512 orbitals, %0d points: %0d clocks from start to the last density,",
             NP, t_end - t_start);
    $display("last group %0d clocks", t_end - t_swap);
    checks++;
    if (t_end - t_swap > 512 * 513 / 2 + 2000) begin
      failures++; $display("FAIL group slower than the Delta triangle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
