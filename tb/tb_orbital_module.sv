// tb_orbital_module: a small molecule (an atom with s, p, d and f shells and
// two with s and p shells) on 24 random grid points, laid out in the SRAM by
// the host model. Every orbital leaving the module is compared with the
// double precision value of chi_klm at that point (relative tolerance 1e-4)
// and the end-of-point flag with the orbital count per point. The consumer
// stalls at random. The Delta words arriving through FIFO_3 are compared
// with the SRAM image. Also checks that all four FIFOs were fed by bursts
// and that load_done and calc_done pulse.
module tb_orbital_module;
  import dft_pkg::*;
  import tb_dft_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  load_cfg_t cfg;
  logic load_done, calc_done, mem_req, mem_gnt, mem_rvalid;
  logic [23:0] mem_addr;
  bus_word_t mem_rdata, delta_word;
  logic orb_valid, orb_end_point, orb_ready = 0, delta_valid, delta_pop;
  fp32_t orb_value;
  logic [3:0] fifo_burst;
  int checks = 0, failures = 0;
  int n_out = 0, n_delta = 0, bursts[4], loads = 0, calcs = 0;
  dft_host h;

  orbital_module dut (
    .clk, .rst_n, .start, .cfg, .n_atoms(6'(h.n_atoms)), .n_points(10'(h.n_points)),
    .load_done, .calc_done, .mem_req, .mem_addr, .mem_gnt, .mem_rvalid, .mem_rdata,
    .orb_valid, .orb_value, .orb_end_point, .orb_ready, .delta_valid, .delta_word, .delta_pop,
    .fifo_burst);

  rasc_sram_model #(.DEPTH(8192)) u_sram (.clk, .req(mem_req), .addr(mem_addr), .gnt(mem_gnt),
                                          .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = !clk;
  assign delta_pop = delta_valid;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (orb_valid && orb_ready) begin
        int p, o;
        real e;
        p = n_out / h.n_orb;
        o = n_out % h.n_orb;
        e = h.chi[p][o];
        checks++;
        if (!close(f2r(orb_value), e, 1e-4, 1e-7) || orb_end_point != (o == h.n_orb - 1)) begin
          failures++;
          if (failures < 10) $display("FAIL point %0d orbital %0d: %g exp %g end %b", p, o,
                                      f2r(orb_value), e, orb_end_point);
        end
        n_out++;
      end
      if (delta_pop) begin
        checks++;
        if (delta_word !== h.img[h.base_d + n_delta]) begin
          failures++; $display("FAIL delta word %0d", n_delta);
        end
        n_delta++;
      end
      for (int f = 0; f < 4; f++) if (fifo_burst[f]) bursts[f]++;
      if (load_done) loads++;
      if (calc_done) calcs++;
    end
  end

  initial begin
    h = new(1);
    h.add_atom(0.1, -0.2, 0.3, '{1, 2, 3, 4}, '{3, 2, 2, 1});
    h.add_atom(1.2, 0.4, -0.5, '{1, 2}, '{4, 1});
    h.add_atom(-0.9, 0.8, 0.6, '{1, 1, 2}, '{2, 1, 3});
    h.make_points(24, 1.5);
    h.build();
    foreach (h.img[i]) u_sram.mem[i] = h.img[i];
    cfg.alpha_c = '{base: 24'(h.base_ac), words: 24'(h.n_ac)};
    cfg.kw_tp_a = '{base: 24'(h.base_kw), words: 24'(h.n_kw)};
    cfg.rx_ry   = '{base: 24'(h.base_xy), words: 24'(h.n_xy)};
    cfg.rz      = '{base: 24'(h.base_z),  words: 24'(h.n_z)};
    cfg.r2      = '{base: 24'(h.base_r2), words: 24'(h.n_r2)};
    cfg.delta   = '{base: 24'(h.base_d),  words: 24'(h.n_d)};
    cfg.delta_passes = 8'd1;
    foreach (bursts[f]) bursts[f] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    for (int i = 0; i < 6000 && n_out < h.n_points * h.n_orb; i++) begin
      orb_ready = ($urandom % 3) != 0;
      @(negedge clk);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (n_out != h.n_points * h.n_orb || n_delta != h.n_d || loads != 1 || calcs != 1) begin
      failures++;
      $display("FAIL %0d of %0d orbitals, %0d of %0d delta words, load %0d calc %0d", n_out,
               h.n_points * h.n_orb, n_delta, h.n_d, loads, calcs);
    end
    checks++;
    if (bursts[0] == 0 || bursts[1] == 0 || bursts[2] == 0 || bursts[3] == 0) begin
      failures++; $display("FAIL a FIFO was never fed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
