// tb_pp_unit: queues random shells of every type (s, p, d, f) for a series
// of atom-centred points and checks every orbital against
// r_x^k r_y^l r_z^m * ep computed in double precision, in Cartesian order,
// with the end-of-point flag on the right orbital. The consumer stalls at
// random, the input queues run dry at random, and the coordinates must be
// popped exactly once per atom. Also checks one orbital per clock when
// nothing stalls.
module tb_pp_unit;
  import tb_dft_pkg::*;
  import dft_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ep_empty, ep_pop, tp_empty, tp_pop, xyz_avail, xyz_pop;
  logic out_valid, out_end_point, out_ready = 0;
  fp32_t ep_data, rx, ry, rz, out_orbital;
  tp_entry_t tp_data;
  int checks = 0, failures = 0;

  logic [31:0] epq[$];
  tp_entry_t   tpq[$];
  logic [95:0] xyzq[$];
  real         expq[$];
  bit          endq[$];
  bit          hold = 1;
  int          xyz_pops = 0, atoms = 0, stall_cycles = 0, burst_len = 0, max_burst = 0;

  pp_unit dut (.clk, .rst_n, .ep_empty, .ep_data, .ep_pop, .tp_empty, .tp_data, .tp_pop,
               .xyz_avail, .rx, .ry, .rz, .xyz_pop, .out_valid, .out_orbital, .out_end_point,
               .out_ready);

  always #5 clk = !clk;

  // queue heads, refreshed whenever the queues or 'hold' change
  task automatic refresh();
    ep_empty  = hold || epq.size() == 0;
    ep_data   = (epq.size() != 0) ? epq[0] : 32'd0;
    tp_empty  = hold || tpq.size() == 0;
    tp_data   = (tpq.size() != 0) ? tpq[0] : '0;
    xyz_avail = !hold && xyzq.size() != 0;
    rx = (xyzq.size() != 0) ? xyzq[0][31:0]  : 32'd0;
    ry = (xyzq.size() != 0) ? xyzq[0][63:32] : 32'd0;
    rz = (xyzq.size() != 0) ? xyzq[0][95:64] : 32'd0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the queues change just after the clock edge, like registered FIFO state
  always @(posedge clk) begin
    if (rst_n) begin
      bit pe, pt, px;
      pe = ep_pop; pt = tp_pop; px = xyz_pop;
      #1;
      if (pe) void'(epq.pop_front());
      if (pt) void'(tpq.pop_front());
      if (px) begin void'(xyzq.pop_front()); xyz_pops++; end
      refresh();
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid && out_ready) begin
        real e; bit en;
        checks++;
        e = expq.pop_front(); en = endq.pop_front();
        if (!close(f2r(out_orbital), e, 1.0 / 1048576.0, 1e-30) || out_end_point != en) begin
          failures++;
          if (failures < 10) $display("FAIL orb %g exp %g end %b/%b", f2r(out_orbital), e,
                                      out_end_point, en);
        end
        burst_len++;
        if (burst_len > max_burst) max_burst = burst_len;
      end else burst_len = 0;
      if (out_valid && !out_ready) stall_cycles++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    refresh();
    rst_n = 1;
    // 60 points, 1..3 atoms each, 1..4 shells per atom
    for (int p = 0; p < 60; p++) begin
      int na;
      na = 1 + $urandom % 3;
      for (int a = 0; a < na; a++) begin
        real x, y, z;
        int  ns;
        x = urand_real(-2.0, 2.0); y = urand_real(-2.0, 2.0); z = urand_real(-2.0, 2.0);
        xyzq.push_back({r2f(z), r2f(y), r2f(x)});
        atoms++;
        ns = 1 + $urandom % 4;
        for (int s = 0; s < ns; s++) begin
          int tp, ex, ey, ez;
          real e;
          tp = 1 + $urandom % 4;
          e  = urand_real(-1.0, 1.0);
          epq.push_back(r2f(e));
          tpq.push_back('{tp: 8'(tp), end_atom: (s == ns - 1),
                          end_point: (s == ns - 1) && (a == na - 1)});
          for (int k = 0; k < nshell(tp); k++) begin
            cart(tp, k, ex, ey, ez);
            expq.push_back(f2r(r2f(e)) * (f2r(r2f(x)) ** ex) * (f2r(r2f(y)) ** ey) *
                           (f2r(r2f(z)) ** ez));
            endq.push_back((k == nshell(tp) - 1) && (s == ns - 1) && (a == na - 1));
          end
        end
      end
    end
    // phase 1: random stalls on both sides
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      out_ready = ($urandom % 3) != 0;
      hold      = ($urandom % 6) == 0;
      refresh();
    end
    // phase 2: free running
    @(negedge clk);
    out_ready = 1;
    hold      = 0;
    refresh();
    repeat (3000) @(posedge clk);
    checks++;
    if (expq.size() != 0 || xyz_pops != atoms) begin
      failures++;
      $display("FAIL %0d orbitals missing, %0d of %0d coordinate pops", expq.size(), xyz_pops, atoms);
    end
    checks++;
    if (stall_cycles == 0 || max_burst < 20) begin
      failures++;
      $display("FAIL stalls %0d, longest run %0d", stall_cycles, max_burst);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
