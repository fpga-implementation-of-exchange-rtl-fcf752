// tb_control2: runs the sequencer over a random basis (3 atoms, 1..4 shells
// each, 1..6 primitives per shell) for 7 grid points with random gaps in
// r^2 availability and downstream room. Every primitive sent to EP is
// compared with a list built independently from the basis: coefficient
// address and values, the r^2 of the right (point, atom), and first/last.
// Every T_tp entry is compared too (shell type, end of atom, end of point),
// as are the number of r^2 pops and the done pulse.
module tb_control2;
  import dft_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done;
  logic [9:0] ctrl_addr;
  kwtp_t ctrl_cur, ctrl_nxt;
  logic [10:0] coef_addr;
  fp32_t coef_c, coef_alpha, r2, ep_c, ep_alpha, ep_r2;
  logic r2_avail, r2_pop, room, ep_valid, ep_first, ep_last, tp_push;
  tp_entry_t tp_entry;
  int checks = 0, failures = 0;

  localparam int NA = 3, NP = 7;
  kwtp_t ctrl_mem [1024];
  fp32_t r2_mem [NA*NP];
  int    r2_rd = 0, r2_pops = 0, dones = 0;
  logic [95:0] exp_ep[$];    // {c, alpha, r2} with first/last in separate queue
  logic [1:0]  exp_fl[$];
  tp_entry_t   exp_tp[$];

  control2 dut (.clk, .rst_n, .start, .n_atoms(6'(NA)), .n_points(10'(NP)), .busy, .done,
                .ctrl_addr, .ctrl_cur, .ctrl_nxt, .coef_addr, .coef_c, .coef_alpha,
                .r2_avail, .r2, .r2_pop, .room, .ep_valid, .ep_c, .ep_alpha, .ep_r2,
                .ep_first, .ep_last, .tp_push, .tp_entry);

  // coefficient "memory": values derived from the address
  assign coef_c     = {21'h0A5A5, coef_addr};
  assign coef_alpha = {21'h15A5A, coef_addr};
  assign ctrl_cur   = ctrl_mem[ctrl_addr];
  assign ctrl_nxt   = ctrl_mem[10'(ctrl_addr + 1)];
  assign r2         = r2_mem[r2_rd % (NA*NP)];

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (ep_valid) begin
        checks++;
        if (exp_ep.size() == 0 || {ep_c, ep_alpha, ep_r2} !== exp_ep[0] ||
            {ep_first, ep_last} !== exp_fl[0]) begin
          failures++;
          if (failures < 10) $display("FAIL ep: got %h %h %h %b%b", ep_c, ep_alpha, ep_r2,
                                      ep_first, ep_last);
        end
        if (exp_ep.size() != 0) begin void'(exp_ep.pop_front()); void'(exp_fl.pop_front()); end
      end
      if (tp_push) begin
        checks++;
        if (exp_tp.size() == 0 || tp_entry !== exp_tp[0]) begin
          failures++;
          if (failures < 10) $display("FAIL tp: got %p", tp_entry);
        end
        if (exp_tp.size() != 0) void'(exp_tp.pop_front());
      end
      if (r2_pop) begin r2_rd <= r2_rd + 1; r2_pops++; end
      if (done) dones++;
    end
  end

  initial begin
    int a_ctl, coef, ns[NA], tps[NA][4], kws[NA][4];
    for (int i = 0; i < 1024; i++) ctrl_mem[i] = '0;
    foreach (r2_mem[i]) r2_mem[i] = 32'h4000_0000 + 32'(i);
    a_ctl = 0;
    for (int a = 0; a < NA; a++) begin
      ns[a] = 1 + $urandom % 4;
      for (int s = 0; s < ns[a]; s++) begin
        tps[a][s] = 1 + $urandom % 4;
        kws[a][s] = 1 + $urandom % 6;
        ctrl_mem[a_ctl] = '{tp: 8'(tps[a][s]), kw: 8'(kws[a][s])};
        a_ctl++;
      end
      ctrl_mem[a_ctl] = '0;
      a_ctl++;
    end
    for (int p = 0; p < NP; p++) begin
      coef = 0;
      for (int a = 0; a < NA; a++)
        for (int s = 0; s < ns[a]; s++) begin
          for (int i = 0; i < kws[a][s]; i++) begin
            exp_ep.push_back({21'h0A5A5, 11'(coef), 21'h15A5A, 11'(coef),
                              32'h4000_0000 + 32'(p * NA + a)});
            exp_fl.push_back({i == 0, i == kws[a][s] - 1});
            coef++;
          end
          exp_tp.push_back('{tp: 8'(tps[a][s]), end_atom: s == ns[a] - 1,
                             end_point: (s == ns[a] - 1) && (a == NA - 1)});
        end
    end
    r2_avail = 0; room = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    for (int i = 0; i < 3000; i++) begin
      r2_avail = ($urandom % 5) != 0;
      room     = ($urandom % 4) != 0;
      @(negedge clk);
    end
    checks++;
    if (exp_ep.size() != 0 || exp_tp.size() != 0 || r2_pops != NA * NP || dones != 1 || busy) begin
      failures++;
      $display("FAIL left %0d ep %0d tp, %0d r2 pops, %0d done", exp_ep.size(), exp_tp.size(),
               r2_pops, dones);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
