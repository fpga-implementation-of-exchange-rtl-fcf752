// tb_control1: the dispatcher reads a random SRAM image (random word counts
// per vector, Delta streamed three times) through the behavioural SRAM with
// random latency and grant. The testbench models the four FIFOs' fill
// levels and drains them at random. Checks: BRAM_0 and BRAM_1 receive
// every word of their vectors at consecutive addresses before any FIFO
// data moves; each FIFO receives exactly its vector in order (Delta
// repeated per pass); no FIFO ever holds more than its depth; every FIFO is
// served by bursts; 'done' pulses once at the end.
module tb_control1;
  import dft_pkg::*;
  localparam int DEPTH = 64, BURST = 8;
  logic clk = 0, rst_n = 0, start = 0;
  load_cfg_t cfg;
  logic busy, done, mem_req, mem_gnt, mem_rvalid;
  logic [23:0] mem_addr;
  bus_word_t mem_rdata, wr_data;
  logic [3:0][$clog2(DEPTH):0] fifo_count;
  logic bram0_we, bram1_we;
  logic [10:0] bram0_addr;
  logic [7:0] bram1_addr;
  logic [3:0] fifo_push, fifo_burst;
  int checks = 0, failures = 0;
  int lvl[4], pushed[4], bursts[4], bram_writes = 0, dones = 0, fifo_data_seen = 0;
  int n_ac, n_kw, nf[4], bases[4];

  control1 #(.FIFO_DEPTH(DEPTH), .BURST(BURST)) dut (
    .clk, .rst_n, .start, .cfg, .busy, .done, .mem_req, .mem_addr, .mem_gnt, .mem_rvalid,
    .mem_rdata, .fifo_count, .wr_data, .bram0_we, .bram0_addr, .bram1_we, .bram1_addr,
    .fifo_push, .fifo_burst);

  rasc_sram_model #(.DEPTH(4096)) u_sram (.clk, .req(mem_req), .addr(mem_addr), .gnt(mem_gnt),
                                          .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = !clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb for (int f = 0; f < 4; f++) fifo_count[f] = ($clog2(DEPTH)+1)'(lvl[f]);

  always @(posedge clk) begin
    if (rst_n) begin
      int drain;
      if (bram0_we) begin
        checks++;
        if (fifo_data_seen != 0 || bram1_we || int'(bram0_addr) >= n_ac ||
            wr_data !== u_sram.mem[cfg.alpha_c.base + 24'(bram0_addr)] ||
            int'(bram0_addr) != bram_writes) begin
          failures++; $display("FAIL bram0 write %0d", bram0_addr);
        end
        bram_writes++;
      end
      if (bram1_we) begin
        checks++;
        if (fifo_data_seen != 0 || bram_writes != n_ac + int'(bram1_addr) ||
            wr_data !== u_sram.mem[cfg.kw_tp_a.base + 24'(bram1_addr)]) begin
          failures++; $display("FAIL bram1 write %0d", bram1_addr);
        end
        bram_writes++;
      end
      for (int f = 0; f < 4; f++) begin
        if (fifo_push[f]) begin
          checks++;
          fifo_data_seen++;
          if (bram_writes != n_ac + n_kw ||
              wr_data !== u_sram.mem[bases[f] + (pushed[f] % nf[f])]) begin
            failures++;
            if (failures < 10) $display("FAIL fifo%0d word %0d", f, pushed[f]);
          end
          pushed[f]++;
          lvl[f]++;
        end
        if (fifo_burst[f]) bursts[f]++;
        drain = (($urandom % 100) < 30) ? 1 : 0;
        if (lvl[f] > 0 && drain != 0) lvl[f]--;
        if (lvl[f] > DEPTH) begin failures++; $display("FAIL fifo%0d overflow", f); end
      end
      if (done) dones++;
    end
  end

  initial begin
    int b;
    for (int i = 0; i < 4096; i++) u_sram.mem[i] = {$urandom, $urandom, $urandom, $urandom};
    n_ac = 20 + $urandom % 40;
    n_kw = 3 + $urandom % 5;
    for (int f = 0; f < 4; f++) begin nf[f] = 50 + $urandom % 300; lvl[f] = 0; pushed[f] = 0; bursts[f] = 0; end
    b = 7;
    cfg.alpha_c = '{base: 24'(b), words: 24'(n_ac)}; b += n_ac;
    cfg.kw_tp_a = '{base: 24'(b), words: 24'(n_kw)}; b += n_kw;
    bases[0] = b; cfg.rx_ry = '{base: 24'(b), words: 24'(nf[0])}; b += nf[0];
    bases[1] = b; cfg.rz    = '{base: 24'(b), words: 24'(nf[1])}; b += nf[1];
    bases[2] = b; cfg.r2    = '{base: 24'(b), words: 24'(nf[2])}; b += nf[2];
    bases[3] = b; cfg.delta = '{base: 24'(b), words: 24'(nf[3])};
    cfg.delta_passes = 8'd3;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    repeat (5) @(negedge clk);
    checks++;
    if (bram_writes != n_ac + n_kw || pushed[0] != nf[0] || pushed[1] != nf[1] ||
        pushed[2] != nf[2] || pushed[3] != 3 * nf[3] || dones != 1 || busy) begin
      failures++;
      $display("FAIL counts: bram %0d fifo %0d %0d %0d %0d", bram_writes, pushed[0], pushed[1],
               pushed[2], pushed[3]);
    end
    checks++;
    if (bursts[0] < 2 || bursts[1] < 2 || bursts[2] < 2 || bursts[3] < 2) begin
      failures++; $display("FAIL bursts %0d %0d %0d %0d", bursts[0], bursts[1], bursts[2], bursts[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
