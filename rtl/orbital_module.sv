// orbital_module: computes, for every grid point of a block, the values of
// all atomic orbitals
//   chi_klm(r) = r_x^k r_y^l r_z^m * sum_i C_i exp(-alpha_i r^2)
// and streams them out in order, one per clock, with 'orb_end_point' on the
// last orbital of each point.
//
// Structure (one instance of each):
//   control1   reads the serialized input vectors from the SRAM over one
//              shared 128-bit bus and dispatches them to the memories below
//   BRAM_0     {alpha_i, C_i} in single precision (double-to-single on write)
//   BRAM_1     control list T_kw_tp_a, four (kw, tp) pairs per word
//   FIFO_0     {r_y, r_x}; FIFO_1 two r_z; FIFO_2 two r^2 (converted on write)
//   FIFO_3     Delta words, passed untouched to the delta_* port for the
//              S matrix module
//   control2   walks the control list per point and drives EP
//   ep_unit    exponential part, one value per shell into the exp_part FIFO
//   pp_unit    polynomial part, one orbital per clock
// The FIFOs holding two values per entry (FIFO_1, FIFO_2) are read half by
// half. Coordinates and r^2 are ordered point by point, atom by atom within
// a point. EP issue is throttled so that the exp_part FIFO can always take
// every shell already in the EP pipeline.
// The block set and connections follow the document's block diagram; depths,
// the packing of two values into one FIFO entry and the flow control are
// this design's choices.
module orbital_module
  import dft_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 512,   // FIFO_0..FIFO_3
  parameter int unsigned EPF_DEPTH  = 64,    // exp_part and T_tp FIFOs
  parameter int unsigned BURST      = 16,
  parameter int unsigned COEF_DEPTH = 2048,  // 32 atoms x 64 coefficients
  parameter int unsigned KW_WORDS   = 256    // 1024 (kw, tp) pairs
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  load_cfg_t  cfg,
  input  logic [5:0] n_atoms,
  input  logic [9:0] n_points,
  output logic       load_done,
  output logic       calc_done,
  // SRAM read port
  output logic       mem_req,
  output logic [23:0] mem_addr,
  input  logic       mem_gnt,
  input  logic       mem_rvalid,
  input  bus_word_t  mem_rdata,
  // orbital stream
  output logic       orb_valid,
  output fp32_t      orb_value,
  output logic       orb_end_point,
  input  logic       orb_ready,
  // Delta stream (FIFO_3)
  output logic       delta_valid,
  output bus_word_t  delta_word,
  input  logic       delta_pop,
  // monitoring
  output logic [3:0] fifo_burst
);
  localparam int unsigned COEF_AW = $clog2(COEF_DEPTH);
  localparam int unsigned KW_AW   = $clog2(KW_WORDS);
  localparam int unsigned CTRL_AW = KW_AW + 2;
  localparam int unsigned FW      = $clog2(FIFO_DEPTH) + 1;
  localparam int unsigned EW      = $clog2(EPF_DEPTH) + 1;

  // ---------------- Control 1
  bus_word_t         wr_data;
  logic              bram0_we, bram1_we;
  logic [COEF_AW-1:0] bram0_waddr;
  logic [KW_AW-1:0]  bram1_waddr;
  logic [3:0]        fifo_push;
  logic [3:0][FW-1:0] fifo_count;
  logic              c1_busy, c2_busy;

  control1 #(.FIFO_DEPTH(FIFO_DEPTH), .BURST(BURST), .COEF_AW(COEF_AW), .KW_AW(KW_AW))
  u_control1 (
    .clk, .rst_n, .start, .cfg, .busy(c1_busy), .done(load_done),
    .mem_req, .mem_addr, .mem_gnt, .mem_rvalid, .mem_rdata,
    .fifo_count, .wr_data, .bram0_we, .bram0_addr(bram0_waddr),
    .bram1_we, .bram1_addr(bram1_waddr), .fifo_push, .fifo_burst);

  // double-to-single converters on the write side
  fp32_t lo32, hi32;
  fp_f2f u_f2f_lo (.d(wr_data[63:0]),   .f(lo32));
  fp_f2f u_f2f_hi (.d(wr_data[127:64]), .f(hi32));

  // ---------------- BRAM_0: {alpha, C}
  logic [63:0]        bram0 [COEF_DEPTH];
  logic [COEF_AW-1:0] coef_addr;
  always_ff @(posedge clk) if (bram0_we) bram0[bram0_waddr] <= {hi32, lo32};

  // ---------------- BRAM_1: control list
  logic [63:0]        bram1 [KW_WORDS];
  logic [CTRL_AW-1:0] ctrl_addr, ctrl_addr_n;
  kwtp_t              ctrl_cur, ctrl_nxt;
  logic [63:0]        w_cur, w_nxt;
  always_ff @(posedge clk) if (bram1_we) bram1[bram1_waddr] <= wr_data[63:0];
  assign ctrl_addr_n = ctrl_addr + CTRL_AW'(1);
  assign w_cur       = bram1[ctrl_addr[CTRL_AW-1:2]];
  assign w_nxt       = bram1[ctrl_addr_n[CTRL_AW-1:2]];
  assign ctrl_cur    = kwtp_t'(w_cur[16*ctrl_addr[1:0] +: 16]);
  assign ctrl_nxt    = kwtp_t'(w_nxt[16*ctrl_addr_n[1:0] +: 16]);

  // ---------------- FIFO_0..FIFO_2 (converted) and FIFO_3 (raw Delta)
  logic [63:0] f0_dout, f1_dout, f2_dout;
  logic        f0_empty, f1_empty, f2_empty, f3_empty;
  logic        f0_pop, f1_pop, f2_pop;
  logic        f1_half, f2_half;
  logic        xyz_pop, r2_pop;

  sync_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_fifo0 (
    .clk, .rst_n, .push(fifo_push[0]), .din({hi32, lo32}), .pop(f0_pop),
    .dout(f0_dout), .empty(f0_empty), .full(), .count(fifo_count[0]));
  sync_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_fifo1 (
    .clk, .rst_n, .push(fifo_push[1]), .din({hi32, lo32}), .pop(f1_pop),
    .dout(f1_dout), .empty(f1_empty), .full(), .count(fifo_count[1]));
  sync_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_fifo2 (
    .clk, .rst_n, .push(fifo_push[2]), .din({hi32, lo32}), .pop(f2_pop),
    .dout(f2_dout), .empty(f2_empty), .full(), .count(fifo_count[2]));
  sync_fifo #(.WIDTH(128), .DEPTH(FIFO_DEPTH)) u_fifo3 (
    .clk, .rst_n, .push(fifo_push[3]), .din(wr_data), .pop(delta_pop),
    .dout(delta_word), .empty(f3_empty), .full(), .count(fifo_count[3]));
  assign delta_valid = !f3_empty;

  // half select of the two-value FIFOs
  assign f0_pop = xyz_pop;
  assign f1_pop = xyz_pop && f1_half;
  assign f2_pop = r2_pop && f2_half;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f1_half <= 1'b0;
      f2_half <= 1'b0;
    end else if (start && !c2_busy) begin
      f1_half <= 1'b0;
      f2_half <= 1'b0;
    end else begin
      if (xyz_pop) f1_half <= !f1_half;
      if (r2_pop)  f2_half <= !f2_half;
    end
  end

  // ---------------- Control 2, EP, exp_part and T_tp FIFOs
  logic      ep_in_valid, ep_first, ep_last, ep_out_valid;
  fp32_t     ep_c, ep_alpha, ep_r2, ep_out;
  logic      tp_push, room;
  tp_entry_t tp_entry, tp_head;
  logic      epf_empty, epf_pop, epf_full, tpf_empty, tpf_pop, tpf_full;
  fp32_t     epf_dout;
  logic [EW-1:0] epf_count, tpf_count, shells_in_ep;

  assign room = (32'(epf_count) + 32'(shells_in_ep) + 2 < EPF_DEPTH) && !tpf_full;

  control2 #(.COEF_AW(COEF_AW), .CTRL_AW(CTRL_AW)) u_control2 (
    .clk, .rst_n, .start, .n_atoms, .n_points, .busy(c2_busy), .done(calc_done),
    .ctrl_addr, .ctrl_cur, .ctrl_nxt,
    .coef_addr, .coef_c(bram0[coef_addr][31:0]), .coef_alpha(bram0[coef_addr][63:32]),
    .r2_avail(!f2_empty), .r2(f2_half ? f2_dout[63:32] : f2_dout[31:0]), .r2_pop,
    .room, .ep_valid(ep_in_valid), .ep_c, .ep_alpha, .ep_r2, .ep_first, .ep_last,
    .tp_push, .tp_entry);

  ep_unit u_ep (
    .clk, .rst_n, .in_valid(ep_in_valid), .c(ep_c), .alpha(ep_alpha), .r2(ep_r2),
    .first(ep_first), .last(ep_last), .ep_valid(ep_out_valid), .ep(ep_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) shells_in_ep <= '0;
    else        shells_in_ep <= shells_in_ep + EW'(ep_in_valid && ep_last) - EW'(ep_out_valid);
  end

  sync_fifo #(.WIDTH(32), .DEPTH(EPF_DEPTH)) u_exp_part (
    .clk, .rst_n, .push(ep_out_valid), .din(ep_out), .pop(epf_pop),
    .dout(epf_dout), .empty(epf_empty), .full(epf_full), .count(epf_count));

  logic [$bits(tp_entry_t)-1:0] tpf_dout;
  sync_fifo #(.WIDTH($bits(tp_entry_t)), .DEPTH(EPF_DEPTH)) u_t_tp (
    .clk, .rst_n, .push(tp_push), .din(tp_entry), .pop(tpf_pop),
    .dout(tpf_dout), .empty(tpf_empty), .full(tpf_full), .count(tpf_count));
  assign tp_head = tp_entry_t'(tpf_dout);

  // ---------------- PP
  pp_unit u_pp (
    .clk, .rst_n,
    .ep_empty(epf_empty), .ep_data(epf_dout), .ep_pop(epf_pop),
    .tp_empty(tpf_empty), .tp_data(tp_head), .tp_pop(tpf_pop),
    .xyz_avail(!f0_empty && !f1_empty), .rx(f0_dout[31:0]), .ry(f0_dout[63:32]),
    .rz(f1_half ? f1_dout[63:32] : f1_dout[31:0]), .xyz_pop,
    .out_valid(orb_valid), .out_orbital(orb_value), .out_end_point(orb_end_point),
    .out_ready(orb_ready));

  assert property (@(posedge clk) disable iff (!rst_n) !(ep_out_valid && epf_full))
    else $error("orbital_module: exp_part FIFO overflow");
  assert property (@(posedge clk) disable iff (!rst_n) |fifo_push |-> c1_busy)
    else $error("orbital_module: data written while the loader is idle");
endmodule
