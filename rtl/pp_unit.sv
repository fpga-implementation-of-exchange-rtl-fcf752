// pp_unit: polynomial part of the orbitals. For every shell it takes the
// exponential part ep (exp_part FIFO) and the shell type (T_tp FIFO) and
// emits one orbital per clock,
//   chi_klm = r_x^k * r_y^l * r_z^m * ep
// for all Cartesian (k, l, m) with k+l+m = 0 (s), 1 (p, 3 orbitals),
// 2 (d, 6) or 3 (f, 10), in the order x before y before z
// (xx, xy, xz, yy, yz, zz for d). The coordinates of the atom-centred point
// come from FIFO_0 (r_x, r_y) and FIFO_1 (r_z) and are popped after the last
// shell of an atom. The monomial is formed by three chained multipliers:
// f1*f2, then *f3, then *ep, where each factor is 1, r_x, r_y or r_z, so the
// pipeline accepts a new orbital every clock (latency 6). Results enter a
// small output FIFO; an orbital is issued only when the FIFO has room for it
// and for everything still in the pipeline, so a stalled consumer never loses
// data. 'out_end_point' marks the last orbital of a grid point.
// The document gives the formula and the unit's place (PP); the orbital order
// and the factor-select scheme are this design's.
module pp_unit
  import dft_pkg::*;
#(
  parameter int unsigned OUT_DEPTH = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  // exponential part
  input  logic      ep_empty,
  input  fp32_t     ep_data,
  output logic      ep_pop,
  // shell type
  input  logic      tp_empty,
  input  tp_entry_t tp_data,
  output logic      tp_pop,
  // coordinates of the current atom-centred point
  input  logic      xyz_avail,
  input  fp32_t     rx,
  input  fp32_t     ry,
  input  fp32_t     rz,
  output logic      xyz_pop,
  // orbital stream
  output logic      out_valid,
  output fp32_t     out_orbital,
  output logic      out_end_point,
  input  logic      out_ready
);
  // factor codes: 0 -> 1.0, 1 -> r_x, 2 -> r_y, 3 -> r_z
  typedef logic [5:0] sel_t;   // {f1, f2, f3}

  function automatic sel_t orbital_factors(input logic [7:0] tp, input logic [3:0] k);
    sel_t s;
    s = '0;
    case (tp)
      8'd2: s = {2'(k + 4'd1), 2'd0, 2'd0};
      8'd3: case (k)
              4'd0: s = {2'd1, 2'd1, 2'd0};
              4'd1: s = {2'd1, 2'd2, 2'd0};
              4'd2: s = {2'd1, 2'd3, 2'd0};
              4'd3: s = {2'd2, 2'd2, 2'd0};
              4'd4: s = {2'd2, 2'd3, 2'd0};
              default: s = {2'd3, 2'd3, 2'd0};
            endcase
      8'd4: case (k)
              4'd0: s = {2'd1, 2'd1, 2'd1};
              4'd1: s = {2'd1, 2'd1, 2'd2};
              4'd2: s = {2'd1, 2'd1, 2'd3};
              4'd3: s = {2'd1, 2'd2, 2'd2};
              4'd4: s = {2'd1, 2'd2, 2'd3};
              4'd5: s = {2'd1, 2'd3, 2'd3};
              4'd6: s = {2'd2, 2'd2, 2'd2};
              4'd7: s = {2'd2, 2'd2, 2'd3};
              4'd8: s = {2'd2, 2'd3, 2'd3};
              default: s = {2'd3, 2'd3, 2'd3};
            endcase
      default: s = '0;
    endcase
    return s;
  endfunction

  function automatic fp32_t pick(input logic [1:0] code, input fp32_t x, input fp32_t y,
                                 input fp32_t z);
    case (code)
      2'd1:    return x;
      2'd2:    return y;
      2'd3:    return z;
      default: return FP32_ONE;
    endcase
  endfunction

  localparam int unsigned CW = $clog2(OUT_DEPTH) + 1;

  logic [3:0]    idx, n_orb;
  logic          issue, last_of_shell;
  logic [CW-1:0] inflight, ofifo_count;
  logic          ofifo_empty, ofifo_full;
  sel_t          sel;

  assign n_orb         = shell_orbitals(tp_data.tp);
  assign sel           = orbital_factors(tp_data.tp, idx);
  assign last_of_shell = (idx == n_orb - 4'd1);
  assign issue         = !ep_empty && !tp_empty && xyz_avail &&
                         (32'(ofifo_count) + 32'(inflight) < OUT_DEPTH);
  assign ep_pop        = issue && last_of_shell;
  assign tp_pop        = issue && last_of_shell;
  assign xyz_pop       = issue && last_of_shell && tp_data.end_atom;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) idx <= '0;
    else if (issue) idx <= last_of_shell ? 4'd0 : idx + 4'd1;
  end

  // three chained multipliers
  typedef struct packed {
    fp32_t f3;
    fp32_t ep;
    logic  endp;
  } tag_a_t;
  typedef struct packed {
    fp32_t ep;
    logic  endp;
  } tag_b_t;

  tag_a_t ta_in, ta_out;
  tag_b_t tb_in, tb_out;
  logic   va, vb, vc, endp_c;
  fp32_t  pa, pb, pc;

  assign ta_in = '{f3: pick(sel[1:0], rx, ry, rz), ep: ep_data,
                   endp: last_of_shell && tp_data.end_point};

  fp_mul #(.TAG_W($bits(tag_a_t))) u_mul_a (
    .clk, .rst_n, .in_valid(issue), .a(pick(sel[5:4], rx, ry, rz)),
    .b(pick(sel[3:2], rx, ry, rz)), .in_tag(ta_in),
    .out_valid(va), .y(pa), .out_tag(ta_out));

  assign tb_in = '{ep: ta_out.ep, endp: ta_out.endp};

  fp_mul #(.TAG_W($bits(tag_b_t))) u_mul_b (
    .clk, .rst_n, .in_valid(va), .a(pa), .b(ta_out.f3),
    .in_tag(tb_in),
    .out_valid(vb), .y(pb), .out_tag(tb_out));

  fp_mul #(.TAG_W(1)) u_mul_c (
    .clk, .rst_n, .in_valid(vb), .a(pb), .b(tb_out.ep), .in_tag(tb_out.endp),
    .out_valid(vc), .y(pc), .out_tag(endp_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inflight <= '0;
    else        inflight <= inflight + CW'(issue) - CW'(vc);
  end

  logic [32:0] ofifo_dout;
  sync_fifo #(.WIDTH(33), .DEPTH(OUT_DEPTH)) u_out_fifo (
    .clk, .rst_n, .push(vc), .din({endp_c, pc}), .pop(out_valid && out_ready),
    .dout(ofifo_dout), .empty(ofifo_empty), .full(ofifo_full), .count(ofifo_count));

  assign out_valid     = !ofifo_empty;
  assign out_orbital   = ofifo_dout[31:0];
  assign out_end_point = ofifo_dout[32];

  assert property (@(posedge clk) disable iff (!rst_n) !(vc && ofifo_full))
    else $error("pp_unit: output FIFO overflow");
endmodule
