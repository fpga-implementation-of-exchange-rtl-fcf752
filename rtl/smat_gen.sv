// smat_gen: S matrix generator and electron density. For each grid point P
// of a block it computes
//   rho(P) = Tr(S * Delta) = sum_i sum_j chi_i(P) chi_j(P) Delta_ij
// using the symmetry of S and Delta: only the upper triangle i <= j is
// visited and off-diagonal Delta elements are doubled, halving the work.
//
// NUM_TR_CALC lanes (smat_lane) work on different grid points at once and
// share one Delta stream: each (i, j) step reads chi_i and chi_j of its own
// point in every lane and multiplies them by the same broadcast Delta_ij, so
// the whole Delta matrix is streamed once per group of NUM_TR_CALC points.
//
// Orbital vectors arrive one orbital per clock (chi_*, valid/ready) and are
// written into ping-pong buffers: every lane has two memories, one feeding
// its chi_i register and one its chi_j register, each holding two banks. The
// incoming group fills one bank while the lanes compute on the other; when
// the incoming bank is full and the lanes are idle the banks swap ('swap').
// The number of orbitals per point is taken from the position of
// chi_end_point. The last group of a block (n_points) may be partial.
//
// Delta arrives as 128-bit words of two doubles (low half first), upper
// triangle in row order (i = 0: j = 0..N-1, i = 1: j = 1..N-1, ...); each
// pass starts on a new word. It is converted to single precision on the way
// in. After the last term the lane sums are captured by a parallel-to-serial
// register, converted to IEEE-754 by facc2float and queued in the output
// FIFO (rho_*, valid/ready), in point order. One (i, j) step per clock.
// Lane structure, ping-pong buffering, Delta broadcast, parallel-to-serial
// conversion and the output FIFO follow the document; the buffer split, the
// Delta order and all handshakes are this design's choices.
module smat_gen
  import dft_pkg::*;
#(
  parameter int unsigned NUM_TR_CALC = 16,
  parameter int unsigned MAX_ORB     = 512,
  parameter int unsigned ACC_W       = 96,
  parameter int unsigned FRAC_W      = 56,
  parameter int unsigned OUT_DEPTH   = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [9:0] n_points,
  // orbital stream
  input  logic       chi_valid,
  input  fp32_t      chi,
  input  logic       chi_end_point,
  output logic       chi_ready,
  // Delta stream
  input  logic       delta_valid,
  input  bus_word_t  delta_word,
  output logic       delta_pop,
  // density stream
  output logic       rho_valid,
  output fp32_t      rho,
  input  logic       rho_ready,
  // monitoring
  output logic       swap,
  output logic       busy
);
  localparam int unsigned L   = NUM_TR_CALC;
  localparam int unsigned OA  = $clog2(MAX_ORB);
  localparam int unsigned LW  = (L > 1) ? $clog2(L) : 1;
  localparam int unsigned OCW = $clog2(OUT_DEPTH) + 1;

  typedef enum logic [1:0] {C_IDLE, C_RUN, C_DRAIN, C_OUT} cstate_t;

  // ---------------- write side
  logic          wb, w_full;
  logic [LW-1:0] w_lane;
  logic [OA-1:0] w_idx;
  logic [9:0]    w_pts;
  logic [OA:0]   n_orb_w;
  logic [LW:0]   w_lanes;
  logic          accept, block_open;

  // ---------------- compute side
  cstate_t       cst;
  logic          cb;
  logic [OA:0]   c_n;
  logic [LW:0]   c_lanes;
  logic [OA-1:0] ci, cj;
  logic          dh, step, c_first, c_last;
  logic [LW:0]   p_cnt;

  assign block_open = (w_pts != n_points);
  assign chi_ready  = !w_full && block_open;
  assign accept     = chi_valid && chi_ready;
  assign swap       = w_full && (cst == C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb      <= 1'b0;
      w_full  <= 1'b0;
      w_lane  <= '0;
      w_idx   <= '0;
      w_pts   <= '0;
      n_orb_w <= '0;
      w_lanes <= '0;
    end else if (start) begin
      w_full  <= 1'b0;
      w_lane  <= '0;
      w_idx   <= '0;
      w_pts   <= '0;
    end else begin
      if (accept) begin
        if (chi_end_point) begin
          n_orb_w <= (OA+1)'(w_idx) + 1'b1;
          w_idx   <= '0;
          w_pts   <= w_pts + 10'd1;
          if (32'(w_lane) == L - 1 || w_pts == n_points - 10'd1) begin
            w_full  <= 1'b1;
            w_lanes <= (LW+1)'(w_lane) + 1'b1;
            w_lane  <= '0;
          end else begin
            w_lane <= w_lane + 1'b1;
          end
        end else begin
          w_idx <= w_idx + 1'b1;
        end
      end
      if (swap) begin
        wb     <= !wb;
        w_full <= 1'b0;
      end
    end
  end

  // ---------------- Delta element, converted and doubled off the diagonal
  fp64_t d64;
  fp32_t d32, dlt;
  assign d64 = dh ? delta_word[127:64] : delta_word[63:0];
  fp_f2f u_f2f_delta (.d(d64), .f(d32));
  always_comb begin
    dlt = d32;
    if (ci != cj && d32[30:23] != 8'd0) begin
      if (d32[30:23] >= 8'd254) dlt = {d32[31], 8'hFF, 23'd0};
      else                      dlt = {d32[31], d32[30:23] + 8'd1, d32[22:0]};
    end
  end

  assign step      = (cst == C_RUN) && delta_valid;
  assign c_first   = (ci == '0) && (cj == '0);
  assign c_last    = ((OA+1)'(ci) == c_n - 1'b1) && ((OA+1)'(cj) == c_n - 1'b1);
  assign delta_pop = step && (dh || c_last);

  // ---------------- lanes and their ping-pong buffers
  logic [L-1:0]            l_valid;
  logic [L-1:0][ACC_W-1:0] l_sum;

  for (genvar g = 0; g < L; g++) begin : g_lane
    fp32_t mem_i [2*MAX_ORB];
    fp32_t mem_j [2*MAX_ORB];
    always_ff @(posedge clk) begin
      if (accept && w_lane == LW'(g)) begin
        mem_i[{wb, w_idx}] <= chi;
        mem_j[{wb, w_idx}] <= chi;
      end
    end
    smat_lane #(.ACC_W(ACC_W), .FRAC_W(FRAC_W)) u_lane (
      .clk, .rst_n, .in_valid(step), .chi_i(mem_i[{cb, ci}]), .chi_j(mem_j[{cb, cj}]),
      .delta(dlt), .first(c_first), .last(c_last),
      .sum_valid(l_valid[g]), .sum(l_sum[g]));
  end

  // ---------------- compute sequencing and parallel-to-serial
  logic [L-1:0][ACC_W-1:0] p2s;
  logic                    cv_valid, cv_out_valid;
  fp32_t                   cv_y;
  logic [OCW-1:0]          ofifo_count;
  logic                    ofifo_empty, ofifo_full;

  assign cv_valid = (cst == C_OUT) && (32'(ofifo_count) + 2 < OUT_DEPTH);
  assign busy     = (cst != C_IDLE) || w_full || (w_pts != '0 && block_open);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cst     <= C_IDLE;
      cb      <= 1'b0;
      c_n     <= '0;
      c_lanes <= '0;
      ci      <= '0;
      cj      <= '0;
      dh      <= 1'b0;
      p_cnt   <= '0;
    end else begin
      case (cst)
        C_IDLE: if (swap) begin
          cb      <= wb;
          c_n     <= n_orb_w;
          c_lanes <= w_lanes;
          ci      <= '0;
          cj      <= '0;
          dh      <= 1'b0;
          cst     <= C_RUN;
        end
        C_RUN: if (step) begin
          dh <= c_last ? 1'b0 : !dh;
          if (c_last) begin
            cst <= C_DRAIN;
          end else if ((OA+1)'(cj) == c_n - 1'b1) begin
            ci <= ci + 1'b1;
            cj <= ci + 1'b1;
          end else begin
            cj <= cj + 1'b1;
          end
        end
        C_DRAIN: if (l_valid[0]) begin
          p_cnt <= '0;
          cst   <= C_OUT;
        end
        C_OUT: if (cv_valid) begin
          p_cnt <= p_cnt + 1'b1;
          if (p_cnt == c_lanes - 1'b1) cst <= C_IDLE;
        end
        default: cst <= C_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (cst == C_DRAIN && l_valid[0]) p2s <= l_sum;
  end

  facc2float #(.ACC_W(ACC_W), .FRAC_W(FRAC_W)) u_facc2float (
    .clk, .rst_n, .in_valid(cv_valid), .acc(p2s[p_cnt[LW-1:0]]),
    .out_valid(cv_out_valid), .y(cv_y));

  sync_fifo #(.WIDTH(32), .DEPTH(OUT_DEPTH)) u_out_fifo (
    .clk, .rst_n, .push(cv_out_valid), .din(cv_y), .pop(rho_valid && rho_ready),
    .dout(rho), .empty(ofifo_empty), .full(ofifo_full), .count(ofifo_count));
  assign rho_valid = !ofifo_empty;

  assert property (@(posedge clk) disable iff (!rst_n) !(cv_out_valid && ofifo_full))
    else $error("smat_gen: output FIFO overflow");
  assert property (@(posedge clk) disable iff (!rst_n)
                   accept && !chi_end_point |-> 32'(w_idx) < MAX_ORB - 1)
    else $error("smat_gen: more orbitals than MAX_ORB");
endmodule
