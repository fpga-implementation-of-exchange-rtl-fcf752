// control2: sequencer of the orbital module ("Control 2"). For every grid
// point it walks the control list T_kw_tp_a held in BRAM_1 from the start.
// Each (kw, tp) pair is one shell: kw coefficient pairs (C_i, alpha_i) are
// read from BRAM_0, one per clock, and sent to the exponential part unit
// with the r^2 of the current atom-centred point, flagged 'first' and 'last'.
// With the last pair the shell type goes into the T_tp FIFO for the
// polynomial unit. A (0, 0) pair ends an atom: the r^2 FIFO is popped
// ('end_atom') and the next atom's coefficients follow in BRAM_0. After
// n_atoms atoms the point is complete ('end_point' in the T_tp entry) and the
// walk restarts at address 0 for the next point; after n_points points the
// block is done.
// BRAM_0 and BRAM_1 are read combinationally (bram1 at the current and the
// following entry, so that the end of an atom is known when its last shell
// is issued). Issue waits while r^2 is missing ('r2_avail') or the
// downstream FIFOs have no room ('room').
// The walk over the control list follows the document's serialization
// format; reading kw as a coefficient count and the look-ahead are this
// design's reading of it.
// ep_c, ep_alpha, ep_r2 and the tp field of tp_entry are the BRAM and FIFO
// outputs passed straight through: the sequencer only chooses the addresses
// and the moment of issue, so these outputs are wires from inputs.
module control2
  import dft_pkg::*;
#(
  parameter int unsigned COEF_AW = 11,   // BRAM_0 depth 2048 = 32 atoms x 64
  parameter int unsigned CTRL_AW = 10    // BRAM_1 depth 1024 (kw, tp) pairs
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [5:0]         n_atoms,     // 1..32
  input  logic [9:0]         n_points,    // 1..512
  output logic               busy,
  output logic               done,
  // BRAM_1 (control list)
  output logic [CTRL_AW-1:0] ctrl_addr,
  input  kwtp_t              ctrl_cur,
  input  kwtp_t              ctrl_nxt,
  // BRAM_0 (coefficients)
  output logic [COEF_AW-1:0] coef_addr,
  input  fp32_t              coef_c,
  input  fp32_t              coef_alpha,
  // r^2 of the current atom-centred point
  input  logic               r2_avail,
  input  fp32_t              r2,
  output logic               r2_pop,
  // flow control from the exp_part / T_tp FIFOs
  input  logic               room,
  // to the exponential part unit
  output logic               ep_valid,
  output fp32_t              ep_c,
  output fp32_t              ep_alpha,
  output fp32_t              ep_r2,
  output logic               ep_first,
  output logic               ep_last,
  // to the T_tp FIFO
  output logic               tp_push,
  output tp_entry_t          tp_entry
);
  logic [COEF_AW-1:0] base;     // first coefficient of the current shell
  logic [7:0]         k;        // coefficient index within the shell
  logic [5:0]         atom;
  logic [9:0]         point;
  logic               go, last, end_atom, end_point;

  assign go        = busy && r2_avail && room;
  assign last      = (k == ctrl_cur.kw - 8'd1);
  assign end_atom  = (ctrl_nxt.tp == 8'd0);
  assign end_point = end_atom && (atom == n_atoms - 6'd1);

  assign coef_addr = base + COEF_AW'(k);
  assign ep_valid  = go;
  assign ep_c      = coef_c;
  assign ep_alpha  = coef_alpha;
  assign ep_r2     = r2;
  assign ep_first  = (k == 8'd0);
  assign ep_last   = last;
  assign tp_push   = go && last;
  assign tp_entry  = '{tp: ctrl_cur.tp, end_atom: end_atom, end_point: end_point};
  assign r2_pop    = go && last && end_atom;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      ctrl_addr <= '0;
      base      <= '0;
      k         <= '0;
      atom      <= '0;
      point     <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy      <= 1'b1;
        ctrl_addr <= '0;
        base      <= '0;
        k         <= '0;
        atom      <= '0;
        point     <= '0;
      end else if (go) begin
        if (!last) begin
          k <= k + 8'd1;
        end else begin
          k <= '0;
          if (end_point) begin
            ctrl_addr <= '0;
            base      <= '0;
            atom      <= '0;
            point     <= point + 10'd1;
            if (point == n_points - 10'd1) begin
              busy <= 1'b0;
              done <= 1'b1;
            end
          end else if (end_atom) begin
            ctrl_addr <= ctrl_addr + CTRL_AW'(2);
            base      <= base + COEF_AW'(ctrl_cur.kw);
            atom      <= atom + 6'd1;
          end else begin
            ctrl_addr <= ctrl_addr + CTRL_AW'(1);
            base      <= base + COEF_AW'(ctrl_cur.kw);
          end
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) go |-> ctrl_cur.kw != 8'd0)
    else $error("control2: shell with no coefficients");
endmodule
