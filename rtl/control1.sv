// control1: data dispatcher and request tracker of the orbital module
// ("Control 1"). All input vectors sit in the accelerator's SRAM and reach
// the on-chip memories over one shared 128-bit read bus, so this block
// decides which memory is fed next and remembers, for every read still
// outstanding, where its data must go.
//
// Sequence: after 'start' it first copies the whole T_alpha_C vector into
// BRAM_0 and waits until every word has arrived, then does the same for
// T_kw_tp_a into BRAM_1. From then on it streams the four FIFOs: FIFO_0
// (r_x, r_y), FIFO_1 (r_z), FIFO_2 (r^2) and FIFO_3 (Delta, re-read
// 'delta_passes' times). A FIFO requests data when its fill level plus the
// words already on their way leaves room for a burst of BURST words; the
// requests are served one burst at a time, FIFO_3 first, down to FIFO_0.
// When every word has been requested and has arrived, 'done' pulses.
//
// SRAM port: a read is issued when mem_req and mem_gnt are both high;
// read data return in request order with mem_rvalid, after any latency. A
// FIFO of destination tags (MAX_OUT deep) matches returns to requests and
// steers each word to its memory via the *_we / fifo_push strobes, with the
// word itself on 'wr_data'.
// The load order, the wait for the BRAM writes and the four FIFO request
// paths follow the document's state diagram; burst length, thresholds and
// the priority order are this design's choices.
// wr_data is mem_rdata itself: the returned word goes straight onto the
// shared write bus and only the strobes are decoded here.
module control1
  import dft_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned BURST      = 16,
  parameter int unsigned MAX_OUT    = 32,
  parameter int unsigned COEF_AW    = 11,
  parameter int unsigned KW_AW      = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  load_cfg_t           cfg,
  output logic                busy,
  output logic                done,
  // SRAM read port
  output logic                mem_req,
  output logic [23:0]         mem_addr,
  input  logic                mem_gnt,
  input  logic                mem_rvalid,
  input  bus_word_t           mem_rdata,
  // fill levels of FIFO_0..FIFO_3
  input  logic [3:0][$clog2(FIFO_DEPTH):0] fifo_count,
  // write side
  output bus_word_t           wr_data,
  output logic                bram0_we,
  output logic [COEF_AW-1:0]  bram0_addr,
  output logic                bram1_we,
  output logic [KW_AW-1:0]    bram1_addr,
  output logic [3:0]          fifo_push,
  // activity, for monitoring
  output logic [3:0]          fifo_burst
);
  typedef enum logic [2:0] {
    S_IDLE, S_LOAD_AC, S_WAIT_AC, S_LOAD_KW, S_WAIT_KW, S_STREAM, S_BURST, S_WAIT_ALL
  } state_t;

  localparam int unsigned OW = $clog2(MAX_OUT) + 1;
  localparam int unsigned FW = $clog2(FIFO_DEPTH) + 1;

  state_t        state;
  logic [23:0]   idx;                // words issued of the current vector
  logic [31:0]   remain [4];         // words still to request per FIFO
  logic [23:0]   offs   [4];         // next word offset within each vector
  logic [FW-1:0] inflight [4];       // requested, not yet written, per FIFO
  logic [1:0]    cur;                // FIFO being served
  logic [$clog2(BURST+1)-1:0] bcnt;
  logic [OW-1:0] outstanding;
  logic          issue, tag_full, tag_empty;
  dest_t         issue_dest, ret_dest;
  logic [3:0]    want;
  region_t       fregion [4];

  assign fregion[0] = cfg.rx_ry;
  assign fregion[1] = cfg.rz;
  assign fregion[2] = cfg.r2;
  assign fregion[3] = cfg.delta;

  always_comb begin
    for (int f = 0; f < 4; f++)
      want[f] = (remain[f] != 0) &&
                (32'(fifo_count[f]) + 32'(inflight[f]) + BURST <= FIFO_DEPTH);
  end

  // ---------------- request side
  always_comb begin
    mem_req    = 1'b0;
    mem_addr   = '0;
    issue_dest = DST_BRAM0;
    case (state)
      S_LOAD_AC: begin
        mem_req    = !tag_full;
        mem_addr   = cfg.alpha_c.base + idx;
        issue_dest = DST_BRAM0;
      end
      S_LOAD_KW: begin
        mem_req    = !tag_full;
        mem_addr   = cfg.kw_tp_a.base + idx;
        issue_dest = DST_BRAM1;
      end
      S_BURST: begin
        mem_req    = !tag_full;
        mem_addr   = fregion[cur].base + offs[cur];
        issue_dest = dest_t'({1'b1, cur});
      end
      default: ;
    endcase
  end
  assign issue = mem_req && mem_gnt;

  logic all_requested;
  assign all_requested = (remain[0] == 0) && (remain[1] == 0) &&
                         (remain[2] == 0) && (remain[3] == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      idx   <= '0;
      cur   <= '0;
      bcnt  <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      fifo_burst <= '0;
      for (int f = 0; f < 4; f++) begin
        remain[f] <= '0;
        offs[f]   <= '0;
      end
    end else begin
      done       <= 1'b0;
      fifo_burst <= '0;
      case (state)
        S_IDLE: if (start) begin
          busy  <= 1'b1;
          idx   <= '0;
          state <= (cfg.alpha_c.words != 0) ? S_LOAD_AC : S_WAIT_AC;
          for (int f = 0; f < 3; f++) begin
            remain[f] <= 32'(fregion[f].words);
            offs[f]   <= '0;
          end
          remain[3] <= 32'(cfg.delta.words) * 32'(cfg.delta_passes);
          offs[3]   <= '0;
        end
        S_LOAD_AC: if (issue) begin
          idx <= idx + 24'd1;
          if (idx == cfg.alpha_c.words - 24'd1) state <= S_WAIT_AC;
        end
        S_WAIT_AC: if (outstanding == '0) begin         // BRAM_0 write done
          idx   <= '0;
          state <= (cfg.kw_tp_a.words != 0) ? S_LOAD_KW : S_WAIT_KW;
        end
        S_LOAD_KW: if (issue) begin
          idx <= idx + 24'd1;
          if (idx == cfg.kw_tp_a.words - 24'd1) state <= S_WAIT_KW;
        end
        S_WAIT_KW: if (outstanding == '0) state <= S_STREAM;   // BRAM_1 write done
        S_STREAM: begin
          if (all_requested) state <= S_WAIT_ALL;
          else begin
            for (int f = 0; f < 4; f++) begin
              if (want[f]) begin
                cur   <= 2'(f);
                state <= S_BURST;
              end
            end
            bcnt <= '0;
            fifo_burst <= want[3] ? 4'b1000 : want[2] ? 4'b0100 :
                          want[1] ? 4'b0010 : want[0] ? 4'b0001 : 4'b0000;
          end
        end
        S_BURST: if (issue) begin
          remain[cur] <= remain[cur] - 32'd1;
          offs[cur]   <= (offs[cur] == fregion[cur].words - 24'd1) ? 24'd0 : offs[cur] + 24'd1;
          bcnt        <= bcnt + 1'b1;
          if (remain[cur] == 32'd1 || 32'(bcnt) == BURST - 1) state <= S_STREAM;
        end
        S_WAIT_ALL: if (outstanding == '0) begin         // all data written
          busy  <= 1'b0;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- return side: request tracking
  logic [2:0] tag_dout;
  logic [OW-1:0] tag_count;

  sync_fifo #(.WIDTH(3), .DEPTH(MAX_OUT)) u_tags (
    .clk, .rst_n, .push(issue), .din(issue_dest), .pop(mem_rvalid),
    .dout(tag_dout), .empty(tag_empty), .full(tag_full), .count(tag_count));

  assign outstanding = tag_count;
  assign ret_dest    = dest_t'(tag_dout);
  assign wr_data     = mem_rdata;
  assign bram0_we    = mem_rvalid && ret_dest == DST_BRAM0;
  assign bram1_we    = mem_rvalid && ret_dest == DST_BRAM1;
  always_comb begin
    for (int f = 0; f < 4; f++)
      fifo_push[f] = mem_rvalid && (ret_dest == dest_t'({1'b1, 2'(f)}));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bram0_addr <= '0;
      bram1_addr <= '0;
      for (int f = 0; f < 4; f++) inflight[f] <= '0;
    end else begin
      if (start && state == S_IDLE) begin
        bram0_addr <= '0;
        bram1_addr <= '0;
      end else begin
        if (bram0_we) bram0_addr <= bram0_addr + 1'b1;
        if (bram1_we) bram1_addr <= bram1_addr + 1'b1;
      end
      for (int f = 0; f < 4; f++)
        inflight[f] <= inflight[f]
                       + FW'(issue && state == S_BURST && cur == 2'(f))
                       - FW'(fifo_push[f]);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) mem_rvalid |-> !tag_empty)
    else $error("control1: read data with no outstanding request");
endmodule
