// rasc_sram_model: behavioural model of the accelerator's SRAM read port, as
// the testbenches see it. The board memory itself is off-chip and outside
// the design. A request (req && gnt) returns its 128-bit word in order after
// a random latency of MIN_LAT..MAX_LAT clocks; 'gnt' drops at random
// (GNT_PCT percent of the time high) to exercise the requester's waiting.
// The contents are written directly into 'mem' by the testbench.
module rasc_sram_model #(
  parameter int unsigned DEPTH   = 65536,
  parameter int unsigned MIN_LAT = 2,
  parameter int unsigned MAX_LAT = 8,
  parameter int unsigned GNT_PCT = 80
) (
  input  logic         clk,
  input  logic         req,
  input  logic [23:0]  addr,
  output logic         gnt,
  output logic         rvalid,
  output logic [127:0] rdata
);
  logic [127:0] mem [DEPTH];
  longint       due_q[$];
  logic [127:0] data_q[$];
  longint       cyc = 0;
  longint       last_due = 0;

  initial begin
    gnt    = 1'b0;
    rvalid = 1'b0;
    rdata  = '0;
  end

  always @(posedge clk) begin
    longint due;
    cyc <= cyc + 1;
    if (req && gnt) begin
      due = cyc + MIN_LAT + ($urandom % (MAX_LAT - MIN_LAT + 1));
      if (due <= last_due) due = last_due + 1;
      last_due = due;
      due_q.push_back(due);
      data_q.push_back(mem[addr % DEPTH]);
    end
    if (due_q.size() != 0 && due_q[0] <= cyc) begin
      rvalid <= 1'b1;
      rdata  <= data_q.pop_front();
      void'(due_q.pop_front());
    end else begin
      rvalid <= 1'b0;
    end
    gnt <= ($urandom % 100) < GNT_PCT;
  end
endmodule
