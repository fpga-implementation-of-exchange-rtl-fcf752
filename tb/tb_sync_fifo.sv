// tb_sync_fifo: random pushes and pops (never into a full or from an empty
// FIFO) against a queue model; checks the head word, count, empty and full
// every clock, and that the FIFO reaches both full and empty.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0, empty, full;
  logic [15:0] din = 0, dout;
  logic [4:0] count;
  int checks = 0, failures = 0, saw_full = 0, saw_empty = 0;
  logic [15:0] model[$];

  sync_fifo #(.WIDTH(16), .DEPTH(16)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .empty, .full, .count);

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bias;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      checks++;
      if (count != 5'(model.size()) || empty != (model.size() == 0) ||
          full != (model.size() == 16) || (model.size() != 0 && dout != model[0])) begin
        failures++;
        if (failures < 10) $display("FAIL count %0d/%0d", count, model.size());
      end
      if (full) saw_full++;
      if (empty) saw_empty++;
      bias = ((i / 500) % 2) ? 75 : 25;
      push = (($urandom % 100) < bias) && (model.size() < 16);
      pop  = (($urandom % 100) >= bias) && (model.size() > 0);
      din  = 16'($urandom);
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
    end
    checks++;
    if (saw_full == 0 || saw_empty == 0) begin failures++; $display("FAIL full/empty not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
