// tb_facc2float: converts random accumulator values (random signs, leading
// bits anywhere in the 96-bit word) to single precision and compares with
// the double precision value of the input rounded to single, allowing one
// unit in the last place for the double rounding of the reference. Checks
// zero, exact powers of two and the one-clock latency.
module tb_facc2float;
  import tb_dft_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic [95:0] acc = 0;
  logic [31:0] y;
  int checks = 0, failures = 0;
  real exp_q[$];
  logic [31:0] exact_q[$];

  facc2float #(.ACC_W(96), .FRAC_W(56)) dut (.clk, .rst_n, .in_valid, .acc, .out_valid, .y);

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real e;
      logic [31:0] ex;
      checks++;
      e  = exp_q.pop_front();
      ex = exact_q.pop_front();
      if (ex != 32'hFFFF_FFFF) begin
        if (y !== ex) begin failures++; $display("FAIL exact: got %h exp %h", y, ex); end
      end else if (!close(f2r(y), e, 1.0 / 8388608.0, 0.0)) begin
        failures++;
        if (failures < 10) $display("FAIL got %g exp %g", f2r(y), e);
      end
    end
  end

  initial begin
    logic [95:0] v;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      v = {$urandom, $urandom, $urandom};
      v = v >> ($urandom % 96);
      if ($urandom % 2) v = ~v + 1'b1;
      case (i)
        0: v = '0;
        1: v = 96'd1 << 56;                 // 1.0
        2: v = -(96'd3 << 55);              // -1.5
        default: ;
      endcase
      acc      = v;
      in_valid = 1;
      exp_q.push_back(fix2r(v, 56));
      exact_q.push_back(i == 0 ? 32'h0 : i == 1 ? 32'h3F80_0000 : i == 2 ? 32'hBFC0_0000
                                       : 32'hFFFF_FFFF);
    end
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
