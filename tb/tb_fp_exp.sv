// tb_fp_exp: streams random arguments through exp() and compares with the
// double precision exponential, allowing 2^-21 relative error (about four
// units in the last place of single precision). Covers the range where the
// result is a normal single precision number, tiny arguments, arguments
// where the result underflows to zero or overflows to infinity, and checks
// the four-clock latency.
module tb_fp_exp;
  import tb_dft_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic [31:0] x = 0, y;
  logic [3:0] in_tag = 0, out_tag;
  int checks = 0, failures = 0;
  real    exp_q[$];
  longint t_q[$];
  longint cyc = 0;

  fp_exp #(.TAG_W(4)) dut (.clk, .rst_n, .in_valid, .x, .in_tag, .out_valid, .y, .out_tag);

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real e, g;
      checks++;
      e = exp_q.pop_front();
      g = f2r(y);
      if (cyc - t_q.pop_front() != 4) begin
        failures++;
        $display("FAIL latency");
      end
      if (e > 3.4e38) begin
        if (y !== 32'h7F80_0000) begin failures++; $display("FAIL expected inf, got %h", y); end
      end else if (e < 1.2e-38) begin
        if (y[30:0] !== 31'd0) begin failures++; $display("FAIL expected 0, got %h", y); end
      end else if (!close(g, e, 1.0 / 2097152.0, 0.0)) begin
        failures++;
        if (failures < 10) $display("FAIL exp: got %g exp %g", g, e);
      end
    end
  end

  initial begin
    real xr;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 3) != 0;
      case (i % 5)
        0: xr = urand_real(-87.0, 88.0);
        1: xr = urand_real(-10.0, 0.0);
        2: xr = urand_real(-1.0, 1.0) * pow2(-int'($urandom % 40));
        3: xr = urand_real(-150.0, 150.0);
        default: xr = -urand_real(0.0, 30.0);
      endcase
      if (i == 0) xr = 0.0;
      x = r2f(xr);
      if (in_valid) begin
        exp_q.push_back($exp(f2r(x)));
        t_q.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (8) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
