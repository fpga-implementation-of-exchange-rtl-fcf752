// tb_fp_mul: streams random operand pairs into the multiplier, one per clock
// with random gaps, and compares every product bit for bit with the double
// precision product (exact for single precision inputs) rounded to single.
// Also checks the two-clock latency through the valid bit, the tag, zero and
// overflow.
module tb_fp_mul;
  import tb_dft_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic [31:0] a = 0, b = 0, y;
  logic [7:0] in_tag = 0, out_tag;
  int checks = 0, failures = 0;
  logic [31:0] exp_q[$];
  logic [7:0]  tag_q[$];
  longint      t_q[$];
  longint      cyc = 0;

  fp_mul #(.TAG_W(8)) dut (.clk, .rst_n, .in_valid, .a, .b, .in_tag, .out_valid, .y, .out_tag);

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rnd_fp(input int span);
    return r2f(urand_real(-1.0, 1.0) * pow2(int'($urandom % (2 * span)) - span));
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        if (y !== exp_q[0] || out_tag !== tag_q[0] || cyc - t_q[0] != 2) begin
          failures++;
          if (failures < 10)
            $display("FAIL got %h exp %h tag %h/%h lat %0d", y, exp_q[0], out_tag, tag_q[0],
                     cyc - t_q[0]);
        end
        void'(exp_q.pop_front()); void'(tag_q.pop_front()); void'(t_q.pop_front());
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      case (i)
        0: begin a = 32'h0; b = 32'h3F80_0000; end
        1: begin a = 32'h7F00_0000; b = 32'h4100_0000; end   // overflow
        2: begin a = 32'h0180_0000; b = 32'h0180_0000; end   // underflow
        default: begin a = rnd_fp(60); b = rnd_fp(60); end
      endcase
      if (i < 3) in_valid = 1;
      in_tag = 8'($urandom);
      if (in_valid) begin
        exp_q.push_back(r2f(f2r(a) * f2r(b)));
        tag_q.push_back(in_tag);
        t_q.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
