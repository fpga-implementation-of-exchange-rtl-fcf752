// facc: floating-point accumulator with a wide fixed-point internal register
// (FACC of the S matrix module). Each fp32 input is converted to a signed
// fixed-point number with FRAC_W fractional bits and added exactly, so the
// sum of the many small terms of Tr(S*Delta) does not depend on their order
// and suffers no rounding until facc2float converts it back.
// Stage 1 converts (magnitude bits below 2^-FRAC_W are truncated, values too
// large for the register saturate); stage 2 adds. 'first' starts a new sum
// with this input, 'last' marks the final term: 'sum_valid' pulses with the
// complete sum two clocks after the 'last' input. One input per clock.
// The widths are this design's choice; the document gives none.
module facc
  import dft_pkg::*;
#(
  parameter int unsigned ACC_W  = 96,
  parameter int unsigned FRAC_W = 56
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             first,
  input  logic             last,
  input  fp32_t            x,
  output logic             sum_valid,
  output logic [ACC_W-1:0] sum
);
  logic             s1_valid, s1_first, s1_last;
  logic [ACC_W-1:0] s1_fix, fix_c, mag;
  logic [ACC_W-1:0] acc;
  int               sh;

  // exponent e: value = 1.m * 2^(e-127) = mant * 2^(e-150); fixed = mant << (e-150+FRAC_W)
  always_comb begin
    sh    = int'(x[30:23]) - 150 + int'(FRAC_W);
    mag   = '0;
    if (x[30:23] == 8'd0)             mag = '0;
    else if (sh > int'(ACC_W) - 25)   mag = {1'b0, {(ACC_W-1){1'b1}}};
    else if (sh >= 0)                 mag = ACC_W'({1'b1, x[22:0]}) << sh;
    else if (sh > -24)                mag = ACC_W'({1'b1, x[22:0]} >> (-sh));
    fix_c = x[31] ? (~mag + 1'b1) : mag;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      sum_valid <= 1'b0;
      acc       <= '0;
    end else begin
      s1_valid  <= in_valid;
      sum_valid <= s1_valid && s1_last;
      if (s1_valid) acc <= s1_first ? s1_fix : acc + s1_fix;
    end
  end

  always_ff @(posedge clk) begin
    s1_fix   <= fix_c;
    s1_first <= first;
    s1_last  <= last;
  end

  assign sum = acc;
endmodule
