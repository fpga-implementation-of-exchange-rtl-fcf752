// fp_mul: pipelined IEEE-754 single precision multiplier (FMUL).
// Stage 1 forms the 48-bit significand product, the exponent sum and the
// special cases; stage 2 normalises, rounds to nearest even and packs.
// One product per clock, latency 2. The valid bit travels with the data;
// 'tag' carries any side information the caller needs aligned with the result.
// Subnormals flush to zero (a choice of this design).
module fp_mul
  import dft_pkg::*;
#(
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  fp32_t            a,
  input  fp32_t            b,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output fp32_t            y,
  output logic [TAG_W-1:0] out_tag
);
  // stage 1
  logic               s1_valid, s1_sign, s1_zero, s1_inf;
  logic [47:0]        s1_prod;
  logic signed [11:0] s1_exp;
  logic [TAG_W-1:0]   s1_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      s1_valid  <= in_valid;
      out_valid <= s1_valid;
    end
  end

  always_ff @(posedge clk) begin
    s1_sign <= a[31] ^ b[31];
    s1_zero <= (a[30:23] == 8'd0) || (b[30:23] == 8'd0);
    s1_inf  <= (a[30:23] == 8'hFF) || (b[30:23] == 8'hFF);
    s1_prod <= {1'b1, a[22:0]} * {1'b1, b[22:0]};
    s1_exp  <= $signed({4'd0, a[30:23]}) + $signed({4'd0, b[30:23]}) - 12'sd127;
    s1_tag  <= in_tag;
  end

  // stage 2
  always_ff @(posedge clk) begin
    out_tag <= s1_tag;
    if (s1_zero)           y <= {s1_sign, 31'd0};
    else if (s1_inf)       y <= {s1_sign, 8'hFF, 23'd0};
    else if (s1_prod[47])  y <= fp32_pack(s1_sign, s1_exp + 12'sd1, s1_prod[47:24],
                                          s1_prod[23], |s1_prod[22:0]);
    else                   y <= fp32_pack(s1_sign, s1_exp, s1_prod[46:23],
                                          s1_prod[22], |s1_prod[21:0]);
  end
endmodule
