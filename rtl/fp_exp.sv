// fp_exp: pipelined single precision exp(x), the core of the exponential
// part unit. exp(x) = 2^t with t = x*log2(e), split as t = n + f with n an
// integer and 0 <= f < 1. Then 2^f = 2^(a/256) * 2^b, where a is the top
// eight bits of f (a 256-entry table, 2^(a/256) in Q2.30, filled at
// elaboration) and b < 2^-8 the rest, for which 2^b = 1 + y + y^2/2 with
// y = b*ln2 (error below 2^-30). n becomes the exponent of the result.
//   stage 1: x to fixed point Q7.40 (|x| >= 128 and tiny |x| handled apart)
//   stage 2: multiply by log2(e), split into n and f
//   stage 3: table lookup and the second-order polynomial
//   stage 4: multiply, round to nearest even, pack
// One result per clock, latency 4. Results below the single precision normal
// range flush to zero; above it they are infinity. The document uses an exp()
// core from elsewhere and describes only its throughput; this table-plus-
// polynomial core is this design's own.
// The sign bit of y is constant 0, since exp(x) is never negative.
module fp_exp
  import dft_pkg::*;
#(
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  fp32_t            x,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output fp32_t            y,
  output logic [TAG_W-1:0] out_tag
);
  typedef logic [30:0] tbl_t [256];

  function automatic tbl_t gen_tbl();
    tbl_t t;
    for (int a = 0; a < 256; a++)
      t[a] = 31'($rtoi((2.0 ** (real'(a) / 256.0)) * 1073741824.0 + 0.5));
    return t;
  endfunction

  localparam tbl_t        TBL     = gen_tbl();
  localparam logic [41:0] LOG2E   = 42'h171_547652B8;  // log2(e) * 2^40
  localparam logic [31:0] LN2_Q32 = 32'hB172_17F8;     // ln(2) * 2^32

  typedef enum logic [1:0] {SP_NONE, SP_ONE, SP_ZERO, SP_INF} special_t;

  logic [3:0]        vld;
  logic [TAG_W-1:0]  tag1, tag2, tag3;
  special_t          sp1, sp2, sp3;

  // ---------------- stage 1: to fixed point
  logic        s1_neg;
  logic [46:0] s1_fix;
  special_t    sp_c;
  logic [46:0] fix_c;
  int          ue;

  always_comb begin
    ue    = int'(x[30:23]) - 127;
    fix_c = '0;
    sp_c  = SP_NONE;
    if (x[30:23] == 8'd0)       sp_c = SP_ONE;
    else if (ue >= 7)           sp_c = x[31] ? SP_ZERO : SP_INF;
    else if (ue < -33)          sp_c = SP_ONE;
    else if (ue + 17 >= 0)      fix_c = 47'({1'b1, x[22:0]}) << (ue + 17);
    else                        fix_c = 47'({1'b1, x[22:0]} >> (-(ue + 17)));
  end

  always_ff @(posedge clk) begin
    s1_neg <= x[31];
    s1_fix <= fix_c;
    sp1    <= sp_c;
    tag1   <= in_tag;
  end

  // ---------------- stage 2: t = x*log2(e) = n + f
  logic [88:0]        tprod;
  logic [8:0]         ti;
  logic [39:0]        tf;
  logic signed [10:0] s2_n;
  logic [39:0]        s2_f;

  always_comb begin
    tprod = s1_fix * LOG2E;     // Q.80
    ti    = tprod[88:80];
    tf    = tprod[79:40];
  end

  always_ff @(posedge clk) begin
    if (!s1_neg) begin
      s2_n <= $signed({2'b00, ti});
      s2_f <= tf;
    end else if (tf == '0) begin
      s2_n <= -$signed({2'b00, ti});
      s2_f <= '0;
    end else begin
      s2_n <= -$signed({2'b00, ti}) - 11'sd1;
      s2_f <= ~tf + 40'd1;
    end
    sp2  <= sp1;
    tag2 <= tag1;
  end

  // ---------------- stage 3: table and polynomial
  logic [63:0] yprod;
  logic [31:0] y32;
  logic [63:0] ysq;
  logic [33:0] s3_poly;
  logic [30:0] s3_tbl;
  logic signed [10:0] s3_n;

  always_comb begin
    yprod = {32'd0, s2_f[31:0]} * {32'd0, LN2_Q32};   // value * 2^-72
    y32   = 32'(yprod >> 40);                          // y * 2^32
    ysq   = {32'd0, y32} * {32'd0, y32};               // y^2 * 2^64
  end

  always_ff @(posedge clk) begin
    s3_poly <= 34'h1_0000_0000 + 34'(y32) + 34'(ysq >> 33);
    s3_tbl  <= TBL[s2_f[39:32]];
    s3_n    <= s2_n;
    sp3     <= sp2;
    tag3    <= tag2;
  end

  // ---------------- stage 4: combine and pack
  logic [64:0]        mprod;
  fp32_t              res;
  logic signed [11:0] rexp;

  always_comb begin
    mprod = {34'd0, s3_tbl} * {31'd0, s3_poly};       // value * 2^62, in [1,2)
    rexp  = 12'(s3_n) + 12'sd127;
    case (sp3)
      SP_ONE:  res = FP32_ONE;
      SP_ZERO: res = 32'd0;
      SP_INF:  res = {1'b0, 8'hFF, 23'd0};
      default: res = fp32_pack(1'b0, rexp, mprod[62:39], mprod[38], |mprod[37:0]);
    endcase
  end

  always_ff @(posedge clk) begin
    y       <= res;
    out_tag <= tag3;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[2:0], in_valid};
  end
  assign out_valid = vld[3];
endmodule
