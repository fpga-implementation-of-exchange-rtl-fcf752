// facc2float: converts the two's-complement fixed-point accumulator format of
// facc (ACC_W bits, FRAC_W of them fractional) to IEEE-754 single precision
// ("Facc 2float" in the S matrix module). It finds the leading one of the
// magnitude, shifts it to the top, rounds to nearest even and builds the
// exponent from the shift. One register stage: latency 1, one value per clock.
module facc2float
  import dft_pkg::*;
#(
  parameter int unsigned ACC_W  = 96,
  parameter int unsigned FRAC_W = 56
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [ACC_W-1:0] acc,
  output logic             out_valid,
  output fp32_t            y
);
  logic               sign;
  logic [ACC_W-1:0]   mag, norm;
  int                 lz;
  fp32_t              res;
  logic signed [11:0] e;

  always_comb begin
    sign = acc[ACC_W-1];
    mag  = sign ? (~acc + 1'b1) : acc;
    lz   = 0;
    for (int i = ACC_W - 1; i >= 0; i--) begin
      if (mag[i]) break;
      lz++;
    end
    norm = mag << lz;
    e    = 12'(ACC_W - 1 - lz) - 12'(FRAC_W) + 12'sd127;
    if (mag == '0) res = 32'd0;
    else           res = fp32_pack(sign, e, norm[ACC_W-1 -: 24], norm[ACC_W-25],
                                   |norm[ACC_W-26:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) y <= res;
endmodule
