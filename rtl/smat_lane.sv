// smat_lane: one thread of the S matrix generator. For the grid point whose
// orbital vector chi sits in this lane's buffers it forms, term by term,
//   S_ij * Delta'_ij = chi_i * chi_j * Delta'_ij
// over the upper triangle i <= j, and accumulates the terms into
// rho = Tr(S * Delta). Delta'_ij is the broadcast Delta element, already
// doubled for i != j by the caller, which is how the symmetric matrices let
// the module do only half of the products.
// Pipeline: input registers (REG, REG), FMUL chi_i*chi_j (2 clocks), FMUL by
// Delta (2 clocks), FACC (2 clocks): one term per clock, 'sum_valid' pulses
// 7 clocks after the term flagged 'last'. The Delta element enters with the
// chi values and travels with them to the second multiplier.
// The stage sequence is the document's; the latencies are this design's.
module smat_lane
  import dft_pkg::*;
#(
  parameter int unsigned ACC_W  = 96,
  parameter int unsigned FRAC_W = 56
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  fp32_t            chi_i,
  input  fp32_t            chi_j,
  input  fp32_t            delta,
  input  logic             first,
  input  logic             last,
  output logic             sum_valid,
  output logic [ACC_W-1:0] sum
);
  typedef struct packed {
    fp32_t delta;
    logic  first;
    logic  last;
  } tag_t;

  logic  r_valid;
  fp32_t r_chi_i, r_chi_j;
  tag_t  r_tag, m1_tag;
  logic  m1_valid, m2_valid;
  fp32_t s_ij, term;
  logic [1:0] m2_fl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r_valid <= 1'b0;
    else        r_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    r_chi_i <= chi_i;
    r_chi_j <= chi_j;
    r_tag   <= '{delta: delta, first: first, last: last};
  end

  fp_mul #(.TAG_W($bits(tag_t))) u_fmul_s (
    .clk, .rst_n, .in_valid(r_valid), .a(r_chi_i), .b(r_chi_j), .in_tag(r_tag),
    .out_valid(m1_valid), .y(s_ij), .out_tag(m1_tag));

  fp_mul #(.TAG_W(2)) u_fmul_d (
    .clk, .rst_n, .in_valid(m1_valid), .a(s_ij), .b(m1_tag.delta),
    .in_tag({m1_tag.first, m1_tag.last}),
    .out_valid(m2_valid), .y(term), .out_tag(m2_fl));

  facc #(.ACC_W(ACC_W), .FRAC_W(FRAC_W)) u_facc (
    .clk, .rst_n, .in_valid(m2_valid), .first(m2_fl[1]), .last(m2_fl[0]), .x(term),
    .sum_valid, .sum);
endmodule
