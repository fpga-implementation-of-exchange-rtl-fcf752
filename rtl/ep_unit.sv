// ep_unit: exponential part of a contracted Gaussian orbital,
//   ep = sum_i C_i * exp(-alpha_i * r^2)        (one value per shell)
// Control 2 feeds one (C_i, alpha_i) pair per clock together with the r^2 of
// the current atom-centred point; 'first' marks the first pair of a shell and
// 'last' its final one. The unit is fully pipelined: alpha*r^2 (fp_mul,
// 2 clocks), sign flip and exp (fp_exp, 4 clocks), times C (fp_mul, 2 clocks),
// then a single-cycle single precision accumulator. 'ep_valid' pulses with
// the sum 9 clocks after the 'last' pair. The structure of the unit follows
// the document's formula; the pipeline split and the single-cycle adder are
// this design's choices. Any normalisation constant is expected folded into
// C_i by the host.
module ep_unit
  import dft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t c,
  input  fp32_t alpha,
  input  fp32_t r2,
  input  logic  first,
  input  logic  last,
  output logic  ep_valid,
  output fp32_t ep
);
  typedef struct packed {
    fp32_t c;
    logic  first;
    logic  last;
  } tag_t;

  tag_t  t_in, t_m1, t_ex;
  logic  v_m1, v_ex, v_m2;
  fp32_t ar2, ex, term;
  logic [1:0] fl_m2;

  assign t_in = '{c: c, first: first, last: last};

  fp_mul #(.TAG_W($bits(tag_t))) u_mul_ar2 (
    .clk, .rst_n, .in_valid(in_valid), .a(alpha), .b(r2), .in_tag(t_in),
    .out_valid(v_m1), .y(ar2), .out_tag(t_m1));

  fp_exp #(.TAG_W($bits(tag_t))) u_exp (
    .clk, .rst_n, .in_valid(v_m1), .x({~ar2[31], ar2[30:0]}), .in_tag(t_m1),
    .out_valid(v_ex), .y(ex), .out_tag(t_ex));

  fp_mul #(.TAG_W(2)) u_mul_c (
    .clk, .rst_n, .in_valid(v_ex), .a(ex), .b(t_ex.c), .in_tag({t_ex.first, t_ex.last}),
    .out_valid(v_m2), .y(term), .out_tag(fl_m2));

  // accumulator: fl_m2 = {first, last}
  fp32_t acc, acc_next;
  assign acc_next = fl_m2[1] ? term : fp32_add_f(acc, term);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      ep_valid <= 1'b0;
      ep       <= '0;
    end else begin
      ep_valid <= v_m2 && fl_m2[0];
      if (v_m2) begin
        acc <= acc_next;
        if (fl_m2[0]) ep <= acc_next;
      end
    end
  end
endmodule
