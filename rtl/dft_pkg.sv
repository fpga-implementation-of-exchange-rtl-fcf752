// dft_pkg: types, constants and floating-point helper functions shared by the
// exchange-correlation accelerator.
//
// Number formats. The host sends IEEE-754 double precision values; the
// datapath works in IEEE-754 single precision (fp32). The helpers below are
// combinational and are registered by the modules that use them. They follow
// these conventions, chosen for this design: round to nearest, ties to even;
// subnormal inputs and results are flushed to (signed) zero; overflow gives
// infinity; NaN is not propagated specially (an infinite or NaN operand gives
// an infinite result).
//
// Control data. T_kw_tp_a is a byte stream of (kw, tp) pairs: kw is the number
// of contracted Gaussian coefficients (C_i, alpha_i) of a shell and tp the
// shell type (1 = s, 2 = p, 3 = d, 4 = f). A pair (0, 0) ends an atom. Four
// pairs travel in the lower 64 bits of a 128-bit bus word, the first pair in
// the lowest 16 bits with kw in its lower byte.
package dft_pkg;

  typedef logic [31:0]  fp32_t;
  typedef logic [63:0]  fp64_t;
  typedef logic [127:0] bus_word_t;

  localparam fp32_t FP32_ONE = 32'h3F80_0000;

  typedef enum logic [7:0] {
    TP_END = 8'd0,
    TP_S   = 8'd1,
    TP_P   = 8'd2,
    TP_D   = 8'd3,
    TP_F   = 8'd4
  } shell_t;

  // One (kw, tp) control pair as stored in BRAM_1.
  typedef struct packed {
    logic [7:0] tp;
    logic [7:0] kw;
  } kwtp_t;

  // Entry of the T_tp FIFO between Control 2 and the polynomial unit.
  typedef struct packed {
    logic [7:0] tp;         // shell type
    logic       end_atom;   // last shell of the atom: coordinates advance
    logic       end_point;  // last shell of the grid point
  } tp_entry_t;

  // A vector in the accelerator's SRAM: first 128-bit word and word count.
  typedef struct packed {
    logic [23:0] base;
    logic [23:0] words;
  } region_t;

  // Where the host placed the serialized input vectors (Fig. 4/5 formats),
  // and how often the Delta vector is streamed (once per group of points the
  // S matrix module processes in parallel).
  typedef struct packed {
    region_t    alpha_c;    // T_alpha_C: {alpha_i, C_i} per word
    region_t    kw_tp_a;    // T_kw_tp_a: four (kw, tp) pairs per word
    region_t    rx_ry;      // T_rx_ry:   {r_y, r_x} per word
    region_t    rz;         // T_rz:      two r_z per word
    region_t    r2;         // T_r2:      two r^2 per word
    region_t    delta;      // Delta:     two elements per word
    logic [7:0] delta_passes;
  } load_cfg_t;

  // Destination of a word returned by the SRAM, kept by the request tracker.
  typedef enum logic [2:0] {
    DST_BRAM0 = 3'd0,   // T_alpha_C
    DST_BRAM1 = 3'd1,   // T_kw_tp_a
    DST_FIFO0 = 3'd4,   // T_rx_ry
    DST_FIFO1 = 3'd5,   // T_rz
    DST_FIFO2 = 3'd6,   // T_r2
    DST_FIFO3 = 3'd7    // Delta
  } dest_t;

  // Number of Cartesian orbitals of a shell type: s 1, p 3, d 6, f 10.
  function automatic logic [3:0] shell_orbitals(input logic [7:0] tp);
    case (tp)
      8'd1:    return 4'd1;
      8'd2:    return 4'd3;
      8'd3:    return 4'd6;
      8'd4:    return 4'd10;
      default: return 4'd0;
    endcase
  endfunction

  // Round a 24-bit significand (hidden bit included) with guard and sticky,
  // then pack. exp is the biased exponent before rounding.
  function automatic fp32_t fp32_pack(input logic sign, input logic signed [11:0] exp,
                                      input logic [23:0] mant, input logic guard,
                                      input logic sticky);
    logic [24:0] m;
    logic signed [11:0] e;
    m = {1'b0, mant} + 25'((guard & (sticky | mant[0])) ? 1 : 0);
    e = exp;
    if (m[24]) begin
      m = m >> 1;
      e = e + 12'sd1;
    end
    if (e >= 12'sd255)     return {sign, 8'hFF, 23'd0};
    else if (e <= 12'sd0)  return {sign, 31'd0};
    else                   return {sign, e[7:0], m[22:0]};
  endfunction

  // Double to single conversion.
  function automatic fp32_t fp64_to_fp32(input fp64_t d);
    logic signed [11:0] e;
    if (d[62:52] == 11'd0)         return {d[63], 31'd0};
    else if (d[62:52] == 11'h7FF)  return {d[63], 8'hFF, 23'd0};
    e = $signed({1'b0, d[62:52]}) - 12'sd896;   // 1023 - 127
    return fp32_pack(d[63], e, {1'b1, d[51:29]}, d[28], |d[27:0]);
  endfunction

  // Single precision multiply.
  function automatic fp32_t fp32_mul_f(input fp32_t a, input fp32_t b);
    logic               s;
    logic [47:0]        p;
    logic signed [11:0] e;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0)  return {s, 31'd0};
    if (a[30:23] == 8'hFF || b[30:23] == 8'hFF) return {s, 8'hFF, 23'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = $signed({4'd0, a[30:23]}) + $signed({4'd0, b[30:23]}) - 12'sd127;
    if (p[47]) return fp32_pack(s, e + 12'sd1, p[47:24], p[23], |p[22:0]);
    else       return fp32_pack(s, e, p[46:23], p[22], |p[21:0]);
  endfunction

  // Single precision add.
  function automatic fp32_t fp32_add_f(input fp32_t a, input fp32_t b);
    fp32_t              hi_op, lo_op;
    logic [7:0]         d;
    logic [26:0]        mb, ms;    // 1.m, guard, round, sticky
    logic [27:0]        sum;
    logic signed [11:0] e;
    int                 lz;
    if (a[30:23] == 8'd0) return b;
    if (b[30:23] == 8'd0) return a;
    if (a[30:23] == 8'hFF || b[30:23] == 8'hFF)
      return (a[30:23] == 8'hFF) ? {a[31], 8'hFF, 23'd0} : {b[31], 8'hFF, 23'd0};
    if (a[30:0] >= b[30:0]) begin hi_op = a; lo_op = b; end
    else                    begin hi_op = b; lo_op = a; end
    d  = hi_op[30:23] - lo_op[30:23];
    mb = {1'b1, hi_op[22:0], 3'b000};
    ms = {1'b1, lo_op[22:0], 3'b000};
    if (d > 8'd26) ms = 27'd1;
    else if (d != 8'd0) ms = (ms >> d) | 27'((ms & ((27'd1 << d) - 27'd1)) != 27'd0);
    e = $signed({4'd0, hi_op[30:23]});
    if (hi_op[31] == lo_op[31]) begin
      sum = {1'b0, mb} + {1'b0, ms};
      if (sum[27]) begin
        sum = {1'b0, sum[27:1]} | 28'(sum[0]);
        e   = e + 12'sd1;
      end
    end else begin
      sum = {1'b0, mb} - {1'b0, ms};
      if (sum == 28'd0) return 32'd0;
      lz = 0;
      for (int i = 26; i >= 0; i--) begin
        if (sum[i]) break;
        lz++;
      end
      sum = sum << lz;
      e   = e - 12'(lz);
    end
    return fp32_pack(hi_op[31], e, sum[26:3], sum[2], |sum[1:0]);
  endfunction

endpackage
