// fp_f2f: IEEE-754 double to single precision converter ("f2f" in the orbital
// module). Input data arrive from the host in double precision and the
// datapath computes in single precision, so every 64-bit operand passes
// through one of these on its way into a BRAM or FIFO; a 128-bit bus word that
// holds two values uses two of them ("2xf2").
// Combinational: the memory it feeds registers the result. Rounding is to
// nearest even; subnormals flush to zero and out-of-range values become
// infinity (conventions chosen here, see dft_pkg).
module fp_f2f
  import dft_pkg::*;
(
  input  fp64_t d,
  output fp32_t f
);
  assign f = fp64_to_fp32(d);
endmodule
