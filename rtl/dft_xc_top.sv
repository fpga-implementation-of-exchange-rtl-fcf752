// dft_xc_top: accelerator for the grid part of the exchange-correlation
// potential in density functional theory. For a block of grid points it
// evaluates every Gaussian-type atomic orbital at every point (orbital
// module) and from those the electron density
//   rho(P) = Tr(S(P) * Delta),   S_ij(P) = chi_i(P) chi_j(P)
// (S matrix generator). The host turns rho into the potential and folds it
// back into the exchange-correlation matrix; that part is not in hardware.
//
// Data flow: the host leaves the serialized input vectors (basis
// coefficients, control list, atom-centred coordinates, r^2 and the density
// matrix Delta) in the accelerator SRAM and sets 'cfg'; a 'start' pulse
// loads the basis into on-chip memory and streams the rest. The orbital
// module hands each point's orbital vector to the S matrix generator, which
// also receives Delta from the orbital module's FIFO_3, and the densities
// leave through rho_* in point order (one per point, valid/ready).
// 'load_done' pulses when all input data has been read, 'calc_done' when the
// last point's orbitals have been issued, and smat_busy stays high while
// the S matrix generator still holds points of the block. fifo_burst, swap and orb_stall are
// activity strobes for monitoring.
// The split into these two modules and their connection follow the
// document; the start/done handshake and the port formats are this design's.
module dft_xc_top
  import dft_pkg::*;
#(
  parameter int unsigned NUM_TR_CALC = 16,
  parameter int unsigned MAX_ORB     = 512,
  parameter int unsigned FIFO_DEPTH  = 512,
  parameter int unsigned COEF_DEPTH  = 2048,
  parameter int unsigned KW_WORDS    = 256
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  load_cfg_t  cfg,
  input  logic [5:0] n_atoms,
  input  logic [9:0] n_points,
  output logic       load_done,
  output logic       calc_done,
  // SRAM read port
  output logic       mem_req,
  output logic [23:0] mem_addr,
  input  logic       mem_gnt,
  input  logic       mem_rvalid,
  input  bus_word_t  mem_rdata,
  // densities
  output logic       rho_valid,
  output fp32_t      rho,
  input  logic       rho_ready,
  // monitoring
  output logic [3:0] fifo_burst,
  output logic       swap,
  output logic       orb_stall,
  output logic       smat_busy
);
  logic      orb_valid, orb_end_point, orb_ready;
  fp32_t     orb_value;
  logic      delta_valid, delta_pop;
  bus_word_t delta_word;

  orbital_module #(.FIFO_DEPTH(FIFO_DEPTH), .COEF_DEPTH(COEF_DEPTH), .KW_WORDS(KW_WORDS))
  u_orbital (
    .clk, .rst_n, .start, .cfg, .n_atoms, .n_points, .load_done, .calc_done,
    .mem_req, .mem_addr, .mem_gnt, .mem_rvalid, .mem_rdata,
    .orb_valid, .orb_value, .orb_end_point, .orb_ready,
    .delta_valid, .delta_word, .delta_pop, .fifo_burst);

  smat_gen #(.NUM_TR_CALC(NUM_TR_CALC), .MAX_ORB(MAX_ORB)) u_smat (
    .clk, .rst_n, .start, .n_points,
    .chi_valid(orb_valid), .chi(orb_value), .chi_end_point(orb_end_point),
    .chi_ready(orb_ready),
    .delta_valid, .delta_word, .delta_pop,
    .rho_valid, .rho, .rho_ready, .swap, .busy(smat_busy));

  assign orb_stall = orb_valid && !orb_ready;
endmodule
