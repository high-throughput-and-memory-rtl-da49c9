// shuffle_network: the fixed wiring between the P VPUs and the C rings of P
// CPUs.
//
// For a shift LDPC code the ones of sub-matrix (r, j) are those of the
// leftmost sub-matrix of block row r moved up by j rows. VPU x therefore
// meets block row r at row perm(r,x) - j in step j, and CPU perm(r,x) of
// ring r, which works on row k-j in step j, is the one that needs its
// message for the whole decoding: the network is just M = C*P bundles of b
// wires with no switching. perm() is defined in ldpc_pkg.
//
// Return path: the check-to-variable message for VPU x in ring r comes from
// CPU perm(r,x)+T (mod P), whose part 2 reads the old record that has moved T
// positions along the ring since the row was at CPU perm(r,x). The sign of
// VPU x's message is wired to the same CPU's sign FIFO so that the FIFO sign
// and the old record belong to the same edge.
//
// Purely combinational wiring; this is the whole of the interconnect.
module shuffle_network
  import ldpc_pkg::*;
#(
  parameter int unsigned P = 256,
  parameter int unsigned C = 4,
  parameter int unsigned T = 32
) (
  input  msg_t vpu_l    [P][C],  // VPU x, block row r: variable-to-check
  input  msg_t cpu_r    [C][P],  // ring r, CPU k: check-to-variable
  output msg_t cpu_l    [C][P],  // ring r, CPU k: variable-to-check input
  output logic cpu_sign [C][P],  // ring r, CPU k: sign FIFO input
  output msg_t vpu_r    [P][C]   // VPU x, block row r: check-to-variable
);
  for (genvar r = 0; r < C; r++) begin : g_row
    for (genvar x = 0; x < P; x++) begin : g_col
      localparam int unsigned FWD = perm(r, x, P);
      localparam int unsigned RET = (FWD + T) % P;
      assign cpu_l[r][FWD]    = vpu_l[x][r];
      assign cpu_sign[r][RET] = vpu_l[x][r].sgn;
      assign vpu_r[x][r]      = cpu_r[r][RET];
    end
  end
endmodule
