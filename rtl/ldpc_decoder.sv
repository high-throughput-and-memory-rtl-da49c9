// ldpc_decoder: high-throughput, memory-efficient min-sum decoder for a
// regular (c,t) shift LDPC code of length N = t*P with M = c*P checks.
//
// P variable node processors (VPU) and M check node processors (CPU, in C
// rings of P) decode one whole iteration in t clock cycles. In step j all
// VPUs process the P columns of block column j; each VPU sends one message
// to one CPU in every block row, over fixed wires (shuffle_network). Each CPU
// performs one min-sum step of a check row and passes the row's record to
// the next CPU of its ring, so that every CPU always receives messages from
// the same VPU while the check rows move past it. Per check row only a
// 12-bit record (min, 2nd min, index, sign XOR) is kept for each of the
// current and the previous iteration, plus a t-bit FIFO of the message
// signs: (12*2 + t) bits per row instead of c*t... per-edge messages.
//
// Interface:
//   in_valid/in_ready, in_llr[P]: one block column of 4-bit sign-magnitude
//     channel values per accepted cycle; t columns make a codeword.
//   out_valid, out_col, out_bits: during the last iteration, the hard
//     decisions of block column out_col (bit x = column out_col*P + x,
//     1 = negative value).
//   done: pulses with the last decision column.
// Timing: t load cycles, then ITER*t decoding cycles; decisions for block
// column j come out in step j of the last iteration. The message path
// channel memory -> VPU -> CPU part 1 -> Reg_new is one combinational cycle.
//
// The code is defined by the permutation of the leftmost sub-matrix of each
// block row (ldpc_pkg::perm, an affine permutation chosen by this design; P
// must be a power of two).
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned P    = 256,  // sub-matrix size = number of VPUs
  parameter int unsigned C    = 4,    // column weight = block rows
  parameter int unsigned T    = 32,   // row weight = block columns
  parameter int unsigned ITER = 20,   // iterations per codeword
  localparam int unsigned AW  = (T > 1) ? $clog2(T) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  msg_t             in_llr [P],
  output logic             out_valid,
  output logic [IDX_W-1:0] out_col,
  output logic [P-1:0]     out_bits,
  output logic             done
);
  logic             mem_we, en, first, last, clr_old;
  logic [IDX_W-1:0] col;

  msg_t  vpu_l    [P][C];
  msg_t  vpu_r    [P][C];
  msg_t  cpu_l    [C][P];
  msg_t  cpu_r    [C][P];
  logic  cpu_sign [C][P];
  crec_t rec_new  [C][P];
  crec_t rec_old  [C][P];

  decode_ctrl #(.T(T), .ITER(ITER)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .mem_we   (mem_we),
    .col      (col),
    .en       (en),
    .first    (first),
    .last     (last),
    .clr_old  (clr_old),
    .dec_valid(out_valid),
    .done     (done)
  );

  assign out_col = col;

  for (genvar x = 0; x < P; x++) begin : g_vpu
    vpu #(.C(C), .T(T)) u_vpu (
      .clk  (clk),
      .we   (mem_we),
      .waddr(col[AW-1:0]),
      .wdata(in_llr[x]),
      .step (col[AW-1:0]),
      .r_in (vpu_r[x]),
      .l_out(vpu_l[x]),
      .hard (out_bits[x])
    );
  end

  shuffle_network #(.P(P), .C(C), .T(T)) u_shuffle (
    .vpu_l   (vpu_l),
    .cpu_r   (cpu_r),
    .cpu_l   (cpu_l),
    .cpu_sign(cpu_sign),
    .vpu_r   (vpu_r)
  );

  for (genvar r = 0; r < C; r++) begin : g_ring
    cpu_ring #(.P(P), .T(T)) u_ring (
      .clk    (clk),
      .en     (en),
      .first  (first),
      .last   (last),
      .clr_old(clr_old),
      .step   (col),
      .msg_in (cpu_l[r]),
      .sign_in(cpu_sign[r]),
      .msg_out(cpu_r[r]),
      .rec_new(rec_new[r]),
      .rec_old(rec_old[r])
    );
  end

  initial assert ((P & (P - 1)) == 0 && P >= 2)
    else $error("ldpc_decoder: P must be a power of two");
endmodule
