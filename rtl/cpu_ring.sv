// cpu_ring: the P check node processors of one block row, connected as two
// circular shift registers (Reg_new ring and Reg_old ring).
//
// CPU k takes its neighbour inputs from CPU k-1 (mod P), so every record
// moves one CPU further per cycle while the CPU it is in works on it. With
// this arrangement each CPU keeps talking to the same VPU for the whole
// decoding, and the links between processors are only between neighbours.
// After an iteration of t steps, Reg_new and Reg_old of CPU k hold the record
// of row k-(t-1) mod P of this block row.
//
// Interface: per-CPU message inputs msg_in[k], FIFO sign inputs sign_in[k] and
// message outputs msg_out[k]; the control inputs are common to all CPUs.
// Timing as in `cpu`: combinational message path, registers on the clock edge.
module cpu_ring
  import ldpc_pkg::*;
#(
  parameter int unsigned P = 256,   // CPUs in the ring (sub-matrix size)
  parameter int unsigned T = 32     // row weight
) (
  input  logic             clk,
  input  logic             en,
  input  logic             first,
  input  logic             last,
  input  logic             clr_old,
  input  logic [IDX_W-1:0] step,
  input  msg_t             msg_in  [P],
  input  logic             sign_in [P],
  output msg_t             msg_out [P],
  output crec_t            rec_new [P],   // Reg_new of each CPU (observation)
  output crec_t            rec_old [P]    // Reg_old of each CPU (observation)
);
  for (genvar k = 0; k < P; k++) begin : g_cpu
    localparam int unsigned PREV = (k + P - 1) % P;
    cpu #(.T(T)) u_cpu (
      .clk       (clk),
      .en        (en),
      .first     (first),
      .last      (last),
      .clr_old   (clr_old),
      .step      (step),
      .msg_in    (msg_in[k]),
      .sign_in   (sign_in[k]),
      .rec_new_in(rec_new[PREV]),
      .rec_old_in(rec_old[PREV]),
      .rec_new   (rec_new[k]),
      .rec_old   (rec_old[k]),
      .msg_out   (msg_out[k])
    );
  end
endmodule
