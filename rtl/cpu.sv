// cpu: check node processor unit of the shift-LDPC decoder.
//
// One CPU per parity-check row; the CPUs of a block row form a ring of P. A
// CPU always sees the same VPU, but the check row it works on moves: in step j
// of an iteration, CPU k works on row k-j of its block row. It takes that
// row's running record from the previous CPU (rec_new_in), folds in the
// message from its VPU (part 1, cpu_check_update) and stores the result in
// Reg_new, from where the next CPU picks it up in the following cycle. After
// the t steps of an iteration, Reg_new of CPU k holds the complete record of
// row k-(t-1).
//
// In the last step the record that is written into Reg_new is also written
// into Reg_old (the transfer after each iteration). During the next
// iteration Reg_old shifts along the ring in the same way, and part 2
// (cpu_msg_out) builds the check-to-variable message from the previous CPU's
// Reg_old and the sign popped from this CPU's sign FIFO (part 3). Because
// Reg_old of the previous CPU holds row k-t-j in step j, the message is for
// the VPU whose edge in this block row is row k-t-j; that VPU's sign is the
// one pushed into this CPU's FIFO (sign_in). The shuffle network wires the
// VPUs accordingly.
//
// Timing: part 1 and part 2 are combinational; Reg_new, Reg_old and the FIFO
// advance on the rising clock edge when `en` is high. `clr_old` zeroes Reg_old
// so that all messages are zero in the first iteration of a codeword.
module cpu
  import ldpc_pkg::*;
#(
  parameter int unsigned T = 32   // row weight = steps per iteration
) (
  input  logic             clk,
  input  logic             en,          // run one step
  input  logic             first,       // step 0 of the iteration
  input  logic             last,        // step t-1: transfer new -> old
  input  logic             clr_old,     // clear Reg_old (before a codeword)
  input  logic [IDX_W-1:0] step,        // block column of this step
  input  msg_t             msg_in,      // variable-to-check message
  input  logic             sign_in,     // sign pushed into the sign FIFO
  input  crec_t            rec_new_in,  // previous CPU's Reg_new
  input  crec_t            rec_old_in,  // previous CPU's Reg_old
  output crec_t            rec_new,     // Reg_new
  output crec_t            rec_old,     // Reg_old
  output msg_t             msg_out      // check-to-variable message
);
  crec_t rec_next;
  logic  sign_pop;

  cpu_check_update u_part1 (
    .msg_in (msg_in),
    .rec_in (rec_new_in),
    .first  (first),
    .step   (step),
    .rec_out(rec_next)
  );

  cpu_msg_out u_part2 (
    .rec_old (rec_old_in),
    .sign_pop(sign_pop),
    .step    (step),
    .msg_out (msg_out)
  );

  sign_fifo #(.DEPTH(T)) u_part3 (
    .clk (clk),
    .en  (en),
    .push(sign_in),
    .pop (sign_pop)
  );

  always_ff @(posedge clk) begin
    if (en) rec_new <= rec_next;
  end

  always_ff @(posedge clk) begin
    if (clr_old)       rec_old <= CREC_ZERO;
    else if (en) begin
      if (last)        rec_old <= rec_next;
      else             rec_old <= rec_old_in;
    end
  end
endmodule
