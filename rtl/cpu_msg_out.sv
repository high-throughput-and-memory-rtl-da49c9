// cpu_msg_out: part 2 of a check node processor (CPU), the check-to-variable
// message output.
//
// From the check-row record of the previous iteration (taken from the
// previous CPU's Reg_old) it selects the message magnitude: the second
// minimum when the current block column `step` is the index of the minimum,
// the minimum otherwise. The message sign is the XOR of the row's sign field
// and the sign this edge carried in the previous iteration, popped from the
// CPU's sign FIFO. Purely combinational.
module cpu_msg_out
  import ldpc_pkg::*;
(
  input  crec_t            rec_old,   // record from the previous CPU's Reg_old
  input  logic             sign_pop,  // sign popped from the sign FIFO
  input  logic [IDX_W-1:0] step,      // current block column (0 .. t-1)
  output msg_t             msg_out    // check-to-variable message to the VPU
);
  always_comb begin
    msg_out.sgn = rec_old.sgn ^ sign_pop;
    msg_out.mag = (rec_old.idx == step) ? rec_old.min2 : rec_old.min1;
  end
endmodule
