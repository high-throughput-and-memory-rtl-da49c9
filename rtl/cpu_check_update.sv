// cpu_check_update: part 1 of a check node processor (CPU), one step of the
// min-sum check node process.
//
// Each cycle a CPU receives one variable-to-check message and the running
// record of a check row from its previous neighbour in the ring (minimum,
// second minimum, index of the minimum, XOR of signs). It compares the input
// magnitude with both minima, keeps the two smallest, records the step number
// as the index when the input becomes the new minimum, and XORs the input sign
// into the sign field. The result goes into Reg_new and on to the next CPU.
//
// Purely combinational. `first` marks step 0 of an iteration: the neighbour's
// record is then ignored and the row starts from minima at full scale
// (this start rule and the strict "<" compare, which keeps the earliest index
// on ties, are this design's choices).
module cpu_check_update
  import ldpc_pkg::*;
(
  input  msg_t             msg_in,   // message from the VPU
  input  crec_t            rec_in,   // record from the previous CPU
  input  logic             first,    // step 0 of an iteration
  input  logic [IDX_W-1:0] step,     // current block column (0 .. t-1)
  output crec_t            rec_out   // record to Reg_new
);
  crec_t cur;

  always_comb begin
    cur     = first ? CREC_INIT : rec_in;
    rec_out = cur;
    rec_out.sgn = cur.sgn ^ msg_in.sgn;
    if (msg_in.mag < cur.min1) begin
      rec_out.min1 = msg_in.mag;
      rec_out.min2 = cur.min1;
      rec_out.idx  = step;
    end else if (msg_in.mag < cur.min2) begin
      rec_out.min2 = msg_in.mag;
    end
  end
endmodule
