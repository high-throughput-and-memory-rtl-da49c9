// vpu: variable node processor unit.
//
// Each cycle the VPU handles one column of the code: the column of its
// position in the current block column `step`. It reads that column's
// channel value from its own channel memory and receives the C
// check-to-variable messages of the column, one from each block row. All are
// 4-bit sign-magnitude words, converted to two's complement (StoT) and added:
//   total = I_v + sum_r R_rv.
// For each block row the outgoing variable-to-check message is the extrinsic
// value total - R_rv, saturated to the 6-bit range, converted back to
// sign-magnitude (TtoS) and scaled by alpha with saturation to 3 bits (Scale).
// Scaling the variable-to-check messages is equivalent to scaling the
// check-to-variable minima of the modified min-sum rule, because the check
// node only takes minima. The hard decision is the sign of the total.
//
// The adder width (ldpc_pkg::SUM_W) is wider than 6 bits so that the total is
// exact; only the extrinsic values are saturated to 6 bits. alpha = 3/4.
// Both are this design's choices.
//
// Timing: combinational from r_in/step to l_out/hard; the channel memory is
// written on the clock edge when `we` is high.
module vpu
  import ldpc_pkg::*;
#(
  parameter int unsigned C = 4,     // column weight = block rows
  parameter int unsigned T = 32,    // block columns = channel memory depth
  localparam int unsigned AW = (T > 1) ? $clog2(T) : 1
) (
  input  logic          clk,
  input  logic          we,        // write channel value
  input  logic [AW-1:0] waddr,     // block column written
  input  msg_t          wdata,     // channel value
  input  logic [AW-1:0] step,      // block column processed
  input  msg_t          r_in  [C], // check-to-variable messages
  output msg_t          l_out [C], // variable-to-check messages
  output logic          hard       // hard decision: 1 when total < 0
);
  msg_t                    intr;
  logic signed [SUM_W-1:0] total;

  channel_memory #(.DEPTH(T)) u_mem (
    .clk  (clk),
    .we   (we),
    .waddr(waddr),
    .wdata(wdata),
    .raddr(step),
    .rdata(intr)
  );

  always_comb begin
    total = s2t(intr);
    for (int r = 0; r < C; r++) total += s2t(r_in[r]);
  end

  for (genvar r = 0; r < C; r++) begin : g_out
    assign l_out[r] = t2s_scale(sat_val(total - s2t(r_in[r])));
  end

  assign hard = total[SUM_W-1];
endmodule
