// sign_fifo: part 3 of a check node processor (CPU), a DEPTH-bit sign FIFO.
//
// Every enabled cycle one sign bit is pushed and the bit pushed DEPTH enabled
// cycles earlier is popped. With DEPTH = t (32 in the main configuration)
// the sign of a variable-to-check message of iteration n comes out in the
// same cycle of iteration n+1, where it turns the row's sign XOR into the
// sign of the check-to-variable message for that edge. Built as a shift
// register; `pop` is the oldest bit and is valid combinationally.
// DEPTH must be at least 2. The FIFO has no reset: it is always full, and its contents are unused in
// the first iteration, when all old-record magnitudes are zero.
module sign_fifo #(
  parameter int unsigned DEPTH = 32
) (
  input  logic clk,
  input  logic en,     // advance one position
  input  logic push,   // sign shifted in
  output logic pop     // sign shifted out
);
  logic [DEPTH-1:0] bits;

  initial assert (DEPTH >= 2) else $error("sign_fifo: DEPTH must be >= 2");

  assign pop = bits[DEPTH-1];

  always_ff @(posedge clk) begin
    if (en) begin
      bits <= {bits[DEPTH-2:0], push};
    end
  end
endmodule
