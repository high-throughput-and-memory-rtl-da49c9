// channel_memory: the small memory inside every VPU that holds the channel
// (intrinsic) values of the VPU's t columns, one per block column.
//
// A register file of DEPTH words of ldpc_pkg::msg_t (4-bit
// sign-magnitude, the message format; the channel value width is this
// design's choice). One synchronous write port, loaded one block column per
// cycle before decoding, and one asynchronous read port, read at the block
// column of the current step so that the value reaches the VPU adders in the
// same cycle.
module channel_memory
  import ldpc_pkg::*;
#(
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  msg_t          wdata,
  input  logic [AW-1:0] raddr,
  output msg_t          rdata
);
  msg_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
