// decode_ctrl: schedule controller of the decoder.
//
// A codeword is loaded one block column per accepted cycle (in_valid &&
// in_ready), t columns in all, into the channel memories of the VPUs; while
// loading, the old-record registers of all CPUs are held at zero so that the
// first iteration starts from zero check-to-variable messages. Decoding then
// runs ITER iterations of exactly t cycles each. In step j of every
// iteration all VPUs process block column j and all CPUs one step of their
// rows; `first` and `last` mark steps 0 and t-1 (the last step also moves the
// new records into the old registers). During the final iteration the VPU
// hard decisions of block column j are valid in step j (dec_valid), and
// `done` pulses with the last step. The controller then accepts the next
// codeword.
//
// A codeword takes t load cycles plus ITER*t decoding cycles. Loading is not
// overlapped with decoding; the document gives no load interface, and this
// sequencing, the handshake and the decision output are this design's own.
module decode_ctrl
  import ldpc_pkg::*;
#(
  parameter int unsigned T    = 32,   // block columns = steps per iteration
  parameter int unsigned ITER = 20,   // iterations per codeword
  localparam int unsigned IW  = (ITER > 1) ? $clog2(ITER) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,   // a block column of channel values
  output logic             in_ready,
  output logic             mem_we,     // write channel memories
  output logic [IDX_W-1:0] col,        // block column (load address / step)
  output logic             en,         // run one decoding step
  output logic             first,
  output logic             last,
  output logic             clr_old,
  output logic             dec_valid,  // hard decisions of column `col` valid
  output logic             done        // last step of a codeword
);
  typedef enum logic [0:0] {S_LOAD, S_RUN} state_t;

  state_t        state;
  logic [IW-1:0] iter;

  assign in_ready  = (state == S_LOAD);
  assign mem_we    = in_valid && in_ready;
  assign clr_old   = (state == S_LOAD);
  assign en        = (state == S_RUN);
  assign first     = en && (col == '0);
  assign last      = en && (col == IDX_W'(T - 1));
  assign dec_valid = en && (iter == IW'(ITER - 1));
  assign done      = dec_valid && last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      col   <= '0;
      iter  <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (mem_we) begin
          if (col == IDX_W'(T - 1)) begin
            col   <= '0;
            iter  <= '0;
            state <= S_RUN;
          end else begin
            col <= col + 1'b1;
          end
        end
        S_RUN: begin
          if (last) begin
            col <= '0;
            if (iter == IW'(ITER - 1)) state <= S_LOAD;
            else                       iter  <= iter + 1'b1;
          end else begin
            col <= col + 1'b1;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // Loading and decoding never overlap; the step counter stays below T.
  // (rst_n is both the asynchronous reset and the disable condition here;
  // the lint note about a net used both ways refers to this.)
  assert property (@(posedge clk) disable iff (!rst_n) !(en && in_ready));
  assert property (@(posedge clk) disable iff (!rst_n) {1'b0, col} < (IDX_W + 1)'(T));
  assert property (@(posedge clk) disable iff (!rst_n) done |=> (in_ready && !en));

  initial assert (T >= 2 && T <= (1 << IDX_W))
    else $error("decode_ctrl: T must be in 2..%0d", 1 << IDX_W);
endmodule
