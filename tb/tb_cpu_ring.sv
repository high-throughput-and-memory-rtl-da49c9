// tb_cpu_ring: ring of P = 8 CPUs with t = 4, run for 4 iterations as in the
// decoder. In step j CPU k receives the message of row k-j (mod P) for block
// column j, and a random sign for its FIFO. After each iteration it checks
// that Reg_new and Reg_old of CPU k hold the record (min, 2nd min, index,
// sign XOR) of row k-(t-1), computed by the testbench from the messages of
// the row. In the following iteration it checks that CPU k outputs, in step
// j, the message of row k-t-j: second minimum if j is the row's index, else
// the minimum, with sign = row sign XOR the FIFO sign CPU k got in step j of
// the previous iteration. In the first iteration all messages must be zero.
module tb_cpu_ring;
  import ldpc_pkg::*;
  localparam int P = 8, T = 4, NIT = 4;
  logic       clk = 1'b0, en = 1'b0, first = 1'b0, last = 1'b0, clr_old = 1'b1;
  logic [4:0] step = '0;
  msg_t       msg_in [P], msg_out [P];
  logic       sign_in [P];
  crec_t      rec_new [P], rec_old [P];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cpu_ring #(.P(P), .T(T)) dut (.clk, .en, .first, .last, .clr_old, .step, .msg_in, .sign_in,
                                .msg_out, .rec_new, .rec_old);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msg_t m [P][T];        // message of row q, block column j, this iteration
    int   pmin1 [P], pmin2 [P], pidx [P];
    bit   psgn [P];
    bit   psign_in [P][T]; // FIFO signs of the previous iteration
    int   n_min2 = 0;
    foreach (msg_in[k]) begin msg_in[k] = '0; sign_in[k] = 0; end
    @(negedge clk);
    clr_old = 1'b0;
    for (int it = 0; it < NIT; it++) begin
      for (int q = 0; q < P; q++)
        for (int j = 0; j < T; j++) m[q][j] = msg_t'($urandom);
      for (int j = 0; j < T; j++) begin
        en = 1; first = (j == 0); last = (j == T - 1); step = 5'(j);
        for (int k = 0; k < P; k++) begin
          msg_in[k]  = m[((k - j) % P + P) % P][j];
          sign_in[k] = 1'($urandom);
        end
        #1;
        for (int k = 0; k < P; k++) begin
          int row, em;
          bit es;
          row = ((k - T - j) % P + 2 * P) % P;
          if (it == 0) begin em = 0; es = msg_out[k].sgn; end
          else begin
            em = (pidx[row] == j) ? pmin2[row] : pmin1[row];
            if (pidx[row] == j) n_min2++;
            es = psgn[row] ^ psign_in[k][j];
          end
          checks++;
          if (int'(msg_out[k].mag) != em || msg_out[k].sgn != es) begin
            failures++;
            if (failures < 10) $display("FAIL it %0d step %0d cpu %0d: %h expected %0d/%0d", it, j, k, msg_out[k], es, em);
          end
        end
        for (int k = 0; k < P; k++) psign_in[k][j] = sign_in[k];
        @(negedge clk);
      end
      en = 0; first = 0; last = 0;
      // row records of this iteration
      for (int q = 0; q < P; q++) begin
        pmin1[q] = 7; pmin2[q] = 7; pidx[q] = 0; psgn[q] = 0;
        for (int j = 0; j < T; j++) begin
          int mm;
          mm = int'(m[q][j].mag);
          psgn[q] ^= m[q][j].sgn;
          if (mm < pmin1[q]) begin pmin2[q] = pmin1[q]; pmin1[q] = mm; pidx[q] = j; end
          else if (mm < pmin2[q]) pmin2[q] = mm;
        end
      end
      for (int k = 0; k < P; k++) begin
        int row;
        crec_t e;
        row = ((k - (T - 1)) % P + P) % P;
        e = '{min1: 3'(pmin1[row]), min2: 3'(pmin2[row]), idx: 5'(pidx[row]), sgn: psgn[row]};
        checks++;
        if (rec_new[k] != e || rec_old[k] != e) begin
          failures++;
          if (failures < 10) $display("FAIL records it %0d cpu %0d: new %h old %h expected %h", it, k, rec_new[k], rec_old[k], e);
        end
      end
      // an idle cycle between iterations changes nothing
      @(negedge clk);
    end
    checks++;
    if (n_min2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
