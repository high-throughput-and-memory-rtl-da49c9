// tb_ldpc_decoder: end-to-end testbench of ldpc_decoder at reduced size (P=16, c=3, t=6, 3 iterations).
//
// Sends 6 codeword(s): the all-zero codeword with random channel
// values, of which 100 in 1000 are errors (value -1..-3) and the others
// are correct (value 2..7). It compares every hard decision with the edge-level reference model in
// ldpc_ref_pkg, which decodes the same values with the same number formats
// on the parity-check matrix directly. It also checks the schedule: t load
// cycles, then decisions of block column j in step j of the last iteration,
// and `done` exactly ITER*t cycles after the last load beat. It counts how
// often each mechanism of the design occurred (iteration transfers, second
// minimum selected, scale saturation, negative messages from
// the sign FIFO path, load stalls, corrected errors) and fails for any that
// never did.
module tb_ldpc_decoder;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int P    = 16;
  localparam int C    = 3;
  localparam int T    = 6;
  localparam int ITER = 3;
  localparam int NCW  = 6;
  localparam int PERR = 100;   // channel errors per 1000 bits
  localparam int N    = P * T;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             in_valid = 1'b0;
  logic             in_ready;
  msg_t             in_llr [P];
  logic             out_valid;
  logic [IDX_W-1:0] out_col;
  logic [P-1:0]     out_bits;
  logic             done;

  int checks = 0;
  int failures = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  ldpc_decoder #(.P(P), .C(C), .T(T), .ITER(ITER)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_llr,
    .out_valid, .out_col, .out_bits, .done
  );

  // watchdog
  initial begin
    repeat (NCW * (ITER + 3) * T + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters from the design (observed, not used for checking)
  int n_transfer = 0;
  always @(posedge clk) if (rst_n && dut.en && dut.last) n_transfer++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    int         llr [];
    bit         dec_ref [];
    ref_stats_t st;
    int         n_stall, n_in_err, n_out_err, n_corrected;
    longint     last_load, done_cycle;
    int         ncol;
    st = '{default: 0};
    n_stall = 0; n_in_err = 0; n_out_err = 0; n_corrected = 0;
    llr = new[N];
    foreach (in_llr[x]) in_llr[x] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int cw = 0; cw < NCW; cw++) begin
      int errs;
      errs = 0;
      for (int v = 0; v < N; v++) begin
        if ($urandom_range(999) < PERR) llr[v] = -$urandom_range(1, 3);
        else                           llr[v] = $urandom_range(2, 7);
        if (llr[v] < 0) errs++;
      end
      n_in_err += errs;
      decode(P, C, T, ITER, llr, dec_ref, st);
      // load t block columns, with a stall cycle now and then
      for (int j = 0; j < T; j++) begin
        if (cw > 0 && $urandom_range(3) == 0) begin
          in_valid <= 1'b0;
          @(posedge clk);
          n_stall++;
        end
        in_valid <= 1'b1;
        for (int x = 0; x < P; x++) begin
          in_llr[x].sgn <= (llr[j*P + x] < 0);
          in_llr[x].mag <= 3'((llr[j*P + x] < 0) ? -llr[j*P + x] : llr[j*P + x]);
        end
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        check(in_ready, "in_ready during load");
      end
      #1;
      last_load = cycle;
      in_valid <= 1'b0;
      // collect decisions
      ncol = 0;
      done_cycle = -1;
      while (done_cycle < 0) begin
        @(posedge clk);
        #1;
        if (out_valid) begin
          int diffs;
          diffs = 0;
          check(out_col == IDX_W'(ncol), $sformatf("out_col %0d expected %0d", out_col, ncol));
          for (int x = 0; x < P; x++) begin
            if (out_bits[x] != dec_ref[ncol*P + x]) diffs++;
            if (out_bits[x]) n_out_err++;
          end
          check(diffs == 0, $sformatf("cw %0d column %0d: %0d decisions differ", cw, ncol, diffs));
          ncol++;
        end
        if (done) done_cycle = cycle;
      end
      check(ncol == T, $sformatf("%0d decision columns, expected %0d", ncol, T));
      // decoding takes ITER*T cycles: the first step in the cycle after the
      // last load beat, `done` in the ITER*T-th
      check(done_cycle - last_load + 1 == longint'(ITER * T),
            $sformatf("decoding took %0d cycles, expected %0d", done_cycle - last_load + 1, ITER * T));
      @(posedge clk);
      #1;
      check(in_ready, "ready for next codeword");
    end
    n_corrected = n_in_err - n_out_err;
    $display("mechanisms: transfers=%0d min2_selected=%0d ext_saturated=%0d scale_saturated=%0d neg_messages=%0d load_stalls=%0d",
             n_transfer, st.n_min2, st.n_ext_sat, st.n_scale_sat, st.n_neg_r, n_stall);
    $display("channel errors=%0d, errors after decoding=%0d", n_in_err, n_out_err);
    check(n_transfer == NCW * ITER, "transfer count");
    check(st.n_min2 > 0, "second minimum never selected");
    // Extrinsic 6-bit saturation cannot occur for C <= 4 (at most 1+3 terms
    // of magnitude 7 = 28 < 31); it is reported, not required.
    check(st.n_scale_sat > 0, "scale saturation never happened");
    check(st.n_neg_r > 0, "no negative check-to-variable message");
    if (NCW > 1) check(n_stall > 0, "no load stall");
    check(n_corrected > 0, "decoder corrected no errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
