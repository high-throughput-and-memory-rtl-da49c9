// tb_decode_ctrl: checks the schedule controller for t = 4, 3 iterations.
// Loads two codewords with a stall in the second, then checks that decoding
// takes exactly ITER*t cycles with en high, that `col` counts 0..t-1 in each
// iteration with `first`/`last` on steps 0 and t-1, that clr_old is high only
// while loading, that dec_valid is high in the last iteration only and that
// `done` comes with its last step.
module tb_decode_ctrl;
  localparam int T = 4, ITER = 3;
  logic       clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic       in_ready, mem_we, en, first, last, clr_old, dec_valid, done;
  logic [4:0] col;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  decode_ctrl #(.T(T), .ITER(ITER)) dut (.clk, .rst_n, .in_valid, .in_ready, .mem_we, .col,
                                         .en, .first, .last, .clr_old, .dec_valid, .done);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int n_stall = 0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int cw = 0; cw < 2; cw++) begin
      // load
      for (int j = 0; j < T; j++) begin
        if (cw == 1 && j == 2) begin
          in_valid = 1'b0;
          #1;
          chk(in_ready && !mem_we && clr_old && !en, "stall cycle");
          n_stall++;
          @(negedge clk);
        end
        in_valid = 1'b1;
        #1;
        chk(in_ready && mem_we && clr_old && !en && col == 5'(j), $sformatf("load beat %0d", j));
        @(negedge clk);
      end
      in_valid = 1'b0;
      // decode
      for (int it = 0; it < ITER; it++) begin
        for (int j = 0; j < T; j++) begin
          #1;
          chk(en && !in_ready && !clr_old && col == 5'(j), $sformatf("step %0d of iteration %0d", j, it));
          chk(first == (j == 0) && last == (j == T - 1), "first/last");
          chk(dec_valid == (it == ITER - 1), "dec_valid");
          chk(done == (it == ITER - 1 && j == T - 1), "done");
          @(negedge clk);
        end
      end
      #1;
      chk(!en && in_ready, "back to loading");
      @(negedge clk);
    end
    chk(n_stall == 1, "stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
