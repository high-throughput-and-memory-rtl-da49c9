// tb_cpu_msg_out: exhaustive test of CPU part 2 over index/step matches.
// For random old records and popped signs it checks that the message
// magnitude is the second minimum exactly when the step equals the stored
// index, the minimum otherwise, and that the sign is the record's sign XOR
// the popped sign.
module tb_cpu_msg_out;
  import ldpc_pkg::*;

  crec_t      rec_old;
  logic       sign_pop;
  logic [4:0] step;
  msg_t       msg_out;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  cpu_msg_out dut (.rec_old, .sign_pop, .step, .msg_out);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_mag;
    bit exp_sgn;
    for (int i = 0; i < 4096; i++) begin
      rec_old  = crec_t'($urandom);
      sign_pop = 1'($urandom);
      // hit the index in half of the cases
      step     = (i % 2 == 0) ? rec_old.idx : 5'($urandom);
      #1;
      exp_mag = (step == rec_old.idx) ? int'(rec_old.min2) : int'(rec_old.min1);
      exp_sgn = rec_old.sgn != sign_pop;
      checks++;
      if (int'(msg_out.mag) != exp_mag || msg_out.sgn != exp_sgn) begin
        failures++;
        if (failures < 10) $display("FAIL rec=%h pop=%b step=%0d out=%h", rec_old, sign_pop, step, msg_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
