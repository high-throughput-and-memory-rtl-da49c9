// tb_cpu_check_update: random test of CPU part 1 (one min-sum step).
// Drives random messages, records, step numbers and `first` flags and
// compares the output record with a model of the two-minimum update written
// with plain integers: sort the input magnitude into (min, 2nd min) with a
// strict compare, take the step as index when the input is the new minimum,
// XOR the sign. Also checks that an all-7 row keeps index 0.
module tb_cpu_check_update;
  import ldpc_pkg::*;

  msg_t       msg_in;
  crec_t      rec_in, rec_out;
  logic       first;
  logic [4:0] step;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  cpu_check_update dut (.msg_in, .rec_in, .first, .step, .rec_out);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m1, m2, ix, m, n_new_min = 0, n_new_min2 = 0;
    bit s;
    for (int i = 0; i < 20000; i++) begin
      msg_in = msg_t'($urandom);
      rec_in = crec_t'($urandom);
      // keep the record consistent: min1 <= min2
      if (rec_in.min1 > rec_in.min2) {rec_in.min1, rec_in.min2} = {rec_in.min2, rec_in.min1};
      first = ($urandom_range(7) == 0);
      step  = 5'($urandom);
      #1;
      m1 = first ? 7 : int'(rec_in.min1);
      m2 = first ? 7 : int'(rec_in.min2);
      ix = first ? 0 : int'(rec_in.idx);
      s  = first ? 1'b0 : rec_in.sgn;
      m  = int'(msg_in.mag);
      s  = s ^ msg_in.sgn;
      if (m < m1)      begin m2 = m1; m1 = m; ix = int'(step); n_new_min++; end
      else if (m < m2) begin m2 = m; n_new_min2++; end
      checks++;
      if (rec_out.min1 != 3'(m1) || rec_out.min2 != 3'(m2) || rec_out.idx != 5'(ix) || rec_out.sgn != s) begin
        failures++;
        if (failures < 10) $display("FAIL in=%h rec=%h first=%b step=%0d out=%h", msg_in, rec_in, first, step, rec_out);
      end
    end
    checks++;
    if (n_new_min == 0 || n_new_min2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
