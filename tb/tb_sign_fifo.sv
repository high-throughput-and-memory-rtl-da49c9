// tb_sign_fifo: checks the 32-bit sign FIFO: after it has been filled, every
// enabled cycle pops the bit pushed exactly 32 enabled cycles earlier;
// cycles with `en` low move nothing. A queue holds the expected bits.
module tb_sign_fifo;
  localparam int DEPTH = 32;
  logic clk = 1'b0, en = 1'b0, push = 1'b0, pop;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sign_fifo #(.DEPTH(DEPTH)) dut (.clk, .en, .push, .pop);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit q [$];
    int n_hold = 0;
    @(negedge clk);
    for (int i = 0; i < 5000; i++) begin
      en   = ($urandom_range(3) != 0);
      push = 1'($urandom);
      if (!en) n_hold++;
      if (en && q.size() == DEPTH) begin
        checks++;
        if (pop != q.pop_front()) begin
          failures++;
          if (failures < 10) $display("FAIL at %0d", i);
        end
      end
      if (en) q.push_back(push);
      @(negedge clk);
    end
    checks++;
    if (n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
