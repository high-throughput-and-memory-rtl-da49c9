// tb_channel_memory: writes random 4-bit channel values to all 32 words,
// with random write-enable gaps, and reads every word back from the
// asynchronous read port, comparing with a copy kept by the testbench.
module tb_channel_memory;
  import ldpc_pkg::*;
  localparam int DEPTH = 32;
  logic       clk = 1'b0, we = 1'b0;
  logic [4:0] waddr = '0, raddr = '0;
  msg_t       wdata = '0, rdata;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  channel_memory #(.DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msg_t model [DEPTH];
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 5'(a); wdata = msg_t'($urandom); model[a] = wdata;
    end
    for (int round = 0; round < 200; round++) begin
      @(negedge clk);
      we    = ($urandom_range(1) == 1);
      waddr = 5'($urandom);
      wdata = msg_t'($urandom);
      raddr = 5'($urandom);
      #1;
      checks++;
      if (rdata != model[raddr]) begin
        failures++;
        $display("FAIL read %0d: %h expected %h", raddr, rdata, model[raddr]);
      end
      if (we) model[waddr] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int a = 0; a < DEPTH; a++) begin
      raddr = 5'(a);
      #1;
      checks++;
      if (rdata != model[a]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
