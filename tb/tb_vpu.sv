// tb_vpu: random test of the variable node processor with c = 4, t = 32.
// Loads random channel values into all 32 words of the VPU memory, then for
// random block columns and random check-to-variable messages compares the
// four variable-to-check messages and the hard decision with an integer
// model: total = I + sum R, extrinsic = total - R_r clipped to +-31, output
// magnitude = min(7, floor(3*|extrinsic|/4)), output sign = extrinsic < 0,
// hard decision = total < 0. Counts clipped outputs and negative totals.
module tb_vpu;
  import ldpc_pkg::*;
  localparam int C = 4, T = 32;
  logic       clk = 1'b0, we = 1'b0, hard;
  logic [4:0] waddr = '0, step = '0;
  msg_t       wdata = '0;
  msg_t       r_in [C], l_out [C];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  vpu #(.C(C), .T(T)) dut (.clk, .we, .waddr, .wdata, .step, .r_in, .l_out, .hard);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int val(msg_t m);
    return m.sgn ? -int'(m.mag) : int'(m.mag);
  endfunction

  initial begin
    msg_t chan [T];
    int n_clip = 0, n_neg = 0;
    foreach (r_in[r]) r_in[r] = '0;
    for (int a = 0; a < T; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 5'(a); wdata = msg_t'($urandom); chan[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 5000; i++) begin
      int total, e, m;
      step = 5'($urandom);
      foreach (r_in[r]) r_in[r] = msg_t'($urandom);
      #1;
      total = val(chan[step]);
      foreach (r_in[r]) total += val(r_in[r]);
      checks++;
      if (hard != (total < 0)) failures++;
      if (total < 0) n_neg++;
      for (int r = 0; r < C; r++) begin
        e = total - val(r_in[r]);
        if (e > 31) e = 31;
        if (e < -31) e = -31;
        m = ((e < 0 ? -e : e) * 3) / 4;
        if (m > 7) begin m = 7; n_clip++; end
        checks++;
        if (int'(l_out[r].mag) != m || l_out[r].sgn != (e < 0)) begin
          failures++;
          if (failures < 10) $display("FAIL step %0d r %0d: got %h expected mag %0d e %0d", step, r, l_out[r], m, e);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_clip == 0 || n_neg == 0) failures++;
    $display("outputs clipped=%0d negative totals=%0d", n_clip, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
