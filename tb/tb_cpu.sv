// tb_cpu: cycle-level test of one check node processor with t = 4, its ring
// neighbours replaced by random records. Every cycle it drives random
// controls (enable with gaps, first, last, step, occasional clear) and
// inputs, and checks against a model: the next Reg_new is the two-minimum
// update of the neighbour's record (or of the initial record on step 0),
// Reg_old takes that same record on the last step, otherwise the
// neighbour's Reg_old, and is zeroed by the clear; the output message is
// the neighbour's old record's minimum (second minimum when the step equals
// its index) with sign = record sign XOR the sign pushed t enabled cycles
// earlier.
module tb_cpu;
  import ldpc_pkg::*;
  localparam int T = 4;
  logic       clk = 1'b0, en, first, last, clr_old, sign_in;
  logic [4:0] step;
  msg_t       msg_in, msg_out;
  crec_t      rec_new_in, rec_old_in, rec_new, rec_old;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cpu #(.T(T)) dut (.clk, .en, .first, .last, .clr_old, .step, .msg_in, .sign_in,
                    .rec_new_in, .rec_old_in, .rec_new, .rec_old, .msg_out);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic crec_t upd(crec_t c, msg_t m, logic [4:0] j);
    crec_t o;
    o = c;
    o.sgn = c.sgn ^ m.sgn;
    if (m.mag < c.min1) begin o.min2 = c.min1; o.min1 = m.mag; o.idx = j; end
    else if (m.mag < c.min2) o.min2 = m.mag;
    return o;
  endfunction

  initial begin
    bit    q [$];
    crec_t exp_new, exp_old;
    int    n_transfer = 0, n_shift = 0, n_clear = 0, n_msg = 0;
    en = 0; first = 0; last = 0; clr_old = 1; sign_in = 0; step = 0;
    msg_in = '0; rec_new_in = '0; rec_old_in = '0;
    @(negedge clk);
    clr_old = 0;
    exp_old = CREC_ZERO;
    exp_new = rec_new;   // not reset; take what is there
    for (int i = 0; i < 4000; i++) begin
      en         = ($urandom_range(4) != 0);
      clr_old    = ($urandom_range(40) == 0);
      first      = ($urandom_range(3) == 0);
      last       = ($urandom_range(3) == 0);
      step       = 5'($urandom_range(T - 1));
      msg_in     = msg_t'($urandom);
      sign_in    = 1'($urandom);
      rec_new_in = crec_t'($urandom);
      rec_old_in = crec_t'($urandom);
      #1;
      if (en && q.size() == T) begin
        msg_t e;
        e.mag = (rec_old_in.idx == step) ? rec_old_in.min2 : rec_old_in.min1;
        e.sgn = rec_old_in.sgn ^ q[0];
        checks++;
        n_msg++;
        if (msg_out != e) begin
          failures++;
          if (failures < 10) $display("FAIL msg_out at %0d: %h expected %h", i, msg_out, e);
        end
      end
      if (en) begin
        crec_t nx;
        nx = upd(first ? CREC_INIT : rec_new_in, msg_in, step);
        exp_new = nx;
        if (clr_old)   begin exp_old = CREC_ZERO; n_clear++; end
        else if (last) begin exp_old = nx; n_transfer++; end
        else           begin exp_old = rec_old_in; n_shift++; end
        q.push_back(sign_in);
        if (q.size() > T) void'(q.pop_front());
      end else if (clr_old) begin
        exp_old = CREC_ZERO;
        n_clear++;
      end
      @(negedge clk);
      checks++;
      if (rec_new != exp_new || rec_old != exp_old) begin
        failures++;
        if (failures < 10) $display("FAIL regs at %0d: new %h/%h old %h/%h", i, rec_new, exp_new, rec_old, exp_old);
      end
    end
    checks++;
    if (n_transfer == 0 || n_shift == 0 || n_clear == 0 || n_msg == 0) failures++;
    $display("transfers=%0d shifts=%0d clears=%0d messages=%0d", n_transfer, n_shift, n_clear, n_msg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
