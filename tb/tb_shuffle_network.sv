// tb_shuffle_network: checks the wiring for P = 16, c = 3, t = 6. Every VPU
// output and every CPU output carries a distinct random value; the test
// checks that CPU perm(r,x) of ring r receives VPU x's message, that VPU x
// receives the message of CPU perm(r,x)+t, whose sign FIFO receives VPU x's
// sign, and that each mapping is one-to-one. perm(r,x) = ((58r+7)x + 53r+11)
// mod P is the code definition, written out again here.
module tb_shuffle_network;
  import ldpc_pkg::*;
  localparam int P = 16, C = 3, T = 6;
  msg_t vpu_l [P][C], vpu_r [P][C], cpu_l [C][P], cpu_r [C][P];
  logic cpu_sign [C][P];
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  shuffle_network #(.P(P), .C(C), .T(T)) dut (.vpu_l, .cpu_r, .cpu_l, .cpu_sign, .vpu_r);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int round = 0; round < 20; round++) begin
      for (int r = 0; r < C; r++) begin
        bit hit [P];
        for (int k = 0; k < P; k++) hit[k] = 0;
        for (int x = 0; x < P; x++) begin
          vpu_l[x][r] = msg_t'($urandom);
          cpu_r[r][x] = msg_t'($urandom);
        end
        #1;
        for (int x = 0; x < P; x++) begin
          int f, b;
          f = ((58 * r + 7) * x + 53 * r + 11) % P;
          b = (f + T) % P;
          hit[f] = 1;
          checks++;
          if (cpu_l[r][f] != vpu_l[x][r] || vpu_r[x][r] != cpu_r[r][b] ||
              cpu_sign[r][b] != vpu_l[x][r].sgn) begin
            failures++;
            if (failures < 10) $display("FAIL r %0d x %0d", r, x);
          end
        end
        for (int k = 0; k < P; k++) begin
          checks++;
          if (!hit[k]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
