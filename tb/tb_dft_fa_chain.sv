// tb_dft_fa_chain: ripple-carry chain of fault tolerant full adders.
//
// The repaired carry of each cell (cout_final) drives the carry input of the
// next, which is how the repair stage stops a fault from travelling along
// the carry chain. Four unpipelined cells (PIPELINED = 0) form a 4-bit
// adder; every cell gets its own random fault on sum, carry or both, and the
// 5-bit result must still equal x + y + ci. The test counts operations in
// which several cells were faulty at once and in which a faulty carry was
// repaired before it reached the next cell.
module tb_dft_fa_chain;
  import dft_fa_pkg::*;

  localparam int N = 4;

  logic             clk = 1'b0, rst = 1'b0;
  logic [N-1:0]     x, y, s, fs, fc;
  logic [N:0]       c;
  fault_ctl_t       flt [N];
  int checks = 0, failures = 0;
  int n_multi = 0, n_carry_stop = 0;

  for (genvar i = 0; i < N; i++) begin : g_bit
    dft_fa_pipelined #(.PIPELINED(1'b0)) u_fa (
      .clk(clk), .rst(rst), .a(x[i]), .b(y[i]), .cin(c[i]), .fault(flt[i]),
      .sum_final(s[i]), .cout_final(c[i+1]), .fs_q(fs[i]), .fc_q(fc[i])
    );
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_sum, nfaulty;
    for (int it = 0; it < 3000; it++) begin
      x    = N'($urandom);
      y    = N'($urandom);
      c[0] = 1'($urandom);
      for (int i = 0; i < N; i++)
        flt[i] = (it < 100) ? NO_FAULT
                            : '{sum: fault_e'($urandom_range(3)), cout: fault_e'($urandom_range(3))};
      #1;
      exp_sum = int'(x) + int'(y) + int'(c[0]);
      checks++;
      if ({c[N], s} !== (N+1)'(exp_sum)) begin
        failures++;
        $display("FAIL %0d + %0d + %0d = %0d, expected %0d", x, y, c[0], {c[N], s}, exp_sum);
      end
      nfaulty = 0;
      for (int i = 0; i < N; i++) nfaulty += int'(!fs[i] || !fc[i]);
      if (nfaulty > 1) n_multi++;
      if (fc[N-2:0] != '1) n_carry_stop++;
    end
    $display("operations with several faulty cells: %0d, carry faults stopped inside the chain: %0d",
             n_multi, n_carry_stop);
    checks++;
    if (n_multi == 0 || n_carry_stop == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
