// tb_dft_fa_comb: test of the unpipelined configuration (PIPELINED = 0), the
// combinational self-repairing full adder.
//
// All 8 input vectors under all 16 sum/carry fault combinations, then random
// vectors: the outputs must equal a+b+cin in the same time step, and the
// flags must name the outputs that were wrong and repaired.
module tb_dft_fa_comb;
  import dft_fa_pkg::*;

  logic       clk = 1'b0, rst = 1'b0;
  logic       a, b, cin;
  fault_ctl_t fault;
  logic       sum_final, cout_final, fs_q, fc_q;
  int checks = 0, failures = 0;
  int n_clean = 0, n_single = 0, n_double = 0;

  dft_fa_pipelined #(.PIPELINED(1'b0)) dut (
    .clk(clk), .rst(rst), .a(a), .b(b), .cin(cin), .fault(fault),
    .sum_final(sum_final), .cout_final(cout_final), .fs_q(fs_q), .fc_q(fc_q)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit corrupts(input logic good, input fault_e f);
    return (f == FLT_FLIP) || (f == FLT_SA0 && good) || (f == FLT_SA1 && !good);
  endfunction

  task automatic op(input logic [2:0] abc, input fault_ctl_t f);
    int total;
    bit bad_s, bad_c;
    {a, b, cin} = abc;
    fault       = f;
    #1;
    total = int'(abc[2]) + int'(abc[1]) + int'(abc[0]);
    bad_s = corrupts(total[0], f.sum);
    bad_c = corrupts(total[1], f.cout);
    checks += 4;
    if (sum_final !== total[0] || cout_final !== total[1] || fs_q !== !bad_s || fc_q !== !bad_c) begin
      failures++;
      $display("FAIL abc=%03b fault=%0d/%0d -> s=%b c=%b fs=%b fc=%b", abc, f.sum, f.cout,
               sum_final, cout_final, fs_q, fc_q);
    end
    if (bad_s && bad_c) n_double++;
    else if (bad_s || bad_c) n_single++;
    else n_clean++;
  endtask

  initial begin
    for (int fs_i = 0; fs_i < 4; fs_i++)
      for (int fc_i = 0; fc_i < 4; fc_i++)
        for (int v = 0; v < 8; v++)
          op(3'(v), '{sum: fault_e'(fs_i), cout: fault_e'(fc_i)});
    for (int i = 0; i < 1000; i++)
      op(3'($urandom), '{sum: fault_e'($urandom_range(3)), cout: fault_e'($urandom_range(3))});
    $display("fault free: %0d  single repaired: %0d  double repaired: %0d", n_clean, n_single, n_double);
    checks++;
    if (n_clean == 0 || n_single == 0 || n_double == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
