// tb_dft_fa_pipelined: end-to-end test of the pipelined double fault tolerant
// full adder at its default parameters.
//
// A new addition, with a fault on the adder cell's sum, carry, both or
// neither, enters every clock cycle. One cycle later the corrected outputs
// must equal a+b+cin computed here, and the flags must report exactly the
// outputs that were wrong. The first pass walks all 8 input vectors under
// all 16 fault combinations back to back; then random traffic follows, with
// an asynchronous reset in the middle. The test counts fault-free results,
// repaired single sum faults, single carry faults and double faults, and
// resets; each must have happened at least once.
module tb_dft_fa_pipelined;
  import dft_fa_pkg::*;

  logic       clk = 1'b0, rst = 1'b1;
  logic       a = 1'b0, b = 1'b0, cin = 1'b0;
  fault_ctl_t fault = NO_FAULT;
  logic       sum_final, cout_final, fs_q, fc_q;

  int checks = 0, failures = 0, cycles = 0;
  int n_clean = 0, n_sum_fault = 0, n_cout_fault = 0, n_double = 0, n_reset = 0;

  dft_fa_pipelined dut (
    .clk(clk), .rst(rst), .a(a), .b(b), .cin(cin), .fault(fault),
    .sum_final(sum_final), .cout_final(cout_final), .fs_q(fs_q), .fc_q(fc_q)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Does fault code f make an output whose right value is `good` wrong?
  function automatic bit corrupts(input logic good, input fault_e f);
    return (f == FLT_FLIP) || (f == FLT_SA0 && good) || (f == FLT_SA1 && !good);
  endfunction

  task automatic expect_bit(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at cycle %0d: got %b expected %b", what, cycles, got, exp);
    end
  endtask

  // Apply one operation at a negedge; check its result at the next negedge,
  // i.e. one rising edge (one pipeline stage) later.
  task automatic op(input logic [2:0] abc, input fault_ctl_t f);
    int  total;
    bit  bad_s, bad_c;
    {a, b, cin} = abc;
    fault       = f;
    total = int'(abc[2]) + int'(abc[1]) + int'(abc[0]);
    bad_s = corrupts(total[0], f.sum);
    bad_c = corrupts(total[1], f.cout);
    #1;
    @(negedge clk);
    expect_bit("sum_final",  sum_final,  total[0]);
    expect_bit("cout_final", cout_final, total[1]);
    expect_bit("fs_q", fs_q, !bad_s);
    expect_bit("fc_q", fc_q, !bad_c);
    if (bad_s && bad_c) n_double++;
    else if (bad_s)     n_sum_fault++;
    else if (bad_c)     n_cout_fault++;
    else                n_clean++;
  endtask

  task automatic check_reset();
    expect_bit("reset sum_final",  sum_final,  1'b0);
    expect_bit("reset cout_final", cout_final, 1'b0);
    expect_bit("reset fs_q", fs_q, 1'b1);
    expect_bit("reset fc_q", fc_q, 1'b1);
    n_reset++;
  endtask

  // Latency check: a result must not appear before the clock edge.
  task automatic latency_check();
    logic [1:0] prev;
    {a, b, cin} = 3'b000;
    fault = NO_FAULT;
    @(negedge clk);
    prev = {cout_final, sum_final};
    {a, b, cin} = 3'b111;
    fault = '{sum: FLT_FLIP, cout: FLT_FLIP};
    #2;
    expect_bit("latency: sum held",  sum_final,  prev[0]);
    expect_bit("latency: cout held", cout_final, prev[1]);
    @(negedge clk);
    expect_bit("latency: sum after 1 cycle",  sum_final,  1'b1);
    expect_bit("latency: cout after 1 cycle", cout_final, 1'b1);
  endtask

  initial begin
    // reset with inputs that would give 1s
    {a, b, cin} = 3'b111;
    repeat (2) @(negedge clk);
    check_reset();
    rst = 1'b0;

    // exhaustive: every input vector under every sum/carry fault
    for (int fs_i = 0; fs_i < 4; fs_i++)
      for (int fc_i = 0; fc_i < 4; fc_i++)
        for (int v = 0; v < 8; v++)
          op(3'(v), '{sum: fault_e'(fs_i), cout: fault_e'(fc_i)});

    latency_check();

    // random traffic
    for (int i = 0; i < 2000; i++)
      op(3'($urandom), '{sum: fault_e'($urandom_range(3)), cout: fault_e'($urandom_range(3))});

    // asynchronous reset in the middle of a cycle
    #2 rst = 1'b1;
    #1 check_reset();
    @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 100; i++)
      op(3'($urandom), '{sum: fault_e'($urandom_range(3)), cout: fault_e'($urandom_range(3))});

    $display("fault free: %0d  sum repaired: %0d  carry repaired: %0d  double repaired: %0d  resets: %0d",
             n_clean, n_sum_fault, n_cout_fault, n_double, n_reset);
    checks++;
    if (n_clean == 0 || n_sum_fault == 0 || n_cout_fault == 0 || n_double == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
