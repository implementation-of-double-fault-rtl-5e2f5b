// tb_self_checking_fa: exhaustive test of the self-checking full adder.
//
// For all 8 input vectors and all 16 sum/carry fault combinations it checks
// that the cell outputs carry the injected fault and that each flag is 1
// exactly when its output is right and 0 when it is wrong. Fault-free rows
// reproduce the Sum, Carry, Fc and Fs columns of the checker's truth table.
// It counts how many single and double faults were localised.
module tb_self_checking_fa;
  import dft_fa_pkg::*;

  logic       a, b, cin, sum, cout, fs, fc;
  fault_ctl_t fault;
  int checks = 0, failures = 0;
  int n_single = 0, n_double = 0;

  self_checking_fa dut (
    .a(a), .b(b), .cin(cin), .fault(fault),
    .sum(sum), .cout(cout), .fs(fs), .fc(fc)
  );

  function automatic logic faulty(input logic good, input int f);
    if (f == 1) return 1'b0;
    if (f == 2) return 1'b1;
    if (f == 3) return !good;
    return good;
  endfunction

  task automatic expect_bit(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s abc=%b%b%b fault=%0d/%0d got %b expected %b",
               what, a, b, cin, fault.sum, fault.cout, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    logic s_ref, c_ref, s_bad, c_bad;
    for (int fs_i = 0; fs_i < 4; fs_i++)
      for (int fc_i = 0; fc_i < 4; fc_i++)
        for (int v = 0; v < 8; v++) begin
          {a, b, cin} = 3'(v);
          fault.sum   = fault_e'(fs_i);
          fault.cout  = fault_e'(fc_i);
          #1;
          total = int'(a) + int'(b) + int'(cin);
          s_ref = total[0];
          c_ref = total[1];
          s_bad = faulty(s_ref, fs_i);
          c_bad = faulty(c_ref, fc_i);
          expect_bit("sum",  sum,  s_bad);
          expect_bit("cout", cout, c_bad);
          expect_bit("fs",   fs,   s_bad == s_ref);
          expect_bit("fc",   fc,   c_bad == c_ref);
          if ((s_bad != s_ref) && (c_bad != c_ref)) n_double++;
          else if ((s_bad != s_ref) || (c_bad != c_ref)) n_single++;
        end
    $display("single faults localised: %0d, double faults localised: %0d", n_single, n_double);
    checks++;
    if (n_single == 0 || n_double == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
