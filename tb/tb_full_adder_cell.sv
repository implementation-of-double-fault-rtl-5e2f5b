// tb_full_adder_cell: exhaustive self-checking test of the full adder cell.
//
// Applies all 8 input vectors under all 16 combinations of fault on the sum
// and on the carry (none, stuck-at-0, stuck-at-1, flip) and compares both
// outputs with a reference computed here by integer addition.
module tb_full_adder_cell;
  import dft_fa_pkg::*;

  logic       a, b, cin, sum, cout;
  fault_ctl_t fault;
  int checks = 0, failures = 0;

  full_adder_cell dut (.a(a), .b(b), .cin(cin), .fault(fault), .sum(sum), .cout(cout));

  // Reference fault model, written independently of the package function.
  function automatic logic faulty(input logic good, input int f);
    if (f == 1) return 1'b0;
    if (f == 2) return 1'b1;
    if (f == 3) return !good;
    return good;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    for (int fs_i = 0; fs_i < 4; fs_i++)
      for (int fc_i = 0; fc_i < 4; fc_i++)
        for (int v = 0; v < 8; v++) begin
          {a, b, cin} = 3'(v);
          fault.sum   = fault_e'(fs_i);
          fault.cout  = fault_e'(fc_i);
          #1;
          total = int'(a) + int'(b) + int'(cin);
          checks++;
          if (sum !== faulty(total[0], fs_i)) begin
            failures++;
            $display("FAIL sum abc=%03b fault=%0d/%0d got %b", v[2:0], fs_i, fc_i, sum);
          end
          checks++;
          if (cout !== faulty(total[1], fc_i)) begin
            failures++;
            $display("FAIL cout abc=%03b fault=%0d/%0d got %b", v[2:0], fs_i, fc_i, cout);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
