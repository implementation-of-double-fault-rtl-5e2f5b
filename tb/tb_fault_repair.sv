// tb_fault_repair: checks the repair stage for all 16 combinations of sum,
// carry and their flags: an output whose flag is 1 passes unchanged, an
// output whose flag is 0 is inverted.
module tb_fault_repair;
  logic sum, cout, fs, fc, sum_final, cout_final;
  int checks = 0, failures = 0;

  fault_repair dut (
    .sum(sum), .cout(cout), .fs(fs), .fc(fc),
    .sum_final(sum_final), .cout_final(cout_final)
  );

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {sum, cout, fs, fc} = 4'(v);
      #1;
      checks++;
      if (sum_final !== (fs ? sum : !sum)) begin
        failures++;
        $display("FAIL sum=%b fs=%b -> sum_final=%b", sum, fs, sum_final);
      end
      checks++;
      if (cout_final !== (fc ? cout : !cout)) begin
        failures++;
        $display("FAIL cout=%b fc=%b -> cout_final=%b", cout, fc, cout_final);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
