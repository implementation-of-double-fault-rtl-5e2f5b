// tb_functional_unit: checks the equal-input detector against the Eqt column
// of the checker's truth table (1 only for inputs 000 and 111).
module tb_functional_unit;
  logic a, b, c, eqt;
  int checks = 0, failures = 0;
  // Eqt for abc = 000 .. 111, bit index = {a,b,c}
  localparam logic [7:0] EQT_TABLE = 8'b1000_0001;

  functional_unit dut (.a(a), .b(b), .c(c), .eqt(eqt));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (eqt !== EQT_TABLE[v]) begin
        failures++;
        $display("FAIL abc=%03b eqt=%b expected %b", v[2:0], eqt, EQT_TABLE[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
