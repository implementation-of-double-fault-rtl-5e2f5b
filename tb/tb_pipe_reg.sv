// tb_pipe_reg: checks the pipeline register: one-cycle delay of random data,
// asynchronous reset to RESET_VALUE (taking effect without a clock edge) and
// holding of RESET_VALUE while reset stays asserted.
module tb_pipe_reg;
  localparam int unsigned W = 2;
  localparam logic [W-1:0] RV = 2'b01;

  logic         clk = 1'b0, rst = 1'b1;
  logic [W-1:0] d = '0, q, exp_q;
  int checks = 0, failures = 0, cycles = 0;

  pipe_reg #(.WIDTH(W), .RESET_VALUE(RV)) dut (.clk(clk), .rst(rst), .d(d), .q(q));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [W-1:0] exp);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%b expected %b at cycle %0d", what, q, exp, cycles);
    end
  endtask

  initial begin
    // reset held over two edges with data present
    d = 2'b10;
    repeat (2) @(negedge clk);
    check("reset hold", RV);
    rst = 1'b0;
    // streaming: value applied at a negedge is seen after the next posedge
    for (int i = 0; i < 200; i++) begin
      d = W'($urandom);
      exp_q = d;
      @(negedge clk);
      check("delay", exp_q);
    end
    // asynchronous reset in the middle of a low clock phase
    d = ~RV;
    @(negedge clk);
    check("before async reset", ~RV);
    #2 rst = 1'b1;
    #1 check("async reset", RV);
    @(negedge clk);
    check("reset hold 2", RV);
    rst = 1'b0;
    d = 2'b11;
    @(negedge clk);
    check("after reset", 2'b11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
