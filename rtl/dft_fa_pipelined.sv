// dft_fa_pipelined: double fault tolerant full adder with fault localisation
// and one pipeline stage.
//
// Data path:  a, b, cin -> self_checking_fa -> pipe_reg m1/m2 -> fault_repair
//             -> sum_final, cout_final
// The self-checking adder computes sum and carry and, for each, a flag that
// says whether that particular output is right (1) or wrong (0). Register m1
// holds {cout, fc}, register m2 holds {sum, fs}; in the next stage
// fault_repair inverts every output whose flag is 0. Because each output has
// its own flag, a fault on the sum, on the carry, or on both at once (a
// double fault) is corrected without a spare adder and without stopping
// operation.
//
// Timing: with PIPELINED = 1 (default, the pipelined design) the outputs
// for the inputs applied before a rising clk edge appear after that edge:
// latency one cycle, one new addition per cycle. With PIPELINED = 0 the
// registers are left out and the adder is the combinational self-repairing
// full adder (zero latency); clk and rst are then unused.
// rst is asynchronous, active high; during reset both outputs are 0 and both
// flags read fault free (reset values chosen by this implementation).
// fs_q and fc_q are the flags that steered the repair, brought out so that a
// system can log where a fault occurred. `fault` is the fault-injection input
// of the adder cell (dft_fa_pkg::NO_FAULT in normal use). An assertion in
// the pipelined configuration states that a fault-free cell is never flagged.
module dft_fa_pipelined
  import dft_fa_pkg::*;
#(
  parameter bit PIPELINED = 1'b1
) (
  input  logic       clk,
  input  logic       rst,         // asynchronous, active high
  input  logic       a,
  input  logic       b,
  input  logic       cin,
  input  fault_ctl_t fault,       // fault injected on the adder cell
  output logic       sum_final,   // corrected sum
  output logic       cout_final,  // corrected carry
  output logic       fs_q,        // 0: the sum of this result was repaired
  output logic       fc_q         // 0: the carry of this result was repaired
);
  logic sum, cout, fs, fc;
  logic sum_s, cout_s;

  self_checking_fa u_scfa (
    .a    (a),
    .b    (b),
    .cin  (cin),
    .fault(fault),
    .sum  (sum),
    .cout (cout),
    .fs   (fs),
    .fc   (fc)
  );

  if (PIPELINED) begin : g_pipe
    // m1: carry and its flag; m2: sum and its flag. Reset: value 0, flag 1.
    pipe_reg #(.WIDTH(2), .RESET_VALUE(2'b01)) m1 (
      .clk(clk), .rst(rst), .d({cout, fc}), .q({cout_s, fc_q})
    );
    pipe_reg #(.WIDTH(2), .RESET_VALUE(2'b01)) m2 (
      .clk(clk), .rst(rst), .d({sum, fs}), .q({sum_s, fs_q})
    );

    // The checker never reports a fault on a cell with no fault injected.
    a_no_false_alarm : assert property (
      @(posedge clk) disable iff (rst) (fault == NO_FAULT) |=> (fs_q && fc_q)
    ) else $error("fault flag raised on a fault-free adder cell");
  end else begin : g_comb
    always_comb begin
      cout_s = cout;
      fc_q   = fc;
      sum_s  = sum;
      fs_q   = fs;
    end
  end

  fault_repair u_repair (
    .sum       (sum_s),
    .cout      (cout_s),
    .fs        (fs_q),
    .fc        (fc_q),
    .sum_final (sum_final),
    .cout_final(cout_final)
  );
endmodule
