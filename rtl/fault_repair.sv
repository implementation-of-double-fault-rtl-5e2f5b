// fault_repair: repair stage of the fault tolerant full adder.
//
// A stuck-at or flipped output of a one-bit adder is always the complement of
// the right value whenever it is wrong, so a faulty output is repaired by
// inverting it instead of switching to a spare adder. Each output has an
// inverter and a 2:1 multiplexer (MUX-1 for the carry, MUX-2 for the sum)
// controlled by the checker's flag:
//   flag = 1 (fault free) -> pass the cell's output
//   flag = 0 (faulty)     -> pass the inverted output
// Sum and carry are handled independently, so a double fault (both outputs
// wrong at once) is repaired as well as a single one.
// The flag polarity follows the checker's truth table (1 = fault free); the
// stage is purely combinational.
module fault_repair (
  input  logic sum,         // cell sum
  input  logic cout,        // cell carry
  input  logic fs,          // 1: sum fault free
  input  logic fc,          // 1: carry fault free
  output logic sum_final,
  output logic cout_final
);
  logic sum_n, cout_n;

  always_comb begin
    sum_n  = ~sum;   // inverter (notg) on the sum path
    cout_n = ~cout;  // inverter (notg) on the carry path
  end

  mux2 #(.WIDTH(1)) u_mux_c (.in0(cout_n), .in1(cout), .sel(fc), .y(cout_final));
  mux2 #(.WIDTH(1)) u_mux_s (.in0(sum_n),  .in1(sum),  .sel(fs), .y(sum_final));
endmodule
