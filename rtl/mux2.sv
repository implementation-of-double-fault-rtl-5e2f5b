// mux2: 2:1 multiplexer, y = sel ? in1 : in0.
//
// The checker and the repair stage of the fault tolerant full adder are built
// from such multiplexers (transmission-gate muxes in a transistor-level
// build). Purely combinational; WIDTH is the data width.
module mux2 #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] in0,  // selected when sel = 0
  input  logic [WIDTH-1:0] in1,  // selected when sel = 1
  input  logic             sel,
  output logic [WIDTH-1:0] y
);
  always_comb y = sel ? in1 : in0;
endmodule
