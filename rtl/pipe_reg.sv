// pipe_reg: pipeline register (D flip-flops with reset) used between the
// self-checking adder and the repair stage.
//
// q takes d on every rising clk edge. rst is asynchronous and active high
// and loads RESET_VALUE, so that the stage downstream sees a defined,
// fault-free word while the design is in reset. The presence of two such
// registers with clk and rst comes from the pipelined design; the width,
// the reset style and the reset value are this implementation's choices.
module pipe_reg #(
  parameter int unsigned     WIDTH       = 2,
  parameter logic [WIDTH-1:0] RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst,  // asynchronous, active high
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst) q <= RESET_VALUE;
    else     q <= d;
  end
endmodule
