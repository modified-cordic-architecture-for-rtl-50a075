// line_changer -- exchanges two data lines under a control bit.
//
// With control = 1 the lines go straight through (y1 = x1, y2 = x2); with control = 0
// they are crossed (y1 = x2, y2 = x1). In the shared-datapath CORDIC it is the pair of
// 2:1 multiplexers in front of the adder: x1 is register X, x2 is register Y, y1 is the
// operand that reaches the adder directly and y2 the operand that goes through the
// shifter. control = 1 therefore sets up the x update (x -/+ y >>> k) and control = 0
// the y update (y +/- x >>> k). The published line changer is built from tri-state
// buffers; here it is two multiplexers, which is the same function.
//
// Purely combinational.
module line_changer #(
  parameter int unsigned W = 14
) (
  input  logic         control,
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  output logic [W-1:0] y1,
  output logic [W-1:0] y2
);

  always_comb begin
    y1 = control ? x1 : x2;
    y2 = control ? x2 : x1;
  end

endmodule
