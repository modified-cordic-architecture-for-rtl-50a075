// sbr -- sign-bit register (SBR) of the fixed-angle CORDIC.
//
// Holds the directions of the micro-rotations of the rotation in progress, so that the
// adder/subtractors need no angle datapath: for a fixed, known angle the directions are
// known before the rotation starts. On `load` the register takes the N_ROT sign bits of
// the angle's table row; when `negate` is set all of them are inverted, which turns a
// rotation through +phi into one through -phi (s = 1 means sigma = +1). During the
// rotation `sign` gives the bit of micro-rotation `idx`.
//
// Timing: the bits are captured on the rising clock edge on which `load` is high and
// `sign` is a combinational read of the stored bits. Reset clears the register.
module sbr
  import cordic_pkg::*;
#(
  parameter int unsigned N = N_ROT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic [N-1:0]         sign_in,
  input  logic                 negate,
  input  logic [$clog2(N)-1:0] idx,
  output logic                 sign
);

  logic [N-1:0] bits_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    bits_q <= '0;
    else if (load) bits_q <= negate ? ~sign_in : sign_in;
  end

  always_comb sign = bits_q[idx];

endmodule
