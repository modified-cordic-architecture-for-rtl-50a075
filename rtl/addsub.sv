// addsub -- adder/subtractor of one CORDIC micro-rotation.
//
// Computes a + b or a - b on signed coordinates, the choice made by `sub`, which the
// datapath derives from the sign-bit register. When `en` is low the micro-rotation slot
// is unused and `a` is passed on unchanged, so an angle that needs fewer than four
// micro-rotations runs through the same fixed schedule. The result has the operands'
// width and wraps on overflow; the coordinate format leaves enough headroom that a
// rotation of a vector of length up to 1.25 does not overflow. Purely combinational.
module addsub #(
  parameter int unsigned W = 14
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic                sub,
  input  logic                en,
  output logic signed [W-1:0] s
);

  always_comb begin
    if (!en)      s = a;
    else if (sub) s = a - b;
    else          s = a + b;
  end

endmodule
