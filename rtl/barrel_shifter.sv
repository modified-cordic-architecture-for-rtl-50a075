// barrel_shifter -- arithmetic right shifter of the CORDIC datapath.
//
// Shifts a signed coordinate right by `shamt` bit positions, copying the sign bit into
// the vacated positions, which divides by 2^shamt rounding toward minus infinity. It is
// the ">> k(i)" box of the datapath: the shift count comes from the micro-rotation ROM.
// Built as log2 stages of 2:1 multiplexers, one stage per bit of `shamt`, as a barrel
// shifter is. Purely combinational.
module barrel_shifter #(
  parameter int unsigned W  = 14,
  parameter int unsigned SW = 4
) (
  input  logic signed [W-1:0]  din,
  input  logic        [SW-1:0] shamt,
  output logic signed [W-1:0]  dout
);

  logic signed [W-1:0] stage [SW+1];

  always_comb begin
    stage[0] = din;
    for (int s = 0; s < SW; s++) begin
      stage[s+1] = shamt[s] ? (stage[s] >>> (1 << s)) : stage[s];
    end
    dout = stage[SW];
  end

endmodule
