// cordic_rom -- micro-rotation ROM and K_A ROM of the fixed-angle CORDIC.
//
// Addressed by the rotation angle in whole degrees (0..45). It returns the four
// micro-rotations of that angle (shift count k(i), sign bit s(i), and whether slot i is
// used) and K_A, the start value for cos/sin generation, in Q2.12. Following the
// published scheme the shift counts and K_A are held in ROM, one table row per odd
// angle, with an even angle sharing the row of the next odd angle. Addresses 46..63 are
// outside the table: they return no micro-rotation and K_A = 1.0, so such a request
// leaves the vector unchanged.
//
// Purely combinational: the outputs follow the address in the same cycle. The contents
// are the constants ROT_ROM and KA_ROM of cordic_pkg.
module cordic_rom
  import cordic_pkg::*;
(
  input  angle_t   angle,   // rotation angle, degrees
  output rot_row_t row,     // micro-rotations 0..N_ROT-1 of that angle
  output coord_t   ka       // K_A, Q2.12
);

  always_comb begin
    row = ROT_ROM[angle];
    ka  = KA_ROM[angle];
  end

endmodule
