// cordic_pkg -- shared types, sizes and constant tables of the fixed-angle CORDIC.
//
// The rotator works on 14-bit two's-complement coordinates with 12 fraction bits
// (Q2.12: 1.0 is 4096, range -2.0 .. +1.99976). A rotation through an integer angle of
// 1..45 degrees is done with at most four micro-rotations. Micro-rotation i shifts the
// other coordinate right by k(i) bits and adds or subtracts it, the direction being the
// sign bit s(i) (s = 1 means sigma = +1, s = 0 means sigma = -1):
//   x' = x - sigma * (y >>> k)      y' = y + sigma * (x >>> k)
// The (k, s) pairs for the odd angles 1..45 are the elementary-angle decomposition of
// each angle, sum_i sigma_i * atan(2^-k(i)) ~= angle; rows with fewer than four
// micro-rotations mark the unused slots invalid. An even angle 2n uses the row of 2n+1
// (two neighbouring angles share one row), so a 2n request is served as a 2n+1 rotation.
//
// K_A is the start value put on the x axis when the rotator is used to produce
// cos/sin: K_A = 1 / prod_i sqrt(1 + 2^(-2 k(i))), the inverse of the CORDIC gain of that
// angle's micro-rotations, so the result has unit length. The values for 1..41 degrees
// are the published four-digit values; 43 and 45 degrees use the formula (0.7068 and
// 1/sqrt(2) = 0.7071).
//
// Both tables are built at elaboration time into packed constants of 64 entries
// (6-bit angle address); addresses 46..63 hold no micro-rotation and K_A = 1.0.
package cordic_pkg;

  // ---- sizes ----------------------------------------------------------------------
  localparam int unsigned WIDTH     = 14;  // coordinate width
  localparam int unsigned FRAC      = 12;  // fraction bits (1.0 == 4096)
  localparam int unsigned N_ROT     = 4;   // micro-rotations per angle
  localparam int unsigned KW        = 4;   // width of a shift count k(i), 0..15
  localparam int unsigned ANGLE_W   = 6;   // angle address, degrees
  localparam int unsigned ROM_DEPTH = 1 << ANGLE_W;
  localparam int unsigned MAX_ANGLE = 45;  // largest angle with a table row
  localparam int unsigned IDX_W     = $clog2(N_ROT);

  // ---- types ----------------------------------------------------------------------
  typedef logic signed [WIDTH-1:0] coord_t;
  typedef logic [ANGLE_W-1:0]      angle_t;
  typedef logic [KW-1:0]           shift_t;
  typedef logic [IDX_W-1:0]        rot_idx_t;

  // One micro-rotation: is it used, its sign bit s(i), its shift count k(i).
  typedef struct packed {
    logic   valid;
    logic   sign;
    shift_t k;
  } micro_rot_t;

  typedef micro_rot_t [N_ROT-1:0]     rot_row_t;   // entry i = micro-rotation i
  typedef rot_row_t   [ROM_DEPTH-1:0] rot_rom_t;
  typedef coord_t     [ROM_DEPTH-1:0] ka_rom_t;

  // ---- table construction (elaboration time only) ---------------------------------
  function automatic micro_rot_t mr(shift_t k, bit s);
    micro_rot_t m;
    m.valid = 1'b1;
    m.sign  = s;
    m.k     = k;
    return m;
  endfunction

  localparam micro_rot_t NONE = '0;

  // Elementary-angle decomposition of the odd angles; entry 0 is micro-rotation 0.
  function automatic rot_row_t odd_row(int unsigned a);
    rot_row_t r;
    r = '{default: NONE};
    case (a)
      45: r = '{NONE,      NONE,      NONE,      mr(0, 1)};
      43: r = '{NONE,      mr(8, 0),  mr(5, 0),  mr(0, 1)};
      41: r = '{NONE,      mr(7, 0),  mr(4, 0),  mr(0, 1)};
      39: r = '{mr(8, 1),  mr(6, 1),  mr(3, 0),  mr(0, 1)};
      37: r = '{NONE,      mr(6, 0),  mr(3, 0),  mr(0, 1)};
      35: r = '{mr(3, 0),  mr(2, 1),  mr(2, 1),  mr(2, 1)};
      33: r = '{mr(8, 0),  mr(7, 0),  mr(3, 1),  mr(1, 1)};
      31: r = '{NONE,      mr(6, 1),  mr(4, 1),  mr(1, 1)};
      29: r = '{NONE,      mr(6, 1),  mr(2, 1),  mr(2, 1)};
      27: r = '{NONE,      NONE,      mr(7, 1),  mr(1, 1)};
      25: r = '{NONE,      mr(8, 1),  mr(5, 0),  mr(1, 1)};
      23: r = '{NONE,      NONE,      mr(4, 0),  mr(1, 1)};
      21: r = '{mr(10, 1), mr(3, 0),  mr(2, 1),  mr(2, 1)};
      19: r = '{NONE,      mr(7, 0),  mr(3, 0),  mr(1, 1)};
      17: r = '{mr(6, 1),  mr(4, 1),  mr(2, 0),  mr(1, 1)};
      15: r = '{NONE,      mr(10, 1), mr(6, 1),  mr(2, 1)};
      13: r = '{NONE,      mr(7, 1),  mr(2, 0),  mr(1, 1)};
      11: r = '{mr(10, 1), mr(8, 1),  mr(4, 1),  mr(3, 1)};
      9:  r = '{NONE,      mr(9, 1),  mr(5, 1),  mr(3, 1)};
      7:  r = '{NONE,      NONE,      mr(9, 0),  mr(3, 1)};
      5:  r = '{mr(9, 1),  mr(7, 0),  mr(5, 0),  mr(3, 1)};
      3:  r = '{NONE,      mr(9, 0),  mr(7, 0),  mr(4, 1)};
      1:  r = '{NONE,      NONE,      mr(9, 1),  mr(6, 1)};
      default: r = '{default: NONE};
    endcase
    return r;
  endfunction

  // K_A of the odd angles, as a real number.
  function automatic real odd_ka(int unsigned a);
    case (a)
      45: return 0.7071;
      43: return 0.7068;
      41: return 0.7059;
      39: return 0.7018;
      37: return 0.7018;
      35: return 0.9059;
      33: return 0.8878;
      31: return 0.8926;
      29: return 0.9412;
      27: return 0.8940;
      25: return 0.8940;
      23: return 0.8926;
      21: return 0.9338;
      19: return 0.8878;
      17: return 0.8665;
      15: return 0.9697;
      13: return 0.8682;
      11: return 0.9903;
      9:  return 0.9922;
      7:  return 0.9922;
      5:  return 0.9922;
      3:  return 0.9980;
      1:  return 0.9999;
      default: return 1.0;
    endcase
  endfunction

  // Table row used for a requested angle: 2n shares the row of 2n+1.
  function automatic int unsigned row_of(int unsigned a);
    return (a > MAX_ANGLE) ? 0 : (a | 1);
  endfunction

  function automatic rot_rom_t build_rot_rom();
    rot_rom_t rom;
    for (int unsigned a = 0; a < ROM_DEPTH; a++) begin
      rom[a] = (a > MAX_ANGLE) ? rot_row_t'('0) : odd_row(row_of(a));
    end
    return rom;
  endfunction

  function automatic ka_rom_t build_ka_rom();
    ka_rom_t rom;
    for (int unsigned a = 0; a < ROM_DEPTH; a++) begin
      real v;
      v = (a > MAX_ANGLE) ? 1.0 : odd_ka(row_of(a));
      rom[a] = coord_t'($rtoi(v * real'(1 << FRAC) + 0.5));
    end
    return rom;
  endfunction

  localparam rot_rom_t ROT_ROM = build_rot_rom();
  localparam ka_rom_t  KA_ROM  = build_ka_rom();

endpackage
