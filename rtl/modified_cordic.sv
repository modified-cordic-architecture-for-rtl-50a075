// modified_cordic -- fixed-angle rotation CORDIC with one shared adder and shifter.
//
// A rotation through a known angle is done with at most four micro-rotations whose
// shift counts k(i) and directions s(i) are read from a ROM, so no angle datapath is
// needed. Instead of a separate adder/subtractor and shifter for the x and for the y
// coordinate, a single adder/subtractor and a single barrel shifter serve both:
// a line changer (two 2:1 multiplexers driven by S and its inverse) puts register X on
// the direct adder input and register Y through the shifter for the x update, and the
// other way round for the y update:
//   S = 1:  x' = x - sigma * (y >>> k(i))
//   S = 0:  y' = y + sigma * (x >>> k(i))
// The two results are collected in a two-word cos/sin memory that hands them back to
// the X/Y registers only as a pair, after both are stored.
//
// Use: hold `angle` (whole degrees, 0..45), `negate` and the start vector on the
// cycle `start` is high while the rotator is idle. With `load_ka` = 1 the start vector
// is (K_A(angle), 0) and the result is (cos, sin) of the angle; with `load_ka` = 0 it is
// (x0, y0) and the result is that vector rotated and multiplied by the CORDIC gain
// 1/K_A(angle) (1.0 .. 1.42). `negate` rotates clockwise instead. An even angle is
// served as the next odd one (shared table row). Coordinates are Q2.12; inputs of
// length up to 1.25 do not overflow.
//
// Timing: one start every 9 cycles at most. With start sampled on clock edge 0, the
// eight datapath steps take edges 1..8 and `done` is high for one cycle after edge 8,
// when x_out/y_out hold the result; they keep it until the next rotation writes the
// memory. `busy` is high during the eight steps.
//
// The architecture (shared adder, shifter, ROM, sign-bit register, line changer,
// cos/sin memory, 3-bit step counter) follows the published design; the fixed
// 2-cycles-per-slot schedule, the treatment of unused slots, the negate input, the
// external-vector mode and the edge-triggered registers (instead of latches) are
// choices of this implementation.
module modified_cordic
  import cordic_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  angle_t angle,
  input  logic   negate,
  input  logic   load_ka,
  input  coord_t x0,
  input  coord_t y0,
  output logic   busy,
  output logic   done,
  output coord_t x_out,   // cos when load_ka was set
  output coord_t y_out    // sin when load_ka was set
);

  // ---- control ----------------------------------------------------------------
  logic     load, sel_x;
  rot_idx_t idx;

  cordic_ctrl u_ctrl (
    .clk, .rst_n, .start,
    .load, .busy, .sel_x, .idx, .done
  );

  // ---- angle register and ROM -------------------------------------------------
  angle_t   angle_q;
  angle_t   rom_addr;
  rot_row_t row;
  coord_t   ka;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    angle_q <= '0;
    else if (load) angle_q <= angle;
  end

  always_comb rom_addr = load ? angle : angle_q;

  cordic_rom u_rom (.angle(rom_addr), .row, .ka);

  logic [N_ROT-1:0] row_signs;
  always_comb begin
    for (int i = 0; i < N_ROT; i++) row_signs[i] = row[i].sign;
  end

  // Shift count and use of the micro-rotation of this step; its direction comes
  // from the sign-bit register, loaded from the same row.
  shift_t cur_k;
  logic   cur_valid;
  always_comb begin
    cur_k     = row[idx].k;
    cur_valid = row[idx].valid;
  end

  // ---- sign-bit register ------------------------------------------------------
  logic sigma_pos;

  sbr #(.N(N_ROT)) u_sbr (
    .clk, .rst_n, .load,
    .sign_in(row_signs), .negate, .idx,
    .sign(sigma_pos)
  );

  // ---- X / Y registers --------------------------------------------------------
  coord_t reg_x, reg_y;
  logic   pair_valid;
  coord_t pair_x, pair_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_x <= '0;
      reg_y <= '0;
    end else if (load) begin
      reg_x <= load_ka ? ka : x0;
      reg_y <= load_ka ? '0 : y0;
    end else if (pair_valid) begin
      reg_x <= pair_x;
      reg_y <= pair_y;
    end
  end

  // ---- shared datapath --------------------------------------------------------
  coord_t direct_op, shift_in, shifted, sum;

  line_changer #(.W(WIDTH)) u_lines (
    .control(sel_x), .x1(reg_x), .x2(reg_y), .y1(direct_op), .y2(shift_in)
  );

  barrel_shifter #(.W(WIDTH), .SW(KW)) u_shift (
    .din(shift_in), .shamt(cur_k), .dout(shifted)
  );

  // x step subtracts for sigma = +1, y step adds for sigma = +1.
  logic do_sub;
  always_comb do_sub = (sel_x == sigma_pos);

  addsub #(.W(WIDTH)) u_addsub (
    .a(direct_op), .b(shifted), .sub(do_sub), .en(cur_valid), .s(sum)
  );

  cs_memory u_mem (
    .clk, .rst_n,
    .wr_en(busy), .wr_sel(~sel_x), .wr_data(sum),
    .pair_valid, .pair_x, .pair_y,
    .x_out, .y_out
  );

  // ---- checks -------------------------------------------------------------------
  a_angle_range: assert property (@(posedge clk) disable iff (!rst_n)
    load |-> angle <= angle_t'(MAX_ANGLE))
    else $error("rotation angle %0d outside 0..%0d degrees", angle, MAX_ANGLE);

  a_pair_each_rotation: assert property (@(posedge clk) disable iff (!rst_n)
    (busy && !sel_x) |-> pair_valid)
    else $error("y word written without its x word");

endmodule
