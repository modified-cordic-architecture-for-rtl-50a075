// tb_cordic_rom -- self-checking test of the micro-rotation and K_A ROM.
//
// For every address 0..63 the testbench reads the row and checks it against the
// arithmetic it must satisfy, computed here in real numbers: the micro-rotation angles
// sum_i sigma_i * atan(2^-k(i)) must land within 0.04 degree of the odd angle the
// address is served as (2n -> 2n+1), and K_A must be within 0.0012 of
// 1 / prod_i sqrt(1 + 2^(-2 k(i))). A few rows are also compared entry by entry with
// the published decomposition, and addresses above 45 must hold no micro-rotation and
// K_A = 1.0.
module tb_cordic_rom;
  import cordic_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic     clk = 1'b0;
  angle_t   angle;
  rot_row_t row;
  coord_t   ka;
  int       checks = 0, failures = 0;

  cordic_rom dut (.angle, .row, .ka);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL angle=%0d: %s", angle, what);
    end
  endtask

  function automatic bit row_is(rot_row_t r, int k0, int s0, int k1, int s1,
                                int k2, int s2, int k3, int s3);
    int ks [4] = '{k0, k1, k2, k3};
    int ss [4] = '{s0, s1, s2, s3};
    for (int i = 0; i < 4; i++) begin
      if (ks[i] < 0) begin
        if (r[i].valid) return 1'b0;
      end else begin
        if (!r[i].valid || r[i].k != shift_t'(ks[i]) || r[i].sign != ss[i][0]) return 1'b0;
      end
    end
    return 1'b1;
  endfunction

  initial begin
    real sum_deg, gain, ka_real, target;
    for (int a = 0; a < 64; a++) begin
      angle = angle_t'(a);
      @(posedge clk);
      sum_deg = 0.0;
      gain    = 1.0;
      for (int i = 0; i < N_ROT; i++) begin
        if (row[i].valid) begin
          real e;
          e = $atan(2.0 ** (-real'(row[i].k))) * 180.0 / PI;
          sum_deg += row[i].sign ? e : -e;
          gain *= $sqrt(1.0 + 2.0 ** (-2.0 * real'(row[i].k)));
        end
      end
      ka_real = real'(ka) / 4096.0;
      if (a <= 45) begin
        target = real'(a | 1);
        check((sum_deg - target) < 0.04 && (target - sum_deg) < 0.04,
              $sformatf("angle sum %f, want %f", sum_deg, target));
        check((ka_real - 1.0 / gain) < 0.0012 && (1.0 / gain - ka_real) < 0.0012,
              $sformatf("K_A %f, gain formula gives %f", ka_real, 1.0 / gain));
      end else begin
        check(row == '0, "row above 45 degrees not empty");
        check(ka == coord_t'(4096), "K_A above 45 degrees not 1.0");
      end
    end
    // Entry-by-entry comparison with published rows (-1 marks an unused slot).
    angle = 6'd35; @(posedge clk);
    check(row_is(row, 2, 1, 2, 1, 2, 1, 3, 0), "row 35");
    angle = 6'd17; @(posedge clk);
    check(row_is(row, 1, 1, 2, 0, 4, 1, 6, 1), "row 17");
    angle = 6'd16; @(posedge clk);
    check(row_is(row, 1, 1, 2, 0, 4, 1, 6, 1), "row 16 shares row 17");
    angle = 6'd1; @(posedge clk);
    check(row_is(row, 6, 1, 9, 1, -1, 0, -1, 0), "row 1");
    angle = 6'd45; @(posedge clk);
    check(row_is(row, 0, 1, -1, 0, -1, 0, -1, 0), "row 45");
    check(ka == coord_t'(2896), "K_A 45");
    angle = 6'd21; @(posedge clk);
    check(row_is(row, 2, 1, 2, 1, 3, 0, 10, 1), "row 21");
    check(ka == coord_t'(3825), "K_A 21 = 0.9338");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
