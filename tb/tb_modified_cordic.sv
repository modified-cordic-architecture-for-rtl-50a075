// tb_modified_cordic -- end-to-end test of the shared-datapath fixed-angle CORDIC.
//
// Runs the rotator at its default sizes through
//   * cos/sin generation (start vector (K_A, 0)) for every angle 0..45, both directions;
//   * rotation of random vectors of length up to 1.2 through random angles;
//   * back-to-back rotations (start raised again in the done cycle) and starts that
//     arrive while a rotation is running and must be ignored.
// Every result is compared two ways. First bit for bit with an integer model of the
// micro-rotation recurrence x' = x - sigma*(y >>> k), y' = y + sigma*(x >>> k), whose
// x and y updates both use the old values, fed from the micro-rotation table. Second
// against real trigonometry: cos/sin of the angle served (an even angle 2n is served
// as 2n+1) within 0.003, and for vector rotation the rotated vector times the CORDIC
// gain within 0.004. The start-to-done latency must be 9 cycles counting the start
// cycle. Each mechanism of the design is counted and must occur at least once:
// cos/sin mode, vector mode, negated angle, an unused micro-rotation slot, a repeated
// shift count, an even angle, a pair release of the result memory, a back-to-back start
// and an ignored start. The 31-degree rotation is printed scaled by 4096.
module tb_modified_cordic;
  import cordic_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   start = 1'b0, negate = 1'b0, load_ka = 1'b0;
  angle_t angle = '0;
  coord_t x0 = '0, y0 = '0;
  logic   busy, done;
  coord_t x_out, y_out;

  int checks = 0, failures = 0;
  int n_ka = 0, n_vec = 0, n_neg = 0, n_unused = 0, n_repeat = 0, n_even = 0;
  int n_release = 0, n_b2b = 0, n_ignored = 0;

  modified_cordic dut (.clk, .rst_n, .start, .angle, .negate, .load_ka, .x0, .y0,
                       .busy, .done, .x_out, .y_out);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && dut.pair_valid) n_release++;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Integer model of the micro-rotations (arithmetic shifts, 14-bit wrap).
  task automatic model(input int a, input bit neg, input int xs, input int ys,
                       output int xr, output int yr);
    rot_row_t r;
    int x, y, xn, yn;
    r = ROT_ROM[a];
    x = xs; y = ys;
    for (int i = 0; i < N_ROT; i++) begin
      if (r[i].valid) begin
        bit pos;
        pos = r[i].sign ^ neg;
        xn = pos ? x - (y >>> r[i].k) : x + (y >>> r[i].k);
        yn = pos ? y + (x >>> r[i].k) : y - (x >>> r[i].k);
        x = int'(coord_t'(xn));
        y = int'(coord_t'(yn));
      end
    end
    xr = x; yr = y;
  endtask

  function automatic real absr(real v);
    return v < 0.0 ? -v : v;
  endfunction

  // One rotation: start at the next negative edge (or now, if already there) and wait
  // for done. `b2b` starts the next rotation in this one's done cycle.
  task automatic rotate(input int a, input bit neg, input bit use_ka,
                        input int xs, input int ys, input bit poke_while_busy);
    int cycles, xr, yr, xm, ym;
    real th, xe, ye, g, xf, yf;
    rot_row_t r;
    angle = angle_t'(a); negate = neg; load_ka = use_ka;
    x0 = coord_t'(xs); y0 = coord_t'(ys);
    start = 1'b1;
    cycles = 1;
    @(negedge clk);
    start = 1'b0;
    while (!done) begin
      if (poke_while_busy && cycles == 3) begin
        start = 1'b1; angle = angle_t'(a ^ 6'd2); n_ignored++;
      end else begin
        start = 1'b0;
      end
      cycles++;
      @(negedge clk);
      if (cycles > 20) break;
    end
    start = 1'b0;
    angle = angle_t'(a);
    check(done && cycles == 9, $sformatf("latency %0d cycles, want 9", cycles));
    xr = int'(x_out); yr = int'(y_out);
    model(a, neg, use_ka ? int'(KA_ROM[a]) : xs, use_ka ? 0 : ys, xm, ym);
    check(xr == xm && yr == ym,
          $sformatf("angle %0d neg %b ka %b: got (%0d,%0d) model (%0d,%0d)",
                    a, neg, use_ka, xr, yr, xm, ym));
    th = real'(a | 1) * PI / 180.0;
    if (neg) th = -th;
    xf = real'(xr) / 4096.0;
    yf = real'(yr) / 4096.0;
    r = ROT_ROM[a];
    if (use_ka) begin
      check(absr(xf - $cos(th)) < 0.003 && absr(yf - $sin(th)) < 0.003,
            $sformatf("angle %0d: (%f,%f) vs cos/sin (%f,%f)", a, xf, yf, $cos(th), $sin(th)));
      n_ka++;
    end else begin
      g = 1.0;
      for (int i = 0; i < N_ROT; i++)
        if (r[i].valid) g *= $sqrt(1.0 + 2.0 ** (-2.0 * real'(r[i].k)));
      xe = g * (real'(xs) * $cos(th) - real'(ys) * $sin(th)) / 4096.0;
      ye = g * (real'(xs) * $sin(th) + real'(ys) * $cos(th)) / 4096.0;
      check(absr(xf - xe) < 0.004 && absr(yf - ye) < 0.004,
            $sformatf("vector angle %0d: (%f,%f) vs (%f,%f)", a, xf, yf, xe, ye));
      n_vec++;
    end
    if (neg) n_neg++;
    if (a % 2 == 0) n_even++;
    if (!r[N_ROT-1].valid) n_unused++;
    for (int i = 1; i < N_ROT; i++)
      if (r[i].valid && r[i].k == r[i-1].k) begin n_repeat++; break; end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // Cos/sin generation for every angle and direction, each started in the done
    // cycle of the previous one.
    for (int a = 0; a <= 45; a++) begin
      for (int n = 0; n < 2; n++) begin
        rotate(a, n[0], 1'b1, 0, 0, 1'b0);
        n_b2b++;
      end
    end
    // The 31-degree case, scaled by 4096.
    rotate(31, 1'b0, 1'b1, 0, 0, 1'b0);
    $display("31 degrees: cos*4096 = %0d, sin*4096 = %0d", x_out, y_out);
    check(x_out >= 3505 && x_out <= 3517 && y_out >= 2104 && y_out <= 2116, "31-degree values");
    @(negedge clk);

    // Random vectors through random angles, some with a start poked while busy.
    for (int t = 0; t < 400; t++) begin
      real len, ph;
      int xs, ys;
      len = 1.2 * real'($urandom_range(1000)) / 1000.0;
      ph  = 2.0 * PI * real'($urandom_range(3600)) / 3600.0;
      xs  = $rtoi(len * $cos(ph) * 4096.0);
      ys  = $rtoi(len * $sin(ph) * 4096.0);
      rotate(int'($urandom_range(45)), 1'($urandom), 1'b0, xs, ys, (t % 5) == 0);
      repeat ($urandom_range(2)) @(negedge clk);
    end

    check(n_ka > 0,      "cos/sin mode never ran");
    check(n_vec > 0,     "vector mode never ran");
    check(n_neg > 0,     "negated angle never ran");
    check(n_unused > 0,  "no row with an unused slot");
    check(n_repeat > 0,  "no repeated shift count");
    check(n_even > 0,    "no even angle");
    check(n_release > 0, "memory never released a pair");
    check(n_b2b > 0,     "no back-to-back start");
    check(n_ignored > 0, "no start while busy");
    $display("mechanisms: cos/sin %0d, vector %0d, negated %0d, unused slot %0d, repeated k %0d, even angle %0d, pair releases %0d, back-to-back %0d, ignored starts %0d",
             n_ka, n_vec, n_neg, n_unused, n_repeat, n_even, n_release, n_b2b, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
