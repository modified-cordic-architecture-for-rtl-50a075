// tb_cordic_ctrl -- self-checking test of the step sequencer.
//
// After a start the sequencer must give one load cycle, then eight busy steps with
// S = 1,0,1,0,... and micro-rotation index 0,0,1,1,2,2,3,3, then a one-cycle done in
// the ninth cycle counting the start cycle; starts during the steps are ignored; back-to-back
// rotations are run.
module tb_cordic_ctrl;
  import cordic_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic     load, busy, sel_x, done;
  rot_idx_t idx;
  int       checks = 0, failures = 0;

  cordic_ctrl dut (.clk, .rst_n, .start, .load, .busy, .sel_x, .idx, .done);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !load && !done, "idle after reset");
    for (int r = 0; r < 20; r++) begin
      start = 1'b1; #1;
      check(load && !busy, "load on start while idle");
      for (int s = 0; s < 8; s++) begin
        @(negedge clk);
        start = 1'($urandom);     // must be ignored while busy
        #1;
        check(busy && !load && !done, $sformatf("step %0d busy", s));
        check(sel_x == ((s % 2) == 0), $sformatf("step %0d S", s));
        check(idx == rot_idx_t'(s / 2), $sformatf("step %0d index %0d", s, idx));
      end
      @(negedge clk);
      start = 1'b0; #1;
      check(done && !busy, "done pulse 9 cycles after start");
      @(negedge clk);
      check(!done && !busy, "done is one cycle");
      repeat (r % 3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
