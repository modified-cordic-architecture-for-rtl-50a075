// tb_cs_memory -- self-checking test of the cos/sin result memory.
//
// Writes random x/y word pairs and checks that a pair is released (pair_valid with the
// stored x and the incoming y) only on the y write that follows an x write, that a
// lone y write releases nothing, and that x_out/y_out hold the stored words.
module tb_cs_memory;
  import cordic_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0, wr_en = 1'b0, wr_sel = 1'b0, pair_valid;
  coord_t wr_data = '0, pair_x, pair_y, x_out, y_out;
  int     checks = 0, failures = 0;

  cs_memory dut (.clk, .rst_n, .wr_en, .wr_sel, .wr_data, .pair_valid, .pair_x, .pair_y,
                 .x_out, .y_out);

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
    coord_t xv, yv;
    repeat (2) @(posedge clk);
    check(x_out == '0 && y_out == '0 && !pair_valid, "reset state");
    rst_n = 1'b1;
    // A y word with no x word before it releases nothing.
    @(negedge clk);
    wr_en = 1'b1; wr_sel = 1'b1; wr_data = coord_t'(123); #1;
    check(!pair_valid, "lone y write must not release");
    for (int t = 0; t < 300; t++) begin
      xv = coord_t'($urandom);
      yv = coord_t'($urandom);
      @(negedge clk);
      wr_en = 1'b1; wr_sel = 1'b0; wr_data = xv; #1;
      check(!pair_valid, "x write must not release");
      @(negedge clk);
      wr_en = 1'b1; wr_sel = 1'b1; wr_data = yv; #1;
      check(pair_valid && pair_x == xv && pair_y == yv,
            $sformatf("pair %0d,%0d released as %b %0d,%0d", xv, yv, pair_valid, pair_x, pair_y));
      @(negedge clk);
      wr_en = 1'($urandom); wr_sel = 1'b1; wr_data = coord_t'($urandom); #1;
      check(!pair_valid, "second y write must not release");
      if (!wr_en) check(x_out == xv && y_out == yv, "stored words");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
