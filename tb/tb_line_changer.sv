// tb_line_changer -- self-checking test of the line changer.
//
// Random words on both lines with both control values: control = 1 passes the lines
// straight through, control = 0 crosses them.
module tb_line_changer;
  logic        clk = 1'b0, control;
  logic [13:0] x1, x2, y1, y2;
  int          checks = 0, failures = 0;

  line_changer #(.W(14)) dut (.control, .x1, .x2, .y1, .y2);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      x1 = 14'($urandom);
      x2 = 14'($urandom);
      control = 1'(t & 1);
      @(posedge clk);
      checks += 2;
      if (control ? (y1 !== x1 || y2 !== x2) : (y1 !== x2 || y2 !== x1)) begin
        failures++;
        $display("FAIL control=%b x1=%h x2=%h y1=%h y2=%h", control, x1, x2, y1, y2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
