// tb_barrel_shifter -- self-checking test of the arithmetic right shifter.
//
// Every shift count 0..15 with random and corner-case signed inputs; the expected
// value is floor(din / 2^shamt), computed with real arithmetic.
module tb_barrel_shifter;
  logic               clk = 1'b0;
  logic signed [13:0] din, dout;
  logic        [3:0]  shamt;
  int                 checks = 0, failures = 0;

  barrel_shifter #(.W(14), .SW(4)) dut (.din, .shamt, .dout);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expect_v;
    for (int t = 0; t < 2000; t++) begin
      case (t % 5)
        0:       din = 14'sh2000;    // most negative
        1:       din = 14'sh1fff;    // most positive
        default: din = 14'($urandom);
      endcase
      shamt = 4'(t / 5);
      @(posedge clk);
      expect_v = int'($floor(real'(din) / (2.0 ** real'(shamt))));
      checks++;
      if (int'(dout) != expect_v) begin
        failures++;
        $display("FAIL din=%0d shamt=%0d dout=%0d want %0d", din, shamt, dout, expect_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
