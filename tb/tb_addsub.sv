// tb_addsub -- self-checking test of the adder/subtractor.
//
// Random operands small enough not to overflow, all combinations of `sub` and `en`;
// expected results computed in integer arithmetic.
module tb_addsub;
  logic               clk = 1'b0, sub, en;
  logic signed [13:0] a, b, s;
  int                 checks = 0, failures = 0;

  addsub #(.W(14)) dut (.a, .b, .sub, .en, .s);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ai, bi, want;
    for (int t = 0; t < 1000; t++) begin
      ai  = int'($urandom_range(8190)) - 4095;
      bi  = int'($urandom_range(8190)) - 4095;
      a   = 14'(ai);
      b   = 14'(bi);
      sub = 1'(t & 1);
      en  = (t % 4) != 3;
      @(posedge clk);
      want = !en ? ai : (sub ? ai - bi : ai + bi);
      checks++;
      if (int'(s) != want) begin
        failures++;
        $display("FAIL a=%0d b=%0d sub=%b en=%b s=%0d want %0d", ai, bi, sub, en, s, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
