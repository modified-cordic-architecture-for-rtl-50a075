// tb_sbr -- self-checking test of the sign-bit register.
//
// Loads random sign patterns, with and without negation, and reads back every index;
// also checks that the stored bits hold while `load` is low and that reset clears them.
module tb_sbr;
  logic       clk = 1'b0, rst_n = 1'b0, load = 1'b0, negate = 1'b0, sign;
  logic [3:0] sign_in = '0, expect_bits;
  logic [1:0] idx = '0;
  int         checks = 0, failures = 0;

  sbr #(.N(4)) dut (.clk, .rst_n, .load, .sign_in, .negate, .idx, .sign);

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
    for (int i = 0; i < 4; i++) begin
      idx = 2'(i); #1;
      check(sign == 1'b0, "reset value");
    end
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      sign_in = 4'($urandom);
      negate  = 1'($urandom);
      load    = 1'b1;
      expect_bits = negate ? ~sign_in : sign_in;
      @(negedge clk);
      load    = 1'b0;
      sign_in = ~sign_in;          // must not be taken while load is low
      negate  = 1'($urandom);
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        idx = 2'(i); #1;
        check(sign == expect_bits[i], $sformatf("bit %0d: got %b want %b", i, sign, expect_bits[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
