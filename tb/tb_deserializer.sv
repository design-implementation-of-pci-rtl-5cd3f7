// tb_deserializer -- self-checking test of the serial-to-parallel converter.
// A random bit stream is shifted in from the first clock after reset. Every
// ten clocks the last ten bits (first in dout[9]) must be presented with a
// one-clock valid; the partial word after reset must not be reported.
module tb_deserializer;
  logic clk = 0, rst = 1, sin = 0;
  logic [9:0] dout;
  logic valid;
  int checks = 0, failures = 0;
  logic bits [1000];
  logic [9:0] exp_w;
  int nvalid = 0;

  deserializer dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s dout=%b", what, dout); end
  endtask

  initial begin
    @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int n = 0; n < 1000; n++) begin
      bits[n] = 1'($urandom);
      sin = bits[n];
      @(posedge clk); #1;
      if (n % 10 == 0 && n >= 10) begin
        for (int b = 0; b < 10; b++) exp_w[9 - b] = bits[n - 9 + b];
        check(valid, "valid every ten clocks");
        check(dout == exp_w, "word");
        nvalid++;
      end else begin
        check(!valid, "no valid between words");
      end
      @(negedge clk);
    end
    check(nvalid == 99, "word count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
