// tb_serializer -- self-checking test of the parallel-to-serial converter.
// Random symbols are offered; the load pulse must come exactly every ten
// clocks (one bit per clock, the lane rate) and the ten bits that follow each
// load must be that symbol, bit 9 (a) first.
module tb_serializer;
  logic clk = 0, rst = 1;
  logic [9:0] din = 0, taken;
  logic load, sout;
  int checks = 0, failures = 0;
  int last_load = -1, cyc = 0;
  logic [9:0] q[$];

  serializer dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    @(posedge clk); #1;
    rst = 0;
    for (cyc = 0; cyc < 600; cyc++) begin
      @(negedge clk);
      if (load) begin
        if (last_load >= 0) check(cyc - last_load == 10, "load period is 10 clocks");
        last_load = cyc;
        din = 10'($urandom);
        q.push_back(din);
      end
      @(posedge clk); #1;
      // bits of the symbol loaded in the previous cycles
      if (cyc >= 1 && q.size() > 0) begin
        taken = q[0];
        check(sout == taken[9 - (cyc % 10)], "serial bit");
        if (cyc % 10 == 9) void'(q.pop_front());
      end
    end
    check(last_load > 500, "loads continued");
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
