// tb_phy_fifo -- self-checking test of the FIFO buffer.
// Random pushes and pops (also while full or empty) are compared with a
// queue model: head value, full, empty and fill level every cycle.
module tb_phy_fifo;
  localparam int W = 9, D = 8;
  logic clk = 0, rst = 1;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];
  int saw_full = 0, saw_empty_pop = 0;

  phy_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 3000; i++) begin
      // bias towards filling in the first half, draining in the second
      wr_en   <= ($urandom_range(0, 99) < ((i % 400) < 200 ? 70 : 30));
      rd_en   <= ($urandom_range(0, 99) < ((i % 400) < 200 ? 30 : 70));
      wr_data <= W'($urandom);
      @(negedge clk);
      check(count == model.size(), "count");
      check(full == (model.size() == D), "full");
      check(empty == (model.size() == 0), "empty");
      if (model.size() > 0) check(rd_data == model[0], "head");
      if (full) saw_full++;
      if (empty && rd_en) saw_empty_pop++;
      @(posedge clk);
      if (rd_en && model.size() > 0) void'(model.pop_front());
      if (wr_en && model.size() < D + (rd_en ? 1 : 0) && !(full)) model.push_back(wr_data);
    end
    check(saw_full > 0, "full reached");
    check(saw_empty_pop > 0, "pop on empty exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
