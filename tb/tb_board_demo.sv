// tb_board_demo -- the FPGA board demonstration as a simulation.
//
// Reproduces the board test of the design: a 27 MHz clock, eight data
// switches, a control switch marking the start and end of a frame, write and
// read switches, an active-high reset switch and eight LEDs showing the
// received byte. Each switch action is applied as a one-clock pulse, as an
// edge detector on the board would make it. Three frames are sent: a one-byte
// TLP, a four-byte TLP and a two-byte DLLP; after each frame the LEDs must
// show the bytes in order. Byte i of a frame must be readable within 53 + 10*i
// clocks of the end mark: up to 10 clocks to the next symbol slot, one slot
// for the start character, one per byte, and 33 clocks through the loop. At
// 27 MHz a character takes 370 ns on the lane.
`timescale 1ns / 1ps
module tb_board_demo;
  logic clk = 0, rst = 1;
  logic [7:0] d = 0, y;
  logic control = 0, wr = 0, rd = 0;
  int checks = 0, failures = 0;

  pcie_phy_top dut (.clk, .rst, .d, .control, .wr, .rd, .y);

  always #18.518 clk = ~clk;  // 27 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s LEDs=%h at %0t", what, y, $time); end
  endtask

  task automatic press(input logic [7:0] sw, input logic ctl);
    @(negedge clk);
    d = sw; control = ctl; wr = 1;
    @(negedge clk);
    wr = 0;
  endtask

  task automatic frame(input logic [7:0] b[], input bit dllp);
    realtime t_end;
    press({7'h00, dllp}, 1'b1);
    foreach (b[i]) press(b[i], 1'b0);
    press(8'h00, 1'b1);
    t_end = $realtime;
    foreach (b[i]) begin
      while (dut.u_rx.empty) @(negedge clk);
      check($realtime - t_end <= (53 + 10 * i) * 37.037, "byte on time");
      check(y == b[i], "LEDs show the byte");
      @(negedge clk);
      rd = 1;
      @(negedge clk);
      rd = 0;
    end
    repeat (20) @(negedge clk);
    check(dut.u_rx.empty, "nothing extra");
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst = 0;
    frame('{8'hA5}, 1'b0);
    frame('{8'h01, 8'h80, 8'hFF, 8'h3C}, 1'b0);
    frame('{8'h5C, 8'hBC}, 1'b1);   // byte values of K characters, sent as data
    check(!dut.u_rx.code_err, "no code error");
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
