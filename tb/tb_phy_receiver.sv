// tb_phy_receiver -- self-checking test of the receive half.
// A transmit chain in the testbench (scrambler, 8b/10b encoder, serializer)
// sends a scripted character stream: idle, data outside any packet, an
// STP...END packet, an SDP...EDB packet, an over-long packet that overflows
// the buffer, and finally a corrupted symbol. Only the bytes inside packets
// may reach the buffer, in order; overflow and code_err must be raised only
// when provoked.
module tb_phy_receiver;
  import pcie_phy_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst = 1;
  logic rd = 0;
  logic [7:0] y;
  logic empty, code_err, overflow;
  logic lane, flip = 0;
  int checks = 0, failures = 0;

  phy_receiver #(.DEPTH(DEPTH)) dut (.clk, .rst, .sin(lane ^ flip), .rd, .y, .empty, .code_err, .overflow);

  // stimulus transmit chain
  logic tick;
  logic [7:0] c = 0, sc;
  logic k = 0, sk;
  logic [9:0] code;
  logic enc_rd;
  scrambler     s_scr (.clk, .rst, .en(tick), .din(c), .din_k(k), .dout(sc), .dout_k(sk));
  encoder_8b10b s_enc (.clk, .rst, .en(tick), .din(sc), .din_k(sk), .dout(code), .rd(enc_rd));
  serializer    s_ser (.clk, .rst, .din(code), .load(tick), .sout(lane));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s y=%h at %0t", what, y, $time); end
  endtask

  logic [8:0] tx_q[$];
  // feed one character per symbol slot; idle (00h data) when nothing queued
  initial begin
    forever begin
      @(negedge clk);
      if (tick) begin
        if (tx_q.size() > 0) {k, c} = tx_q.pop_front();
        else {k, c} = 9'h000;
      end
    end
  end

  task automatic send_pkt(input logic [7:0] start, input logic [7:0] stop, input int n,
                          input logic [7:0] base);
    tx_q.push_back({1'b1, start});
    for (int i = 0; i < n; i++) tx_q.push_back({1'b0, 8'(base + i)});
    tx_q.push_back({1'b1, stop});
  endtask

  task automatic expect_bytes(input int n, input logic [7:0] base);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      check(!empty, "byte available");
      check(y == 8'(base + i), "byte value");
      rd = 1;
      @(negedge clk);
      rd = 0;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    // data outside a packet must be ignored
    for (int i = 0; i < 4; i++) tx_q.push_back({1'b0, 8'hA0 + 8'(i)});
    send_pkt(K_STP, K_END, 5, 8'h10);
    send_pkt(K_SDP, K_EDB, 3, 8'h40);
    wait (tx_q.size() == 0);
    repeat (60) @(negedge clk);
    check(!code_err && !overflow, "clean so far");
    expect_bytes(5, 8'h10);
    expect_bytes(3, 8'h40);
    @(negedge clk);
    check(empty, "only packet bytes stored");
    // overflow: 10 bytes into an 8-entry buffer
    send_pkt(K_STP, K_END, 10, 8'h60);
    wait (tx_q.size() == 0);
    repeat (60) @(negedge clk);
    check(overflow, "overflow flagged");
    expect_bytes(DEPTH, 8'h60);
    check(!code_err, "no code error yet");
    // corrupt one bit on the lane
    repeat (3) @(negedge clk);
    flip = 1;
    @(negedge clk);
    flip = 0;
    repeat (40) @(negedge clk);
    check(code_err, "code error flagged");
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
