// tb_phy_transmitter -- self-checking test of the transmit half.
// The lane is watched by an independent receive chain (deserializer, 8b/10b
// decoder, descrambler) in the testbench. Checks: symbols every ten clocks;
// no code or disparity error; the lane starts with COM; a packet appears as
// STP, its bytes in order, END, and not before its closing mark was written
// (store-and-forward); framing characters are not scrambled while data is;
// idle between packets; a write into a full buffer is dropped.
module tb_phy_transmitter;
  import pcie_phy_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst = 1;
  logic [7:0] d = 0;
  logic control = 0, wr = 0;
  logic sout, full;
  int checks = 0, failures = 0;

  phy_transmitter #(.DEPTH(DEPTH)) dut (.*);

  // reference receive chain
  logic [9:0] sym;  logic sym_v;
  logic [7:0] rc;   logic rk, rv, ce, de;
  logic [7:0] pc;   logic pk, pv;
  deserializer  r_des (.clk, .rst, .sin(sout), .dout(sym), .valid(sym_v));
  decoder_8b10b r_dec (.clk, .rst, .en(sym_v), .din(sym), .dout(rc), .dout_k(rk), .valid(rv),
                       .code_err(ce), .disp_err(de));
  descrambler   r_dsc (.clk, .rst, .en(rv), .din(rc), .din_k(rk), .dout(pc), .dout_k(pk), .valid(pv));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // character log from the lane
  logic [8:0] rx_log[$];
  int last_v = -1, cyc = 0, n_sym = 0, n_idle = 0, n_scr = 0, n_kclear = 0;
  bit end_mark_written = 0, stp_seen_early = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst && sym_v) begin
      if (last_v >= 0) check(cyc - last_v == 10, "symbol period");
      last_v = cyc;
    end
    if (!rst && rv) begin
      check(!ce && !de, "no code error on the lane");
      if (rk) n_kclear++;
    end
    if (!rst && pv) begin
      n_sym++;
      rx_log.push_back({pk, pc});
      if (!pk && pc != rc) n_scr++;
      if (pk && pc == K_STP && !end_mark_written) stp_seen_early = 1;
    end
  end

  task automatic write(input logic [7:0] v, input logic m);
    @(negedge clk);
    d = v; control = m; wr = 1;
    @(negedge clk);
    wr = 0;
  endtask

  logic [7:0] pkt [6];
  int p;
  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    // packet 1, written slowly: it must not start before its end mark
    write(8'h00, 1);
    for (int i = 0; i < 6; i++) begin
      pkt[i] = 8'($urandom);
      repeat (15) @(negedge clk);
      write(pkt[i], 0);
    end
    repeat (40) @(negedge clk);
    // the buffer is now full (mark + 6 bytes + one more write = 8); the
    // ninth write must be dropped
    write(8'h00, 1);
    end_mark_written = 1;
    check(full, "buffer full");
    write(8'h77, 0);
    repeat (200) @(negedge clk);
    check(!stp_seen_early, "packet held until complete");
    // first characters: two COM
    check(rx_log.size() > 2 && rx_log[0] == {1'b1, K_COM} && rx_log[1] == {1'b1, K_COM}, "COM start");
    // find STP and compare the packet
    p = -1;
    foreach (rx_log[i]) if (p < 0 && rx_log[i] == {1'b1, K_STP}) p = i;
    check(p > 2, "STP found after idle");
    for (int i = 2; i < p; i++) begin
      check(rx_log[i] == 9'h000, "idle is data 00");
      n_idle++;
    end
    for (int i = 0; i < 6; i++) check(rx_log[p + 1 + i] == {1'b0, pkt[i]}, "packet byte");
    check(rx_log[p + 7] == {1'b1, K_END}, "END");
    check(rx_log[p + 8] == 9'h000, "idle after packet");
    check(n_idle > 0 && n_scr > 0 && n_kclear > 0, "idle, scrambled data and clear K seen");
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
