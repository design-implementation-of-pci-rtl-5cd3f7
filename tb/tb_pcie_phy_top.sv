// tb_pcie_phy_top -- end-to-end test of the looped-back x1 physical layer at
// its default sizes.
//
// The testbench acts as the upper layer on both sides, as the switches and
// LEDs of a board would: it writes random packets (a mark, 1..30 bytes, a
// mark; odd packets flagged as DLLPs) with random gaps through d/control/wr and reads y with rd whenever the
// receive buffer holds a byte. Every byte must come out once, in order, with
// no code error. It also counts that each mechanism of the design happened:
// framing (STP, SDP and END sent), store-and-forward hold of an incomplete packet,
// logical idle on the lane, scrambling of data, both running disparities,
// idle dropped by the receive filter, and a write refused by a full transmit
// buffer. Internal status is observed through hierarchical references, since
// the top's pins are only those of the board.
module tb_pcie_phy_top;
  import pcie_phy_pkg::*;
  logic clk = 0, rst = 1;
  logic [7:0] d = 0, y;
  logic control = 0, wr = 0, rd = 0;
  int checks = 0, failures = 0;

  pcie_phy_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s y=%h at %0t", what, y, $time); end
  endtask

  logic [7:0] sent[$];
  int n_rx = 0, n_pkts = 0;
  int n_sdp = 0, n_stp = 0, n_end = 0, n_hold = 0, n_idle = 0, n_scr = 0, n_rdpos = 0, n_rdneg = 0;
  int n_drop_idle = 0, n_full_drop = 0;
  bit writer_done = 0;

  // mechanism counters
  always @(posedge clk) if (!rst) begin
    if (dut.u_tx.tick) begin
      if (dut.u_tx.sel && dut.u_tx.frame_char == K_STP) n_stp++;
      if (dut.u_tx.sel && dut.u_tx.frame_char == K_SDP) n_sdp++;
      if (dut.u_tx.sel && dut.u_tx.frame_char == K_END) n_end++;
      if (!dut.u_tx.empty && !dut.u_tx.pop) n_hold++;
      if (!dut.u_tx.pop) n_idle++;
      if (!dut.u_tx.mux_k && dut.u_tx.u_scrambler.key != 8'h00) n_scr++;
      if (dut.u_tx.enc_rd) n_rdpos++; else n_rdneg++;
    end
    if (dut.u_rx.ch_valid && !dut.u_rx.ch_k && !dut.u_rx.in_pkt) n_drop_idle++;
    if (dut.u_rx.dec_valid) check(!dut.u_rx.dec_cerr && !dut.u_rx.dec_derr, "no lane error");
    if (wr && dut.u_tx.full) n_full_drop++;
  end

  task automatic wr1(input logic [7:0] v, input logic m);
    @(negedge clk);
    d = v; control = m; wr = 1;
    @(negedge clk);
    wr = 0;
  endtask

  // writer
  int len;
  logic [7:0] b;
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int p = 0; p < 40; p++) begin
      len = $urandom_range(1, 30);
      // leave room: wait for the transmit buffer to drain enough
      while (dut.u_tx.fill > 32 - (len + 2)) @(negedge clk);
      wr1({7'h00, p[0]}, 1);  // odd packets are framed as DLLPs
      for (int i = 0; i < len; i++) begin
        b = 8'($urandom);
        wr1(b, 0);
        sent.push_back(b);
        if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 30)) @(negedge clk);
      end
      wr1(8'h00, 1);
      n_pkts++;
      repeat ($urandom_range(0, 200)) @(negedge clk);
    end
    // fill the buffer with one complete packet of 30 bytes, then write into
    // the full buffer: that byte must be refused
    while (!dut.u_tx.empty) @(negedge clk);
    repeat (5) @(negedge clk);
    @(negedge clk);
    // write the whole packet in one burst so the buffer is full before the
    // first slot reads it
    wr1(8'h00, 1);
    for (int i = 0; i < 30; i++) begin
      b = 8'($urandom);
      wr1(b, 0);
      sent.push_back(b);
    end
    wr1(8'h00, 1);
    // the buffer is full until the next slot reads it: a start mark written
    // now must be refused
    while (!(dut.u_tx.full && !dut.u_tx.tick)) @(negedge clk);
    d = 8'h00; control = 1; wr = 1;
    @(negedge clk);
    wr = 0;
    // a stray data byte outside a packet must be refused as well
    wr1(8'hEE, 0);
    n_pkts++;
    writer_done = 1;
  end

  // reader
  initial begin
    @(negedge clk);
    forever begin
      @(negedge clk);
      rd = 0;
      if (!rst && !dut.u_rx.empty && $urandom_range(0, 3) != 0) begin
        check(sent.size() > 0, "no unexpected byte");
        if (sent.size() > 0) check(y == sent.pop_front(), "byte in order");
        n_rx++;
        rd = 1;
      end
    end
  end

  initial begin
    wait (writer_done);
    while (sent.size() > 0) @(negedge clk);
    repeat (200) @(negedge clk);
    check(dut.u_rx.empty, "nothing extra received");
    check(!dut.u_rx.overflow, "no receive overflow");
    check(!dut.u_rx.code_err, "no code error");
    check(n_stp + n_sdp == n_pkts && n_end == n_pkts, "one start and one END per packet");
    check(n_stp > 0 && n_sdp > 0, "TLP (STP) and DLLP (SDP) framing");
    check(n_hold > 0, "store-and-forward hold happened");
    check(n_idle > 0, "logical idle sent");
    check(n_scr > 0, "data scrambled");
    check(n_rdpos > 0 && n_rdneg > 0, "both running disparities");
    check(n_drop_idle > 0, "receive filter dropped idle");
    check(n_full_drop > 0, "write refused by a full buffer");
    $display("packets=%0d bytes=%0d hold=%0d idle=%0d full_refused=%0d", n_pkts, n_rx, n_hold, n_idle, n_full_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
