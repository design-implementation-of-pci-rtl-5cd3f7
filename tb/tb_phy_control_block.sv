// tb_phy_control_block -- self-checking test of the framing control block.
// Packets (a mark, 0..6 data entries, a mark) are written into a queue that
// stands for the transmit buffer, at random times, while symbol slots come at
// random. In every slot the block must read the buffer only when it is inside
// a packet or a whole packet (two marks) is queued, must steer the mux to the
// framing character exactly when a mark is read, and must give STP for the
// first (SDP when the start mark carries the DLLP flag) and END for the
// second mark of each packet. Stray data outside a packet and writes into a
// full buffer must be refused.
module tb_phy_control_block;
  import pcie_phy_pkg::*;
  logic clk = 0, rst = 1;
  logic wr = 0, control = 0, full = 0, tick = 0, head_valid, head_mark, head_dllp;
  logic buf_wr, pop, sel, in_pkt;
  bit wr_mark;
  bit w_in = 0;      // reference: writer between a start and an end mark
  int n_stray = 0, n_fullref = 0;
  logic [7:0] frame_char;
  int checks = 0, failures = 0;
  bit [1:0] q[$];    // bit 0: mark, bit 1: DLLP flag of a start mark
  bit tx_in = 0;     // reference: a start character has gone out
  int to_write = 0, data_left = 0, marks_left = 0;
  int n_sdp = 0, n_stp = 0, n_end = 0, n_hold = 0;
  bit exp_pop;
  int nmarks;

  phy_control_block dut (.*);
  always #5 clk = ~clk;

  always_comb begin
    head_valid = (q.size() > 0);
    head_mark  = (q.size() > 0) ? q[0][0] : 1'b0;
    head_dllp  = (q.size() > 0) ? q[0][1] : 1'b0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t pop=%b exp=%b sel=%b in_pkt=%b tx_in=%b q=%0d tick=%b", what, $time, pop, exp_pop, sel, in_pkt, tx_in, q.size(), tick); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      // writer: start a new packet now and then, write one entry per cycle
      wr_mark = 0; wr = 0; control = 0;
      full = (q.size() >= 12);
      if (marks_left == 0 && cyc < 3500 && $urandom_range(0, 19) == 0) begin
        marks_left = 2; data_left = $urandom_range(0, 6);
      end
      if (marks_left > 0 && $urandom_range(0, 2) != 0) begin
        wr = 1;
        control = (marks_left == 2 || data_left == 0);
        if (!full) begin
          if (control) begin
            wr_mark = 1; q.push_back({1'($urandom), 1'b1}); marks_left--; w_in = !w_in;
          end else begin
            q.push_back({1'($urandom), 1'b0}); data_left--;
          end
        end else n_fullref++;
      end else if (marks_left == 0 && $urandom_range(0, 29) == 0) begin
        // stray data byte outside a packet: must be refused
        wr = 1; control = 0; n_stray++;
      end
      tick = ($urandom_range(0, 3) == 0);
      #1;
      // reference decision on the queue as it stands before this write
      nmarks = 0;
      // a mark written in this cycle is not counted by the block yet
      for (int i = 0; i < q.size() - (wr_mark ? 1 : 0); i++) nmarks += q[i][0];
      exp_pop = tick && head_valid && (tx_in || nmarks >= 2);
      check(pop == exp_pop, "pop decision");
      check(sel == (exp_pop && head_mark), "mux select");
      if (exp_pop && head_mark) check(frame_char == (tx_in ? K_END : (head_dllp ? K_SDP : K_STP)), "framing character");
      check(in_pkt == tx_in, "in_pkt");
      check(buf_wr == (wr && !full && (control || w_in)), "buffer write gating");
      if (tick && head_valid && !exp_pop) n_hold++;
      @(posedge clk); #1;
      if (exp_pop) begin
        if (q[0][0]) begin
          if (tx_in) n_end++; else if (q[0][1]) n_sdp++; else n_stp++;
          tx_in = !tx_in;
        end
        void'(q.pop_front());
      end
    end
    check(n_stp > 10 && n_sdp > 10 && n_end > 20, "TLPs and DLLPs framed");
    check(n_hold > 0, "incomplete packet held back");
    check(n_stray > 0 && n_fullref > 0, "stray and full writes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
