// tb_encoder_8b10b -- self-checking test of the 8b/10b encoder.
// Part 1: a fixed character sequence compared with code groups taken from the
// published 8b/10b tables, covering both disparities, K28.5, K27.7, K29.7,
// D.x.A7 and D.x.P7. Part 2: 3000 random characters, checked for the code's
// properties: every symbol has disparity 0 or +-2, the running sum stays
// within +-1 (so the encoder's rd output must match it), no run of more than
// five equal bits, and the comma pattern only inside K28.5/K28.1/K28.7.
module tb_encoder_8b10b;
  import pcie_phy_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  logic [7:0] din = 0;
  logic din_k = 0;
  logic [9:0] dout;
  logic rd;
  int checks = 0, failures = 0;

  encoder_8b10b dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s dout=%b rd=%b", what, dout, rd); end
  endtask

  task automatic enc(input logic [7:0] c, input logic k);
    @(negedge clk);
    din = c; din_k = k; en = 1;
    @(posedge clk); #1;
    en = 0;
  endtask

  typedef struct { logic [7:0] c; logic k; logic [9:0] code; logic rd_after; } vec_t;
  vec_t v [13] = '{
    '{8'hBC, 1, 10'b110000_0101, 0},  // K28.5 RD+
    '{8'h00, 0, 10'b100111_0100, 0},  // D0.0  RD-
    '{8'hF1, 0, 10'b100011_0111, 1},  // D17.7 RD- (A7)
    '{8'hEB, 0, 10'b110100_1000, 0},  // D11.7 RD+ (A7)
    '{8'hFB, 1, 10'b110110_1000, 0},  // K27.7 RD-
    '{8'hFD, 1, 10'b101110_1000, 0},  // K29.7 RD-
    '{8'hFF, 0, 10'b101011_0001, 0},  // D31.7 RD-
    '{8'hB5, 0, 10'b101010_1010, 0},  // D21.5
    '{8'hBC, 1, 10'b001111_1010, 1},  // K28.5 RD-
    '{8'h00, 0, 10'b011000_1011, 1},  // D0.0  RD+
    '{8'hFB, 1, 10'b001001_0111, 1},  // K27.7 RD+
    '{8'hFD, 1, 10'b010001_0111, 1},  // K29.7 RD+
    '{8'hFF, 0, 10'b010100_1110, 1}   // D31.7 RD+
  };

  int sum, run, maxrun;
  logic lastbit;
  logic [19:0] two;
  logic [9:0] prev;
  logic [7:0] c;
  logic k;
  logic prev_k287 = 1'b0;

  initial begin
    @(posedge clk); #1;
    check(dout == 10'b001111_1010 && rd == 1'b1, "reset state");
    rst = 0;
    for (int i = 0; i < 13; i++) begin
      enc(v[i].c, v[i].k);
      check(dout == v[i].code && rd == v[i].rd_after, $sformatf("vector %0d", i));
    end
    // properties on a random stream; running sum starts from rd
    sum = rd ? 1 : -1;
    run = 0; maxrun = 0; lastbit = 1'bx; prev = dout;
    for (int i = 0; i < 3000; i++) begin
      k = ($urandom_range(0, 7) == 0);
      if (k) begin
        case ($urandom_range(0, 11))
          0: c = 8'hF7; 1: c = 8'hFB; 2: c = 8'hFD; 3: c = 8'hFE;
          default: c = {3'($urandom), 5'd28};
        endcase
      end else c = 8'($urandom);
      enc(c, k);
      sum += 2 * $countones(dout) - 10;
      check(sum == 1 || sum == -1, "running sum bounded");
      check(rd == (sum > 0), "rd output matches running sum");
      for (int b = 9; b >= 0; b--) begin
        if (dout[b] == lastbit) run++; else run = 1;
        lastbit = dout[b];
        if (run > maxrun) maxrun = run;
      end
      two = {prev, dout};
      for (int s = 1; s < 10; s++) begin
        // comma (0011111 or 1100000) must not start inside a symbol except
        // for K28.1/5/7, where it starts at bit a.
        // K28.7 is known to form one with some followers; it is exempt.
        if (!prev_k287)
          check(two[19-s -: 7] != 7'b0011111 && two[19-s -: 7] != 7'b1100000,
                "no comma across a boundary");
      end
      prev = dout;
      prev_k287 = k && c == 8'hFC;
    end
    check(maxrun <= 5, "run length at most 5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
