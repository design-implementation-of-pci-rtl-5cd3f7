// tb_scrambler -- self-checking test of the transmit scrambler.
// Scrambling 00h from the seed must give the PCIe scrambling sequence
// (FF 17 C0 14 B2 E7 02 82 ...), K characters must pass unchanged while the
// sequence still advances, COM must restart the sequence, and nothing may
// change while en is low.
module tb_scrambler;
  import pcie_phy_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  logic [7:0] din = 0, dout;
  logic din_k = 0, dout_k;
  int checks = 0, failures = 0;

  // Published PCIe 1.0 scrambler output for an all-zero data stream.
  localparam logic [7:0] SEQ [16] = '{8'hFF, 8'h17, 8'hC0, 8'h14, 8'hB2, 8'hE7, 8'h02, 8'h82,
                                      8'h72, 8'h6E, 8'h28, 8'hA6, 8'hBE, 8'h6D, 8'hBF, 8'h8D};

  scrambler dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s dout=%h k=%b at %0t", what, dout, dout_k, $time); end
  endtask

  task automatic send(input logic [7:0] c, input logic k);
    @(negedge clk);
    din = c; din_k = k; en = 1;
    @(posedge clk); #1;
    en = 0;
  endtask

  initial begin
    @(posedge clk); #1;
    check(dout == K_COM && dout_k, "reset value is COM");
    rst <= 0;
    for (int i = 0; i < 16; i++) begin
      send(8'h00, 0);
      check(dout == SEQ[i] && !dout_k, $sformatf("zero byte %0d", i));
    end
    // hold with en low
    repeat (3) @(posedge clk); #1;
    check(dout == SEQ[15], "hold while en low");
    // COM restarts; K passes; the K slot consumes a key byte
    send(K_COM, 1);  check(dout == K_COM && dout_k, "COM passes");
    send(8'h00, 0);  check(dout == SEQ[0], "restart after COM");
    send(K_STP, 1);  check(dout == K_STP && dout_k, "STP not scrambled");
    send(8'h00, 0);  check(dout == SEQ[2], "STP advanced the LFSR");
    send(8'h5A, 0);  check(dout == (8'h5A ^ SEQ[3]), "data XOR key");
    send(K_END, 1);  check(dout == K_END && dout_k, "END not scrambled");
    send(8'hA5, 0);  check(dout == (8'hA5 ^ SEQ[5]), "data after END");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
