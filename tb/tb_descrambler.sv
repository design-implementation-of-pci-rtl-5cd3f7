// tb_descrambler -- self-checking test of the receive descrambler.
// Feeding the PCIe scrambling sequence as data must return 00h; K characters
// pass and advance the sequence; COM restarts it; valid follows en by one
// clock.
module tb_descrambler;
  import pcie_phy_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  logic [7:0] din = 0, dout;
  logic din_k = 0, dout_k, valid;
  int checks = 0, failures = 0;

  localparam logic [7:0] SEQ [16] = '{8'hFF, 8'h17, 8'hC0, 8'h14, 8'hB2, 8'hE7, 8'h02, 8'h82,
                                      8'h72, 8'h6E, 8'h28, 8'hA6, 8'hBE, 8'h6D, 8'hBF, 8'h8D};

  descrambler dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s dout=%h at %0t", what, dout, $time); end
  endtask

  task automatic recv(input logic [7:0] c, input logic k);
    @(negedge clk);
    din = c; din_k = k; en = 1;
    @(posedge clk); #1;
    en = 0;
    check(valid, "valid one clock after en");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    check(!valid, "no valid without en");
    for (int i = 0; i < 16; i++) begin
      recv(SEQ[i], 0);
      check(dout == 8'h00 && !dout_k, $sformatf("byte %0d", i));
    end
    @(posedge clk); #1;
    check(!valid, "valid is a pulse");
    recv(K_COM, 1);            check(dout == K_COM && dout_k, "COM");
    recv(SEQ[0] ^ 8'h3C, 0);   check(dout == 8'h3C, "restart after COM");
    recv(K_SDP, 1);            check(dout == K_SDP && dout_k, "SDP passes");
    recv(SEQ[2] ^ 8'hC3, 0);   check(dout == 8'hC3, "K advanced the LFSR");
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
