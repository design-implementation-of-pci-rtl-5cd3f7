// descrambler -- PCI Express 1.0 descrambler of the receiver.
//
// Runs the same LFSR as the transmitter's scrambler (X^16+X^5+X^4+X^3+1,
// seed FFFFh, eight steps per character) on the received characters, so XOR
// with the same key restores each data character. K characters pass and still
// advance the LFSR; COM re-seeds it. The source description states only that it
// implements the inverse of the scrambler; the polynomial and rules are those
// of PCIe 1.0.
//
// Interface: with en high, din/din_k are taken and dout/dout_k update after the
// edge, with a one-cycle valid pulse.
module descrambler
  import pcie_phy_pkg::*;
#(
  parameter logic [15:0] SEED = LFSR_SEED
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic [7:0] din,
  input  logic       din_k,
  output logic [7:0] dout,
  output logic       dout_k,
  output logic       valid
);
  logic [15:0] lfsr, lfsr_next;
  logic [7:0]  key;

  always_comb {lfsr_next, key} = lfsr_advance8(lfsr);

  always_ff @(posedge clk) begin
    if (rst) begin
      lfsr   <= SEED;
      dout   <= '0;
      dout_k <= 1'b0;
      valid  <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        dout_k <= din_k;
        dout   <= din_k ? din : (din ^ key);
        lfsr   <= (din_k && din == K_COM) ? SEED : lfsr_next;
      end
    end
  end
endmodule
