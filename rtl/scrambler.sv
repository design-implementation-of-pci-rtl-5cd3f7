// scrambler -- PCI Express 1.0 data scrambler of the transmitter.
//
// Each data character is XORed with eight successive output bits of a 16-bit
// Galois LFSR with polynomial X^16+X^5+X^4+X^3+1, bit A of the character
// first. Control (K) characters pass unscrambled, as the source description requires of
// the start and end framing characters, but still advance the LFSR. A COM
// character (K28.5) re-seeds the LFSR to FFFFh instead of advancing it. The
// polynomial, seed and COM rule are those of the PCIe 1.0 specification; the
// document only says the scrambler randomises each byte to spread EMI.
//
// Interface: on a clock with en high, din/din_k are taken and the result
// appears on dout/dout_k after the edge (one register stage). After reset the
// output holds COM, so the first characters the transmitter sends re-seed the
// far end's descrambler.
module scrambler
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
  output logic       dout_k
);
  logic [15:0] lfsr, lfsr_next;
  logic [7:0]  key;

  always_comb {lfsr_next, key} = lfsr_advance8(lfsr);

  always_ff @(posedge clk) begin
    if (rst) begin
      lfsr   <= SEED;
      dout   <= K_COM;
      dout_k <= 1'b1;
    end else if (en) begin
      dout_k <= din_k;
      dout   <= din_k ? din : (din ^ key);
      lfsr   <= (din_k && din == K_COM) ? SEED : lfsr_next;
    end
  end
endmodule
