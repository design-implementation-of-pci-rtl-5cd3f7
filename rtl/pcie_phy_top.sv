// pcie_phy_top -- x1 PCI Express 1.0 physical layer, transmitter looped into
// receiver.
//
// The transmitter frames the bytes written by the upper layer with start and
// end characters, scrambles and 8b/10b codes them and sends them serially;
// the serial lane is wired straight into the receiver, which decodes,
// descrambles, strips the framing and buffers the packet bytes for reading.
// The ports are those of the source description's complete-system view and of its
// FPGA board test: d (8 switches), control (framing-mark switch), wr and rd,
// rst (active high), clk and the 8-bit output y (LEDs), 21 pins in all.
//
// Use: hold rst high for at least one clock. Write a mark (control=1; d[0]=1
// frames the packet as a DLLP with SDP, d[0]=0 as a TLP with STP), the
// packet bytes (control=0) and a closing mark, one per clock with wr high.
// About 10 clocks per character later the bytes appear at y, head of the
// receive buffer; pulse rd to step to the next byte. The transmit buffer
// holds DEPTH entries (marks included); writes beyond that are dropped, and a
// packet longer than the buffer is never released.
module pcie_phy_top #(
  parameter int unsigned TX_DEPTH = 32,
  parameter int unsigned RX_DEPTH = 32
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] d,
  input  logic       control,
  input  logic       wr,
  input  logic       rd,
  output logic [7:0] y
);
  logic lane;
  logic tx_full, rx_empty, rx_code_err, rx_overflow;

  phy_transmitter #(.DEPTH(TX_DEPTH)) u_tx (
    .clk, .rst, .d, .control, .wr, .sout(lane), .full(tx_full)
  );

  phy_receiver #(.DEPTH(RX_DEPTH), .PHASE(0)) u_rx (
    .clk, .rst, .sin(lane), .rd, .y,
    .empty(rx_empty), .code_err(rx_code_err), .overflow(rx_overflow)
  );
endmodule
