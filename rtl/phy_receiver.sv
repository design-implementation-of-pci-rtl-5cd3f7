// phy_receiver -- receive half of the x1 PCI Express physical layer.
//
// Data path, as in the source description's block diagram: serial to parallel -> 8b/10b
// decoder -> descrambler -> buffer. After descrambling, a small framing
// filter uses the start (STP or SDP) and end (END or EDB) characters to find
// the packet: only data characters between a start and an end are written to
// the buffer, so idle characters and the framing itself are dropped. The
// document says the receiver uses the framing symbols to detect the start and
// end of a packet; the filter and the error flags are this design's own.
//
// Timing: a symbol complete at the deserializer is decoded one clock later,
// descrambled the next clock and written to the buffer on the following edge,
// so a byte is visible on y three clocks after its last bit was sampled.
// Interface: rd pops the buffer head shown on y; code_err is sticky after any
// invalid code or disparity error; overflow is sticky after a byte was lost to
// a full buffer.
module phy_receiver
  import pcie_phy_pkg::*;
#(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned PHASE = 0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       sin,
  input  logic       rd,
  output logic [7:0] y,
  output logic       empty,
  output logic       code_err,
  output logic       overflow
);
  logic [9:0] sym;
  logic       sym_valid;
  logic [7:0] dec_ch;
  logic       dec_k, dec_valid, dec_cerr, dec_derr;
  logic [7:0] ch;
  logic       ch_k, ch_valid;
  logic       in_pkt;
  logic       wr_byte;
  logic       full;
  logic [$clog2(DEPTH+1)-1:0] fill;

  deserializer #(.PHASE(PHASE)) u_deserializer (
    .clk, .rst, .sin, .dout(sym), .valid(sym_valid)
  );

  decoder_8b10b u_decoder (
    .clk, .rst, .en(sym_valid), .din(sym),
    .dout(dec_ch), .dout_k(dec_k), .valid(dec_valid),
    .code_err(dec_cerr), .disp_err(dec_derr)
  );

  descrambler u_descrambler (
    .clk, .rst, .en(dec_valid), .din(dec_ch), .din_k(dec_k),
    .dout(ch), .dout_k(ch_k), .valid(ch_valid)
  );

  assign wr_byte = ch_valid && !ch_k && in_pkt;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_pkt   <= 1'b0;
      code_err <= 1'b0;
      overflow <= 1'b0;
    end else begin
      if (ch_valid && ch_k && (ch == K_STP || ch == K_SDP)) in_pkt <= 1'b1;
      if (ch_valid && ch_k && (ch == K_END || ch == K_EDB)) in_pkt <= 1'b0;
      if (dec_valid && (dec_cerr || dec_derr)) code_err <= 1'b1;
      if (wr_byte && full) overflow <= 1'b1;
    end
  end

  phy_fifo #(.WIDTH(8), .DEPTH(DEPTH)) u_buffer (
    .clk, .rst,
    .wr_en(wr_byte), .wr_data(ch),
    .rd_en(rd), .rd_data(y),
    .full, .empty, .count(fill)
  );
endmodule
