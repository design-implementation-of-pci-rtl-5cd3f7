// phy_control_block -- framing control of the transmitter.
//
// The data link layer marks packet boundaries by writing an entry with the
// control flag set (the board's "control" switch). This block turns those
// marks into framing characters: the first mark of a packet becomes a start
// character and the next one the end character END (K29.7). The start is SDP
// (K28.2, a DLLP) when bit 0 of the byte written with the start mark is 1, and
// STP (K27.7, a TLP) otherwise. The block drives the select of the 2:1 framing
// mux high while a mark is read from the head of the transmit buffer; that a
// high select passes the framing character follows the source description.
//
// On the write side it passes a write to the buffer only if there is room and
// the entry belongs to a packet: a mark always does, a data byte only between
// a start mark and an end mark (a stray byte outside a packet would otherwise
// block the head of the buffer for ever). On the read side a packet is
// released only once its end mark is in the buffer (store-and-forward), so a
// packet is never interrupted by an empty buffer. Counting complete packets,
// the STP/SDP/END values and bit 0 as the DLLP flag are this design's own; the
// source description only says that the control block helps the transmitter
// frame packets.
//
// Interface: wr/control/full come from the upper layer and the buffer, buf_wr
// is the buffer's push. tick is the symbol slot; head_valid, head_mark and
// head_dllp describe the buffer head. pop asks the buffer for its head in this
// slot; sel and frame_char feed the mux. Decisions are combinational on the
// head; the state changes at the end of the slot.
module phy_control_block
  import pcie_phy_pkg::*;
#(
  parameter int unsigned CNT_W = 6  // width of the complete-packet counter
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       wr,
  input  logic       control,
  input  logic       full,
  output logic       buf_wr,
  input  logic       tick,
  input  logic       head_valid,
  input  logic       head_mark,
  input  logic       head_dllp,
  output logic       pop,
  output logic       sel,
  output logic [7:0] frame_char,
  output logic       in_pkt
);
  logic             wr_in_pkt;    // write side: between a start and an end mark
  logic [CNT_W-1:0] pkts_ready;   // complete packets waiting in the buffer
  logic             wr_done;      // an end mark was just written
  logic             rd_done;      // an end character leaves in this slot
  logic             wr_mark;      // a mark enters the buffer

  assign buf_wr  = wr && !full && (control || wr_in_pkt);
  assign wr_mark = buf_wr && control;

  // The transmitter may read while inside a packet (the rest is already in the
  // buffer) or when a whole packet is waiting.
  assign pop        = tick && head_valid && (in_pkt || pkts_ready != '0);
  assign sel        = pop && head_mark;
  assign frame_char = in_pkt ? K_END : (head_dllp ? K_SDP : K_STP);

  assign wr_done = wr_mark && wr_in_pkt;
  assign rd_done = sel && in_pkt;

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_in_pkt  <= 1'b0;
      in_pkt     <= 1'b0;
      pkts_ready <= '0;
    end else begin
      if (wr_mark) wr_in_pkt <= !wr_in_pkt;
      if (sel)     in_pkt    <= !in_pkt;
      case ({wr_done, rd_done})
        2'b10:   pkts_ready <= pkts_ready + 1'b1;
        2'b01:   pkts_ready <= pkts_ready - 1'b1;
        default: ;
      endcase
    end
  end

  // An end character can only be sent for a packet counted as complete.
  a_end_counted: assert property (@(posedge clk) disable iff (rst)
    rd_done |-> (pkts_ready != '0));
endmodule
