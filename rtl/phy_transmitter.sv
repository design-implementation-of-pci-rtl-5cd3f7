// phy_transmitter -- transmit half of the x1 PCI Express physical layer.
//
// Data path, as in the source description's block diagram: buffer -> 2:1 framing mux
// (steered by the control block) -> scrambler -> 8b/10b encoder -> parallel to
// serial. The data link layer writes bytes with wr; a write with control high
// is a framing mark, and the control block turns the marks of a packet into
// a start character (STP for a TLP, or SDP for a DLLP when bit 0 of the start
// mark's byte is 1) and the end character END. Framing characters go
// through the scrambler unscrambled and are 8b/10b coded as K characters.
//
// Timing: one clock is the bit clock. The serializer's load pulse (every ten
// clocks) is the symbol slot in which the buffer is read, the scrambler and
// encoder advance and a new symbol is loaded. A character read from the buffer
// in slot n leaves on the lane, bit a first, during the ten clocks after slot
// n+2. A packet is sent only once its end mark is in the buffer; between
// packets the lane carries scrambled 00h (logical idle). After reset the first
// two symbols are COM (K28.5). Store-and-forward, idle and the COM start are
// this design's choices, not the source description's.
//
// Interface: d/control/wr (accepted unless the buffer is full or the byte is
// data outside a packet), sout (serial lane), full.
module phy_transmitter
  import pcie_phy_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] d,
  input  logic       control,
  input  logic       wr,
  output logic       sout,
  output logic       full
);
  logic       tick;
  logic       buf_wr;
  logic [8:0] head;
  logic       empty;
  logic       pop, sel, in_pkt;
  logic [7:0] frame_char;
  logic [7:0] mux_sym;
  logic       mux_k;
  logic [7:0] scr_sym;
  logic       scr_k;
  logic [9:0] enc_sym;
  logic       enc_rd;
  logic [$clog2(DEPTH+1)-1:0] fill;

  phy_fifo #(.WIDTH(9), .DEPTH(DEPTH)) u_buffer (
    .clk, .rst,
    .wr_en(buf_wr), .wr_data({control, d}),
    .rd_en(pop), .rd_data(head),
    .full, .empty, .count(fill)
  );

  phy_control_block #(.CNT_W($clog2(DEPTH+1))) u_control (
    .clk, .rst,
    .wr, .control, .full, .buf_wr,
    .tick,
    .head_valid(!empty), .head_mark(head[8]), .head_dllp(head[0]),
    .pop, .sel, .frame_char, .in_pkt
  );

  frame_mux u_mux (
    .sel, .frame_char,
    .data_valid(pop && !head[8]), .data(head[7:0]),
    .sym(mux_sym), .is_k(mux_k)
  );

  scrambler u_scrambler (
    .clk, .rst, .en(tick),
    .din(mux_sym), .din_k(mux_k),
    .dout(scr_sym), .dout_k(scr_k)
  );

  encoder_8b10b u_encoder (
    .clk, .rst, .en(tick),
    .din(scr_sym), .din_k(scr_k),
    .dout(enc_sym), .rd(enc_rd)
  );

  serializer u_serializer (
    .clk, .rst, .din(enc_sym), .load(tick), .sout
  );

  // The buffer is read only in a symbol slot, and never when empty.
  a_pop_in_slot: assert property (@(posedge clk) disable iff (rst)
    pop |-> (tick && !empty));
endmodule
