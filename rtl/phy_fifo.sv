// phy_fifo -- synchronous first-word-fall-through FIFO, the "buffer" of the
// physical layer.
//
// One instance holds the characters handed down by the data link layer on the
// transmit side (9-bit entries: framing-mark flag and byte); another holds the
// received packet bytes for the link layer (8-bit entries). The source description only
// names these buffers; depth, width and the overflow/underflow rule are this
// design's choices.
//
// Interface: wr_en pushes wr_data; rd_data always shows the oldest entry and
// rd_en removes it. A push when full and a pop when empty are ignored. Push
// and pop in the same cycle are both honoured. count is the fill level.
// Timing: an entry pushed at edge n is visible on rd_data after that edge.
module phy_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 32
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           wr_data,
  input  logic                       rd_en,
  output logic [WIDTH-1:0]           rd_data,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign empty   = (count == '0);
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= next_ptr(wptr);
      if (do_rd) rptr <= next_ptr(rptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  // A full FIFO never accepts, an empty one never gives.
  a_no_overfill: assert property (@(posedge clk) disable iff (rst)
    count <= DEPTH[$clog2(DEPTH+1)-1:0]);
endmodule
