// serializer -- parallel-to-serial converter of the transmitter.
//
// Takes one 10-bit symbol every ten clocks and shifts it out one bit per
// clock, bit a (din[9]) first, so the clock is the lane's bit clock (2.5 Gb/s
// per lane in PCI Express 1.0). The load pulse is the symbol slot of the whole
// transmitter: every upstream stage advances on it, so the byte-wide part runs
// at one tenth of the bit clock without a second clock.
//
// Timing: load is high in the cycle where the bit counter is 0 and din is taken
// at the end of that cycle; its bits appear on sout (a register output) in the
// following ten cycles. The single-clock, one-bit-per-clock arrangement is
// this design's choice; the source description only says that a parallel-to-serial
// converter turns the symbols into the bit stream.
module serializer (
  input  logic       clk,
  input  logic       rst,
  input  logic [9:0] din,
  output logic       load,
  output logic       sout
);
  logic [3:0] cnt;
  logic [9:0] shreg;

  assign load = (cnt == 4'd0);
  assign sout = shreg[9];

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= 4'd0;
      shreg <= '0;
    end else begin
      cnt   <= (cnt == 4'd9) ? 4'd0 : cnt + 4'd1;
      shreg <= load ? din : {shreg[8:0], 1'b0};
    end
  end
endmodule
