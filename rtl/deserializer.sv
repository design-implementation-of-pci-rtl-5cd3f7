// deserializer -- serial-to-parallel converter of the receiver.
//
// Shifts the lane in one bit per clock (first bit ends up in dout[9], bit a)
// and, once every ten clocks, presents the last ten bits as a symbol with a
// one-cycle valid pulse. The symbol boundary comes from the common reset: the
// bit counter starts with the transmitter's and PHASE is the counter value in
// which the last bit of a symbol arrives (0 when the lane adds no delay, as in
// the loop-back of this design). The first, incomplete word after reset is not
// reported. Symbol lock by searching for a comma is not done; the source description
// does not describe how the receiver finds symbol boundaries.
//
// Timing: dout and valid change after the edge that samples the tenth bit.
module deserializer #(
  parameter int unsigned PHASE = 0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       sin,
  output logic [9:0] dout,
  output logic       valid
);
  logic [3:0] cnt;
  logic [8:0] sreg;
  logic       primed;
  logic       cap;

  assign cap = (cnt == 4'(PHASE));

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= 4'd0;
      sreg   <= '0;
      dout   <= '0;
      valid  <= 1'b0;
      primed <= 1'b0;
    end else begin
      cnt   <= (cnt == 4'd9) ? 4'd0 : cnt + 4'd1;
      sreg  <= {sreg[7:0], sin};
      valid <= cap && primed;
      if (cap) begin
        dout   <= {sreg, sin};
        primed <= 1'b1;
      end
    end
  end

  // A reported symbol is followed by nine clocks without one.
  a_symbol_spacing: assert property (@(posedge clk) disable iff (rst)
    valid |=> !valid [*9]);
endmodule
