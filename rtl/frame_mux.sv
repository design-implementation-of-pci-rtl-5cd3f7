// frame_mux -- the transmitter's 2:1 framing multiplexer.
//
// Chooses what enters the scrambler in each symbol slot. With sel high the
// framing character from the control block goes out as a K (control)
// character; with sel low the data byte from the transmit buffer goes out as
// a D character. This select rule is the source description's. When sel is low and no
// data byte is offered, the mux sends 00h, which after scrambling is the PCIe
// logical idle; that idle rule is this design's choice.
//
// Purely combinational.
module frame_mux
  import pcie_phy_pkg::*;
(
  input  logic       sel,
  input  logic [7:0] frame_char,
  input  logic       data_valid,
  input  logic [7:0] data,
  output logic [7:0] sym,
  output logic       is_k
);
  always_comb begin
    if (sel) begin
      sym  = frame_char;
      is_k = 1'b1;
    end else begin
      sym  = data_valid ? data : 8'h00;
      is_k = 1'b0;
    end
  end
endmodule
