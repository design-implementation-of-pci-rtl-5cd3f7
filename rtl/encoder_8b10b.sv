// encoder_8b10b -- 8b/10b encoder with running disparity.
//
// Splits the character HGF_EDCBA into a 5-bit part x (EDCBA) coded on six
// bits abcdei and a 3-bit part y (HGF) coded on four bits fghj. Each sub-block
// has a form for negative and one for positive running disparity; the
// disparity after the 6-bit part selects the 4-bit form. D.x.A7 replaces
// D.x.P7 where P7 would make five equal bits in a row (x = 17, 18, 20 under
// negative, x = 11, 13, 14 under positive disparity). K28.y uses 001111/110000,
// K23/27/29/30.7 use the D.x 6-bit code with K.x.7. These are the standard
// 8b/10b tables; the source description names the encoder only.
//
// Interface: with en high, din/din_k are coded and dout (abcdei_fghj, a in bit
// 9) updates after the edge; rd is the running disparity after dout (1 =
// positive). After reset dout holds K28.5 coded from negative disparity and rd
// is positive. An undefined K character is coded by its data code.
module encoder_8b10b
  import pcie_phy_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic [7:0] din,
  input  logic       din_k,
  output logic [9:0] dout,
  output logic       rd
);
  logic [4:0] x;
  logic [2:0] y;
  logic       k28, kx7, use_a7;
  logic [5:0] c6n, c6;
  logic [3:0] c4n, c4;
  logic       rd_mid, rd_end;

  always_comb begin
    x   = din[4:0];
    y   = din[7:5];
    k28 = din_k && (x == 5'd28);
    kx7 = din_k && valid_k(din) && !k28;

    c6n    = code6_neg(x, k28);
    c6     = (rd && alt6(c6n)) ? ~c6n : c6n;
    rd_mid = ($countones(c6) != 3) ? !rd : rd;

    use_a7 = (y == 3'd7) &&
             ((!rd_mid && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
              ( rd_mid && (x == 5'd11 || x == 5'd13 || x == 5'd14)));

    if (k28 || kx7) begin
      c4n = kcode4_neg(y);
      c4  = rd_mid ? ~c4n : c4n;
    end else begin
      c4n = code4_neg(use_a7 ? 4'd8 : {1'b0, y});
      c4  = (rd_mid && alt4(use_a7 ? 4'd8 : {1'b0, y})) ? ~c4n : c4n;
    end
    rd_end = ($countones(c4) != 2) ? !rd_mid : rd_mid;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dout <= 10'b001111_1010;  // K28.5, negative disparity
      rd   <= 1'b1;
    end else if (en) begin
      dout <= {c6, c4};
      rd   <= rd_end;
    end
  end
endmodule
