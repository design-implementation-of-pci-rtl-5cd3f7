// decoder_8b10b -- 8b/10b decoder with error checks.
//
// Looks the 6-bit part abcdei up against the 32 data codes (and K.28) and the
// 4-bit part fghj against the 3b/4b codes, in either disparity form, to
// recover HGF_EDCBA and the K flag. K23/27/29/30.7 are recognised by the
// alternate 4-bit code 0111/1000 following a 6-bit code for which D.x.A7 is
// not used. code_err flags a sub-block that is no code; disp_err flags a
// sub-block whose disparity form does not match the running disparity, which
// then follows the received bits. Tables are the standard 8b/10b code; the
// document names the decoder only.
//
// Interface: with en high, din (abcdei_fghj, a in bit 9) is decoded and
// dout/dout_k/code_err/disp_err update after the edge with a one-cycle valid
// pulse. Running disparity starts negative.
module decoder_8b10b
  import pcie_phy_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic [9:0] din,
  output logic [7:0] dout,
  output logic       dout_k,
  output logic       valid,
  output logic       code_err,
  output logic       disp_err
);
  logic       rd;
  logic [5:0] c6;
  logic [3:0] c4;
  logic       k28, hit6, hit4;
  logic [4:0] x;
  logic [3:0] y;            // 0..7, 8 = alternate 7
  logic       rd_mid, rd_end, derr6, derr4;
  logic [7:0] ch;
  logic       chk, cerr;

  always_comb begin
    c6 = din[9:4];
    c4 = din[3:0];

    // 6-bit part
    k28  = (c6 == 6'b001111) || (c6 == 6'b110000);
    hit6 = k28;
    x    = 5'd28;
    for (int i = 0; i < 32; i++) begin
      if (c6 == code6_neg(5'(i), 1'b0) ||
          (alt6(code6_neg(5'(i), 1'b0)) && c6 == ~code6_neg(5'(i), 1'b0))) begin
        hit6 = 1'b1;
        x    = 5'(i);
      end
    end
    derr6  = 1'b0;
    rd_mid = rd;
    if ($countones(c6) >= 4 || c6 == 6'b111000) begin
      derr6  = rd;
      rd_mid = ($countones(c6) >= 4) ? 1'b1 : rd;
    end else if ($countones(c6) <= 2 || c6 == 6'b000111) begin
      derr6  = !rd;
      rd_mid = ($countones(c6) <= 2) ? 1'b0 : rd;
    end

    // 4-bit part
    hit4 = 1'b0;
    y    = 4'd0;
    if (k28) begin
      for (int j = 0; j < 8; j++) begin
        if (c4 == (c6[0] ? ~kcode4_neg(3'(j)) : kcode4_neg(3'(j)))) begin
          hit4 = 1'b1;
          y    = 4'(j);
        end
      end
    end else begin
      for (int j = 0; j < 9; j++) begin
        if (c4 == code4_neg(4'(j)) || (alt4(4'(j)) && c4 == ~code4_neg(4'(j)))) begin
          hit4 = 1'b1;
          y    = 4'(j);
        end
      end
    end
    derr4  = 1'b0;
    rd_end = rd_mid;
    if ($countones(c4) >= 3 || c4 == 4'b1100) begin
      derr4  = rd_mid;
      rd_end = ($countones(c4) >= 3) ? 1'b1 : rd_mid;
    end else if ($countones(c4) <= 1 || c4 == 4'b0011) begin
      derr4  = !rd_mid;
      rd_end = ($countones(c4) <= 1) ? 1'b0 : rd_mid;
    end

    // assemble
    cerr = !(hit6 && hit4);
    chk  = k28;
    ch   = {y[2:0], x};
    if (!k28 && y == 4'd8) begin
      ch = {3'd7, x};
      if (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30) chk = 1'b1;
      else if (!(x == 5'd17 || x == 5'd18 || x == 5'd20 ||
                 x == 5'd11 || x == 5'd13 || x == 5'd14)) cerr = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd       <= 1'b0;
      dout     <= '0;
      dout_k   <= 1'b0;
      valid    <= 1'b0;
      code_err <= 1'b0;
      disp_err <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        rd       <= rd_end;
        dout     <= ch;
        dout_k   <= chk;
        code_err <= cerr;
        disp_err <= derr6 || derr4;
      end
    end
  end
endmodule
