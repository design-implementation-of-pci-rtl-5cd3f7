// pcie_phy_pkg -- constants, code tables and helper functions shared by the
// x1 PCI Express physical layer.
//
// Holds the PCIe 1.0 special characters used by this design (framing and
// comma), the 8b/10b sub-block code tables and the scrambler LFSR step.
// The character values, the 8b/10b tables and the LFSR polynomial are those
// of the PCI Express 1.0 base specification and of the 8b/10b code; the
// physical-layer description this design follows names these functions but
// prints none of the values.
//
// 10-bit symbols are written abcdei_fghj with bit a in position 9, the bit
// sent first on the lane.
package pcie_phy_pkg;

  // Special characters (K code groups), as 8-bit HGF_EDCBA values.
  localparam logic [7:0] K_COM = 8'hBC;  // K28.5 comma
  localparam logic [7:0] K_STP = 8'hFB;  // K27.7 start of TLP
  localparam logic [7:0] K_SDP = 8'h5C;  // K28.2 start of DLLP
  localparam logic [7:0] K_END = 8'hFD;  // K29.7 end of good packet
  localparam logic [7:0] K_EDB = 8'hFE;  // K30.7 end of nullified packet

  // Scrambler: G(X) = X^16 + X^5 + X^4 + X^3 + 1, seeded with all ones.
  localparam logic [15:0] LFSR_SEED = 16'hFFFF;
  localparam logic [15:0] LFSR_TAPS = 16'h0039;  // X^5, X^4, X^3, X^0

  // Eight LFSR steps. Returns {next state, key}: key is the byte XORed onto
  // a data character, its bit 0 (bit A of the character) taken first.
  function automatic logic [23:0] lfsr_advance8(input logic [15:0] s);
    logic [15:0] st;
    logic [7:0]  key;
    st = s;
    for (int i = 0; i < 8; i++) begin
      key[i] = st[15];
      st = {st[14:0], 1'b0} ^ (st[15] ? LFSR_TAPS : 16'h0000);
    end
    return {st, key};
  endfunction

  // 5b/6b table: code abcdei of D.x (or K.28 for x=28 when k) for negative
  // running disparity. alt6 tells whether the positive-disparity code is the
  // complement.
  function automatic logic [5:0] code6_neg(input logic [4:0] x, input logic k28);
    logic [5:0] c;
    case (x)
      5'd0:  c = 6'b100111;  5'd1:  c = 6'b011101;  5'd2:  c = 6'b101101;
      5'd3:  c = 6'b110001;  5'd4:  c = 6'b110101;  5'd5:  c = 6'b101001;
      5'd6:  c = 6'b011001;  5'd7:  c = 6'b111000;  5'd8:  c = 6'b111001;
      5'd9:  c = 6'b100101;  5'd10: c = 6'b010101;  5'd11: c = 6'b110100;
      5'd12: c = 6'b001101;  5'd13: c = 6'b101100;  5'd14: c = 6'b011100;
      5'd15: c = 6'b010111;  5'd16: c = 6'b011011;  5'd17: c = 6'b100011;
      5'd18: c = 6'b010011;  5'd19: c = 6'b110010;  5'd20: c = 6'b001011;
      5'd21: c = 6'b101010;  5'd22: c = 6'b011010;  5'd23: c = 6'b111010;
      5'd24: c = 6'b110011;  5'd25: c = 6'b100110;  5'd26: c = 6'b010110;
      5'd27: c = 6'b110110;  5'd28: c = 6'b001110;  5'd29: c = 6'b101110;
      5'd30: c = 6'b011110;  default: c = 6'b101011;
    endcase
    if (k28) c = 6'b001111;
    return c;
  endfunction

  // The positive-disparity form is the complement for every unbalanced code
  // and for D.7 (111000 / 000111).
  function automatic logic alt6(input logic [5:0] c_neg);
    return ($countones(c_neg) != 3) || (c_neg == 6'b111000);
  endfunction

  // 3b/4b table for data characters, negative disparity; y = 8 selects the
  // alternate D.x.A7 code.
  function automatic logic [3:0] code4_neg(input logic [3:0] y);
    logic [3:0] c;
    case (y)
      4'd0: c = 4'b1011;  4'd1: c = 4'b1001;  4'd2: c = 4'b0101;
      4'd3: c = 4'b1100;  4'd4: c = 4'b1101;  4'd5: c = 4'b1010;
      4'd6: c = 4'b0110;  4'd7: c = 4'b1110;  default: c = 4'b0111;
    endcase
    return c;
  endfunction

  // 3b/4b table for K characters, negative disparity. Every K sub-block
  // takes the complement under positive disparity.
  function automatic logic [3:0] kcode4_neg(input logic [2:0] y);
    logic [3:0] c;
    case (y)
      3'd0: c = 4'b1011;  3'd1: c = 4'b0110;  3'd2: c = 4'b1010;
      3'd3: c = 4'b1100;  3'd4: c = 4'b1101;  3'd5: c = 4'b0101;
      3'd6: c = 4'b1001;  default: c = 4'b0111;
    endcase
    return c;
  endfunction

  // Data sub-blocks whose positive-disparity form is the complement:
  // D.x.0, D.x.3, D.x.4, D.x.P7 and D.x.A7.
  function automatic logic alt4(input logic [3:0] y);
    return (y == 4'd0) || (y == 4'd3) || (y == 4'd4) || (y == 4'd7) || (y == 4'd8);
  endfunction

  // The K characters the code defines: K28.0..K28.7, K23.7, K27.7, K29.7,
  // K30.7.
  function automatic logic valid_k(input logic [7:0] c);
    return (c[4:0] == 5'd28) ||
           (c == 8'hF7) || (c == 8'hFB) || (c == 8'hFD) || (c == 8'hFE);
  endfunction

endpackage
