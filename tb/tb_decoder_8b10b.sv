// tb_decoder_8b10b -- self-checking test of the 8b/10b decoder.
// 1. Every data character (0..255) and the twelve K characters, in random
//    order and several rounds, are coded by the encoder and must come back
//    unchanged, without error flags, one clock after en.
// 2. Literal code groups from the published tables decode correctly.
// 3. A code that is no code group sets code_err; a repeated K28.5 of the same
//    disparity sets disp_err.
module tb_decoder_8b10b;
  import pcie_phy_pkg::*;
  logic clk = 0, rst = 1;
  logic enc_en = 0, dec_en = 0;
  logic [7:0] c = 0, dout;
  logic k = 0, dout_k, valid, code_err, disp_err;
  logic [9:0] code, din;
  logic rd;
  int checks = 0, failures = 0;
  logic [8:0] chars [268];

  encoder_8b10b u_ref (.clk, .rst, .en(enc_en), .din(c), .din_k(k), .dout(code), .rd);
  decoder_8b10b dut (.clk, .rst, .en(dec_en), .din, .dout, .dout_k, .valid, .code_err, .disp_err);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s din=%b dout=%h k=%b ce=%b de=%b", what, din, dout, dout_k, code_err, disp_err);
    end
  endtask

  // present one symbol to the decoder and check the result
  task automatic dec(input logic [9:0] s, input logic [7:0] exp_c, input logic exp_k,
                     input logic exp_ce, input logic exp_de, input string what);
    @(negedge clk);
    din = s; dec_en = 1;
    @(posedge clk); #1;
    dec_en = 0;
    check(valid, {what, ": valid"});
    if (!exp_ce) check(dout == exp_c && dout_k == exp_k, {what, ": value"});
    check(code_err == exp_ce, {what, ": code_err"});
    check(disp_err == exp_de, {what, ": disp_err"});
  endtask

  initial begin
    for (int i = 0; i < 256; i++) chars[i] = {1'b0, 8'(i)};
    for (int i = 0; i < 8; i++) chars[256 + i] = {1'b1, 3'(i), 5'd28};
    chars[264] = {1'b1, 8'hF7}; chars[265] = {1'b1, 8'hFB};
    chars[266] = {1'b1, 8'hFD}; chars[267] = {1'b1, 8'hFE};
    @(posedge clk); #1;
    rst = 0;
    // encoder's reset symbol is K28.5 from negative disparity
    dec(code, K_COM, 1'b1, 1'b0, 1'b0, "reset COM");
    for (int round = 0; round < 4; round++) begin
      chars.shuffle();
      foreach (chars[i]) begin
        @(negedge clk);
        c = chars[i][7:0]; k = chars[i][8]; enc_en = 1;
        @(posedge clk); #1;
        enc_en = 0;
        dec(code, chars[i][7:0], chars[i][8], 1'b0, 1'b0, "round trip");
      end
    end
    // literal table entries, starting from the current disparity
    if (!rd) begin
      dec(10'b100111_0100, 8'h00, 0, 0, 0, "D0.0 RD-");
      dec(10'b110110_1000, 8'hFB, 1, 0, 0, "K27.7 RD-");
      dec(10'b001111_1010, 8'hBC, 1, 0, 0, "K28.5 RD-");
      dec(10'b010001_0111, 8'hFD, 1, 0, 0, "K29.7 RD+");
      dec(10'b001111_1010, 8'hBC, 1, 0, 1, "K28.5 RD- form while RD+");
    end else begin
      dec(10'b011000_1011, 8'h00, 0, 0, 0, "D0.0 RD+");
      dec(10'b001001_0111, 8'hFB, 1, 0, 0, "K27.7 RD+");
      dec(10'b110000_0101, 8'hBC, 1, 0, 0, "K28.5 RD+");
      dec(10'b101110_1000, 8'hFD, 1, 0, 0, "K29.7 RD-");
      dec(10'b110000_0101, 8'hBC, 1, 0, 1, "K28.5 RD+ form while RD-");
    end
    dec(10'b101010_1010, 8'hB5, 0, 0, 0, "D21.5");
    dec(10'b000000_0000, 8'h00, 0, 1, 1, "all zeros");
    dec(10'b111111_1111, 8'h00, 0, 1, 1, "all ones");
    @(posedge clk); #1;
    check(!valid, "valid is a pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
