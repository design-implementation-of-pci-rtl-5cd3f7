// tb_frame_mux -- self-checking test of the 2:1 framing multiplexer.
// Every select / valid combination with random bytes: select high must give
// the framing character as a K character, select low the data byte (or 00h
// when no byte is offered) as a data character.
module tb_frame_mux;
  logic sel, data_valid, is_k;
  logic [7:0] frame_char, data, sym;
  int checks = 0, failures = 0;

  frame_mux dut (.*);

  initial begin
    for (int i = 0; i < 400; i++) begin
      sel = i[0]; data_valid = i[1];
      frame_char = 8'($urandom); data = 8'($urandom);
      #1;
      checks++;
      if (sel) begin
        if (!(sym == frame_char && is_k)) failures++;
      end else if (data_valid) begin
        if (!(sym == data && !is_k)) failures++;
      end else begin
        if (!(sym == 8'h00 && !is_k)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
