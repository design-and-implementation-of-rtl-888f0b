// tb_shift_bitwise_reductor: random batches at the default size (7 batches of
// 3 bits into 8 bits) compared with a bit-by-bit reference, plus the masks of
// the SL/SL/LEA example window.
module tb_shift_bitwise_reductor;
  logic [6:0][2:0] b;
  logic [7:0]      m;
  int checks = 0, failures = 0;

  shift_bitwise_reductor dut (.batch_i(b), .mask_o(m));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] e;
    b = '0;
    b[0] = 3'b111; b[3] = 3'b111; b[6] = 3'b011;
    #1; checks++;
    if (m !== 8'hff) begin failures++; $display("FAIL example replace %b", m); end
    b = '0;
    b[0] = 3'b100; b[3] = 3'b100;
    #1; checks++;
    if (m !== 8'b0010_0100) begin failures++; $display("FAIL example invalid %b", m); end
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < 7; i++) b[i] = 3'($urandom);
      e = '0;
      for (int o = 0; o < 8; o++)
        for (int i = 0; i < 7; i++)
          if (o - i >= 0 && o - i < 3 && b[i][o-i]) e[o] = 1'b1;
      #1; checks++;
      if (m !== e) begin failures++; $display("FAIL %h -> %b exp %b", b, m, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
