// tb_fusion_il_fu: random add and addw address computations on a 64-bit and
// a 32-bit Indexed Load unit, against reference arithmetic.
module tb_fusion_il_fu;
  logic [63:0] a, b, r64;
  logic [31:0] r32;
  logic        w;
  int checks = 0, failures = 0;

  fusion_il_fu #(.XLEN(64)) dut64 (.data_rs1_i(a), .data_rs2_i(b), .word_i(w), .result_o(r64));
  fusion_il_fu #(.XLEN(32)) dut32 (.data_rs1_i(a[31:0]), .data_rs2_i(b[31:0]), .word_i(w), .result_o(r32));

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] e;
    logic [31:0] s;
    for (int t = 0; t < 1000; t++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; w = 1'($urandom);
      if (t % 4 == 0) b = {32'h0, 32'h8000_0000 - $urandom_range(0, 3)};
      #1;
      s = a[31:0] + b[31:0];
      e = w ? {{32{s[31]}}, s} : a + b;
      checks++;
      if (r64 !== e) begin failures++; $display("FAIL 64 w=%0d %h+%h=%h exp %h", w, a, b, r64, e); end
      checks++;
      if (r32 !== s) begin failures++; $display("FAIL 32 %h", r32); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
