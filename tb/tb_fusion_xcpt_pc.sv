// tb_fusion_xcpt_pc: exception PC correction for every fusion kind, with and
// without a valid exception, on random PCs.
module tb_fusion_xcpt_pc;
  import fusion_pkg::*;
  logic v;
  fusion_kind_e k;
  logic [63:0] pc, pco;
  int checks = 0, failures = 0;

  fusion_xcpt_pc dut (.xcpt_valid_i(v), .fusion_i(k), .pc_i(pc), .pc_o(pco));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] e;
    for (int t = 0; t < 500; t++) begin
      v = 1'($urandom); k = fusion_kind_e'($urandom_range(0, 4)); pc = {$urandom, $urandom} & ~64'd1;
      #1;
      e = pc;
      if (v && k == FK_IL) e = pc + 2;
      if (v && k == FK_SL) e = pc + 4;
      checks++;
      if (pco !== e) begin failures++; $display("FAIL %s v=%0d %h -> %h exp %h", k.name(), v, pc, pco, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
