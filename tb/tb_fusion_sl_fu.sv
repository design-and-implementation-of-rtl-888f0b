// tb_fusion_sl_fu: Scaled Load address (rs1 << imm) + rs2 with add and addw,
// on a 0-cycle and a 1-cycle 64-bit unit and a 32-bit 1-cycle unit. A new
// operation enters every cycle; the 1-cycle units must give each result
// exactly one cycle later, the 0-cycle unit in the same cycle.
module tb_fusion_sl_fu;
  logic clk = 0, rst_n = 0;
  logic v;
  logic [63:0] a, b;
  logic [4:0]  sh;
  logic        w;
  logic        v0, v1, v32;
  logic [63:0] r0, r1;
  logic [31:0] r32;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fusion_sl_fu #(.XLEN(64), .LATENCY(0)) dut0 (.clk_i(clk), .rst_ni(rst_n), .valid_i(v), .data_rs1_i(a),
      .data_rs2_i(b), .imm_i(sh), .word_i(w), .valid_o(v0), .result_o(r0));
  fusion_sl_fu #(.XLEN(64), .LATENCY(1)) dut1 (.clk_i(clk), .rst_ni(rst_n), .valid_i(v), .data_rs1_i(a),
      .data_rs2_i(b), .imm_i(sh), .word_i(w), .valid_o(v1), .result_o(r1));
  fusion_sl_fu #(.XLEN(32), .LATENCY(1)) dut32 (.clk_i(clk), .rst_ni(rst_n), .valid_i(v), .data_rs1_i(a[31:0]),
      .data_rs2_i(b[31:0]), .imm_i(sh), .word_i(w), .valid_o(v32), .result_o(r32));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [63:0] ref_sl(logic [63:0] x, logic [63:0] y, logic [4:0] s, logic ww);
    logic [63:0] t;
    t = x * (64'd1 << s) + y;
    return ww ? {{32{t[31]}}, t[31:0]} : t;
  endfunction

  initial begin
    logic [63:0] exp_prev, e;
    logic [31:0] e32_prev;
    logic        v_prev;
    v = 0; a = 0; b = 0; sh = 0; w = 0;
    v_prev = 0; exp_prev = 0; e32_prev = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      v = ($urandom_range(0, 4) != 0);
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; sh = 5'($urandom); w = 1'($urandom);
      #1;
      e = ref_sl(a, b, sh, w);
      checks++;
      if (v0 !== v || (v && r0 !== e)) begin failures++; $display("FAIL lat0 %h exp %h", r0, e); end
      checks++;
      if (v1 !== v_prev || (v_prev && r1 !== exp_prev)) begin failures++; $display("FAIL lat1 v=%0d %h exp %h", v1, r1, exp_prev); end
      checks++;
      if (v32 !== v_prev || (v_prev && r32 !== e32_prev)) begin failures++; $display("FAIL 32 %h exp %h", r32, e32_prev); end
      v_prev = v; exp_prev = e; e32_prev = a[31:0] * (32'd1 << sh) + b[31:0];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
