// tb_fusion_alu: 1000 random operations on a 64-bit Fusion ALU and 1000 on a
// 32-bit one, every operation of the table including LEA with add and addw,
// mixed signed/unsigned operands, against a reference written with 64-bit
// integer arithmetic; plus a plain ALU (FUSION_EN = 0) that must not do LEA.
module tb_fusion_alu;
  import fusion_pkg::*;

  alu_op_e     op;
  logic        word, uns;
  logic [63:0] a, b, imm, r64, rplain;
  logic [31:0] r32;
  int checks = 0, failures = 0;
  int n_lea = 0;

  fusion_alu #(.XLEN(64)) dut64 (.op_i(op), .word_i(word), .unsigned_i(uns), .data_rs1_i(a),
                                 .data_rs2_i(b), .imm_i(imm), .result_o(r64));
  fusion_alu #(.XLEN(32)) dut32 (.op_i(op), .word_i(word), .unsigned_i(uns), .data_rs1_i(a[31:0]),
                                 .data_rs2_i(b[31:0]), .imm_i(imm[31:0]), .result_o(r32));
  fusion_alu #(.XLEN(64), .FUSION_EN(1'b0)) dutp (.op_i(op), .word_i(word), .unsigned_i(uns),
                                 .data_rs1_i(a), .data_rs2_i(b), .imm_i(imm), .result_o(rplain));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] sx32(logic [31:0] v); return {{32{v[31]}}, v}; endfunction

  function automatic logic [63:0] ref64(alu_op_e o, logic w, logic u, logic [63:0] x, logic [63:0] y, logic [63:0] im);
    logic [63:0] r;
    case (o)
      HL_ADD:   r = w ? sx32(x[31:0] + y[31:0]) : x + y;
      HL_SUB:   r = w ? sx32(x[31:0] - y[31:0]) : x - y;
      HL_XOR:   r = x ^ y;
      HL_OR:    r = x | y;
      HL_AND:   r = x & y;
      HL_SRA:   r = w ? sx32(32'($signed(x[31:0]) >>> y[4:0])) : 64'($signed(x) >>> y[5:0]);
      HL_SRL:   r = w ? sx32(x[31:0] >> y[4:0]) : x >> y[5:0];
      HL_SLL:   r = w ? sx32(x[31:0] << y[4:0]) : x << y[5:0];
      HL_SLT:   r = u ? 64'(x < y) : 64'($signed(x) < $signed(y));
      HL_F_LEA: r = w ? sx32(32'((x << im[4:0]) + y)) : (x * (64'd1 << im[4:0])) + y;
      default:  r = '0;
    endcase
    return r;
  endfunction

  function automatic logic [31:0] ref32(alu_op_e o, logic u, logic [31:0] x, logic [31:0] y, logic [31:0] im);
    logic [31:0] r;
    case (o)
      HL_ADD:   r = x + y;
      HL_SUB:   r = x - y;
      HL_XOR:   r = x ^ y;
      HL_OR:    r = x | y;
      HL_AND:   r = x & y;
      HL_SRA:   r = 32'($signed(x) >>> y[4:0]);
      HL_SRL:   r = x >> y[4:0];
      HL_SLL:   r = x << y[4:0];
      HL_SLT:   r = u ? 32'(x < y) : 32'($signed(x) < $signed(y));
      HL_F_LEA: r = x * (32'd1 << im[4:0]) + y;
      default:  r = '0;
    endcase
    return r;
  endfunction

  function automatic logic [63:0] rnd64();
    case ($urandom_range(0, 3))
      0: return {$urandom, $urandom};
      1: return 64'($signed($urandom_range(0, 200)) - 100);
      2: return {32'h0, $urandom};
      default: return {32'hffff_ffff, $urandom};
    endcase
  endfunction

  initial begin
    for (int t = 0; t < 2000; t++) begin
      op   = alu_op_e'($urandom_range(0, 9));
      if (t < 20) op = HL_F_LEA;
      word = 1'($urandom);
      uns  = 1'($urandom);
      a = rnd64(); b = rnd64(); imm = {$urandom, $urandom};
      #1;
      checks++;
      if (r64 !== ref64(op, word, uns, a, b, imm)) begin
        failures++; $display("FAIL 64 %s w=%0d a=%h b=%h imm=%h r=%h exp=%h", op.name(), word, a, b, imm, r64, ref64(op, word, uns, a, b, imm));
      end
      checks++;
      if (r32 !== ref32(op, uns, a[31:0], b[31:0], imm[31:0])) begin
        failures++; $display("FAIL 32 %s a=%h b=%h r=%h", op.name(), a[31:0], b[31:0], r32);
      end
      checks++;
      if (rplain !== (op == HL_F_LEA ? 64'd0 : ref64(op, word, uns, a, b, imm))) begin
        failures++; $display("FAIL plain %s", op.name());
      end
      if (op == HL_F_LEA) n_lea++;
    end
    // Directed LEA: c.slli a0,3 ; c.addw a0,a1 with a0=0x1_0000_0001, a1=5
    op = HL_F_LEA; word = 1; a = 64'h1_0000_0001; b = 64'd5; imm = 64'd3; #1;
    checks++;
    if (r64 !== 64'h0000_0000_0000_000d) begin failures++; $display("FAIL lea addw directed %h", r64); end
    word = 0; #1;
    checks++;
    if (r64 !== 64'h0000_0008_0000_000d) begin failures++; $display("FAIL lea add directed %h", r64); end
    if (n_lea < 50) begin failures++; $display("FAIL few LEA"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
