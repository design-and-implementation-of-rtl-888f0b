// tb_fusion_decoder: all 10 Scaled Index and 4 Load Pair fused instructions
// (random registers and immediates) must decode to their unique debug id and
// to the queue, unit, sources, destinations and immediate of the control
// table; reserved encodings and ordinary RISC-V instructions must be illegal.
module tb_fusion_decoder;
  import fusion_pkg::*;
  import tb_rvc_pkg::f_r4;

  logic [31:0] instr;
  ctrl_t       c;
  int checks = 0, failures = 0;

  fusion_decoder dut (.instr_i(instr), .ctrl_o(c));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic expect_ok(string what, fused_id_e id, queue_id_e q, func_unit_e fu, logic [1:0] src,
                           logic [1:0] dst, logic ui, logic [11:0] im, int rs1, int rs2, int rd, int rd2);
    #1;
    checks++;
    if (c.illegal || !c.valid || c.debug_id != id || c.queue_id != q || c.func_unit != fu ||
        c.use_src != src || c.use_dst != dst || c.use_imm != ui || (ui && c.imm != im) ||
        c.rs1 != 5'(rs1) || (src[1] && c.rs2 != 5'(rs2)) || c.rd != 5'(rd) || (dst[1] && c.rd2 != 5'(rd2))) begin
      failures++;
      $display("FAIL %s: id=%s q=%s fu=%s src=%b dst=%b imm=%0d rs1=%0d rs2=%0d rd=%0d rd2=%0d ill=%0d",
               what, c.debug_id.name(), c.queue_id.name(), c.func_unit.name(), c.use_src, c.use_dst,
               c.imm, c.rs1, c.rs2, c.rd, c.rd2, c.illegal);
    end
  endtask

  initial begin
    int r1, r2, rd, im;
    for (int t = 0; t < 50; t++) begin
      r1 = $urandom_range(8, 15); r2 = $urandom_range(1, 31); rd = r1; im = $urandom_range(0, 31);
      instr = f_r4(im, 0, r2, r1, 0, rd, 0); expect_ok("lea d", FID_LEA_D, Q_INTEGER, FU_FUSION_ALU, 2'b11, 2'b01, 1, 12'(im), r1, r2, rd, 0);
      instr = f_r4(im, 0, r2, r1, 4, rd, 0); expect_ok("lea w", FID_LEA_W, Q_INTEGER, FU_FUSION_ALU, 2'b11, 2'b01, 1, 12'(im), r1, r2, rd, 0);
      instr = f_r4(0, 1, r2, r1, 0, rd, 0); expect_ok("il dd", FID_IL_DD, Q_MEMORY, FU_MEM, 2'b11, 2'b01, 0, 0, r1, r2, rd, 0);
      instr = f_r4(0, 1, r2, r1, 1, rd, 0); expect_ok("il dw", FID_IL_DW, Q_MEMORY, FU_MEM, 2'b11, 2'b01, 0, 0, r1, r2, rd, 0);
      instr = f_r4(0, 1, r2, r1, 4, rd, 0); expect_ok("il wd", FID_IL_WD, Q_MEMORY, FU_MEM, 2'b11, 2'b01, 0, 0, r1, r2, rd, 0);
      instr = f_r4(0, 1, r2, r1, 5, rd, 0); expect_ok("il ww", FID_IL_WW, Q_MEMORY, FU_MEM, 2'b11, 2'b01, 0, 0, r1, r2, rd, 0);
      instr = f_r4(im, 2, r2, r1, 0, rd, 0); expect_ok("sl dd", FID_SL_DD, Q_MEMORY, FU_MEM_SHIFT, 2'b11, 2'b01, 1, 12'(im), r1, r2, rd, 0);
      instr = f_r4(im, 2, r2, r1, 1, rd, 0); expect_ok("sl dw", FID_SL_DW, Q_MEMORY, FU_MEM_SHIFT, 2'b11, 2'b01, 1, 12'(im), r1, r2, rd, 0);
      instr = f_r4(im, 2, r2, r1, 4, rd, 0); expect_ok("sl wd", FID_SL_WD, Q_MEMORY, FU_MEM_SHIFT, 2'b11, 2'b01, 1, 12'(im), r1, r2, rd, 0);
      instr = f_r4(im, 2, r2, r1, 5, rd, 0); expect_ok("sl ww", FID_SL_WW, Q_MEMORY, FU_MEM_SHIFT, 2'b11, 2'b01, 1, 12'(im), r1, r2, rd, 0);
      rd = $urandom_range(8, 15);
      instr = f_r4(im, 0, r2, r1, 0, rd, 1); expect_ok("lp dd", FID_LP_DD, Q_MEMORY, FU_MEM, 2'b01, 2'b11, 1, 12'(im * 8), r1, 0, rd, r2);
      instr = f_r4(im, 0, r2, r1, 1, rd, 1); expect_ok("lp dw", FID_LP_DW, Q_MEMORY, FU_MEM, 2'b01, 2'b11, 1, 12'(im * 8), r1, 0, rd, r2);
      instr = f_r4(im, 1, r2, r1, 0, rd, 1); expect_ok("lp wd", FID_LP_WD, Q_MEMORY, FU_MEM, 2'b01, 2'b11, 1, 12'(im * 4), r1, 0, rd, r2);
      instr = f_r4(im, 1, r2, r1, 1, rd, 1); expect_ok("lp ww", FID_LP_WW, Q_MEMORY, FU_MEM, 2'b01, 2'b11, 1, 12'(im * 4), r1, 0, rd, r2);
    end
    // Illegal: reserved func2, LH/LB widths, ordinary instructions.
    for (int t = 0; t < 500; t++) begin
      case (t % 4)
        0: instr = f_r4($urandom, 3, $urandom, $urandom, $urandom, $urandom, 0);
        1: instr = f_r4($urandom, $urandom_range(1, 2), $urandom, $urandom, 2 + 4 * $urandom_range(0, 1) + $urandom_range(0, 1), $urandom, 0);
        2: instr = f_r4($urandom, $urandom, $urandom, $urandom, $urandom, $urandom, 0) | 32'h3;   // 32-bit RISC-V opcodes end in 11
        default: instr = {$urandom} | 32'h7c;   // opcode >= 0x7c
      endcase
      #1;
      checks++;
      if (!c.illegal || c.valid) begin failures++; $display("FAIL accepted %h", instr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
