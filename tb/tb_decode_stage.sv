// tb_decode_stage: four lanes carrying random mixes of fused instructions,
// ordinary instructions and empty lanes. Fused lanes must show the fusion
// decoder's control, the others the standard decoder's control (a marker
// value supplied by the testbench), empty lanes all zeros.
module tb_decode_stage;
  import fusion_pkg::*;
  import tb_rvc_pkg::f_r4;

  fq_instr_t [3:0] ins;
  ctrl_t     [3:0] std_c, out_c;
  int checks = 0, failures = 0, n_fused = 0, n_std = 0;

  decode_stage dut (.instr_i(ins), .std_ctrl_i(std_c), .ctrl_o(out_c));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int l = 0; l < 4; l++) begin
        ins[l] = '0;
        ins[l].valid = ($urandom_range(0, 5) != 0);
        ins[l].is_fused = 1'($urandom);
        ins[l].instr = ins[l].is_fused ? f_r4($urandom_range(0, 31), 2, $urandom_range(1, 31), 9, 5, 9, 0)
                                       : ({$urandom} | 32'h3);
        std_c[l] = '0;
        std_c[l].valid = 1'b1;
        std_c[l].instr_op = OP_STD;
        std_c[l].rd = 5'($urandom);
      end
      #1;
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (!ins[l].valid) begin
          if (out_c[l] !== '0) begin failures++; $display("FAIL empty lane %0d", l); end
        end else if (ins[l].is_fused) begin
          n_fused++;
          if (out_c[l].debug_id != FID_SL_WW || out_c[l].func_unit != FU_MEM_SHIFT ||
              out_c[l].imm != 12'(ins[l].instr[31:27]) || out_c[l].illegal) begin
            failures++; $display("FAIL fused lane %0d %s", l, out_c[l].debug_id.name());
          end
        end else begin
          n_std++;
          if (out_c[l] !== std_c[l]) begin failures++; $display("FAIL std lane %0d", l); end
        end
      end
    end
    // a lane flagged fused whose word is not a fused encoding is illegal
    ins[0].valid = 1; ins[0].is_fused = 1; ins[0].instr = 32'h0000_0013;
    #1; checks++;
    if (!out_c[0].illegal) begin failures++; $display("FAIL bad fused word accepted"); end
    if (n_fused < 100 || n_std < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
