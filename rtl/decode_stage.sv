// decode_stage: fusion part of the N_LANES-wide decode stage.
//
// Every lane has a fusion_decoder working in parallel with the standard
// RISC-V decoder of the core, whose result enters through std_ctrl_i. The
// is_fused bit that travelled with the instruction through the fetch queue
// drives the lane multiplexer: fused instructions take the fusion decoder's
// control, all others the standard decoder's. A fused instruction that the
// fusion decoder rejects comes out as illegal. Lanes without a valid
// instruction give an all-zero control word. Combinational.
module decode_stage
  import fusion_pkg::*;
#(
  parameter int N_LANES = 4
) (
  input  fq_instr_t [N_LANES-1:0] instr_i,
  input  ctrl_t     [N_LANES-1:0] std_ctrl_i,
  output ctrl_t     [N_LANES-1:0] ctrl_o
);

  ctrl_t [N_LANES-1:0] fus_ctrl;

  for (genvar l = 0; l < N_LANES; l++) begin : g_lane
    fusion_decoder u_fusion_decoder (
      .instr_i (instr_i[l].instr),
      .ctrl_o  (fus_ctrl[l])
    );
    always_comb begin
      if (!instr_i[l].valid)        ctrl_o[l] = '0;
      else if (instr_i[l].is_fused) ctrl_o[l] = fus_ctrl[l];
      else                          ctrl_o[l] = std_ctrl_i[l];
      if (instr_i[l].valid && instr_i[l].is_fused) begin
        ctrl_o[l].valid   = 1'b1;
        ctrl_o[l].illegal = fus_ctrl[l].illegal;
      end
    end
  end

endmodule
