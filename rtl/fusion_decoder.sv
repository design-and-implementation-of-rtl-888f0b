// fusion_decoder: decoder for fused instructions, one per decode lane.
//
// Runs in parallel with the standard RISC-V decoder and turns a 32-bit F_R4
// fused instruction into the control structure ctrl_t. Scaled Index family
// (opcode 0): LEA goes to the integer queue and the Fusion ALU with the shift
// amount as immediate; IL goes to the memory queue and the MEM unit without
// immediate; SL goes to the memory queue and the MEM_SHIFT unit with the
// shift amount as immediate. All three read rs1 and rs2 and write rd. Load
// Pair family (opcode 1): memory queue, MEM unit, one source (rs1), two
// destinations (rd and the rs2 field), immediate = imm5 scaled by the width of
// the first load. Any other encoding, a reserved func2 (11 in the Scaled Index
// family) or LH/LB widths (no compressed form exists) give illegal = 1, the
// value the decode multiplexer ignores for instructions that are not fused.
// The queue, unit and source/destination assignment follow the control-signal
// table of the design; the field layout of ctrl_t is this design's own.
// Combinational.
module fusion_decoder
  import fusion_pkg::*;
(
  input  logic [31:0] instr_i,
  output ctrl_t       ctrl_o
);

  f_r4_t f;
  assign f = instr_i;

  always_comb begin
    ctrl_o          = '0;
    ctrl_o.illegal  = 1'b1;
    ctrl_o.rs1      = f.rs1;
    ctrl_o.rs2      = f.rs2;
    ctrl_o.rd       = f.rd;
    ctrl_o.instr_op = OP_NONE;
    ctrl_o.fusion   = FK_NONE;
    ctrl_o.debug_id = FID_NONE;
    ctrl_o.queue_id = Q_INTEGER;
    ctrl_o.func_unit = FU_ALU;
    if (f.opcode == OPC_F_SI && f.func3[1] == 1'b0) begin
      ctrl_o.valid    = 1'b1;
      ctrl_o.illegal  = 1'b0;
      ctrl_o.use_src  = 2'b11;
      ctrl_o.use_dst  = 2'b01;
      ctrl_o.add_word = f.func3[2];
      ctrl_o.width1   = f.func3[1:0];
      case (f.func2)
        F2_LEA: begin
          ctrl_o.queue_id  = Q_INTEGER;
          ctrl_o.func_unit = FU_FUSION_ALU;
          ctrl_o.instr_op  = OP_F_LEA;
          ctrl_o.fusion    = FK_LEA;
          ctrl_o.use_imm   = 1'b1;
          ctrl_o.imm       = {7'd0, f.imm5};
          ctrl_o.width1    = W_LD;
          ctrl_o.debug_id  = f.func3[2] ? FID_LEA_W : FID_LEA_D;
          if (f.func3[1:0] != 2'b00) begin
            ctrl_o.valid = 1'b0; ctrl_o.illegal = 1'b1;
          end
        end
        F2_IL: begin
          ctrl_o.queue_id  = Q_MEMORY;
          ctrl_o.func_unit = FU_MEM;
          ctrl_o.instr_op  = OP_F_IL;
          ctrl_o.fusion    = FK_IL;
          ctrl_o.use_imm   = 1'b0;
          ctrl_o.debug_id  = fused_id_e'(FID_IL_DD + {3'b000, f.func3[2], f.func3[0]});
          if (f.imm5 != 5'd0) begin
            ctrl_o.valid = 1'b0; ctrl_o.illegal = 1'b1;
          end
        end
        F2_SL: begin
          ctrl_o.queue_id  = Q_MEMORY;
          ctrl_o.func_unit = FU_MEM_SHIFT;
          ctrl_o.instr_op  = OP_F_SL;
          ctrl_o.fusion    = FK_SL;
          ctrl_o.use_imm   = 1'b1;
          ctrl_o.imm       = {7'd0, f.imm5};
          ctrl_o.debug_id  = fused_id_e'(FID_SL_DD + {3'b000, f.func3[2], f.func3[0]});
        end
        default: begin
          ctrl_o.valid   = 1'b0;
          ctrl_o.illegal = 1'b1;
        end
      endcase
    end else if (f.opcode == OPC_F_LP && f.func2[1] == 1'b0 && f.func3[1] == 1'b0) begin
      ctrl_o.valid     = 1'b1;
      ctrl_o.illegal   = 1'b0;
      ctrl_o.use_src   = 2'b01;
      ctrl_o.use_dst   = 2'b11;
      ctrl_o.rs2       = 5'd0;
      ctrl_o.rd2       = f.rs2;
      ctrl_o.queue_id  = Q_MEMORY;
      ctrl_o.func_unit = FU_MEM;
      ctrl_o.instr_op  = OP_F_LP;
      ctrl_o.fusion    = FK_LP;
      ctrl_o.use_imm   = 1'b1;
      ctrl_o.width1    = f.func2;
      ctrl_o.width2    = f.func3[1:0];
      ctrl_o.imm       = (f.func2 == W_LD) ? {4'd0, f.imm5, 3'd0} : {5'd0, f.imm5, 2'd0};
      ctrl_o.debug_id  = fused_id_e'(FID_LP_DD + {3'b000, f.func2[0], f.func3[0]});
    end
  end

endmodule
