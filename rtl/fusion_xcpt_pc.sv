// fusion_xcpt_pc: exception PC of a fused instruction.
//
// A fused instruction carries the PC of the first instruction of its
// sequence, but only its final load can fault. When a valid exception leaves
// the core's datapath and the faulting instruction is fused, the PC is moved
// to that load: +2 for an Indexed Load (c.add; c.ld), +4 for a Scaled Load
// (c.slli; c.add; c.ld), since all fused instructions are compressed. Other
// instructions, LEA (which cannot fault) and load pairs (whose back-end is
// not built) keep their PC. Combinational.
module fusion_xcpt_pc
  import fusion_pkg::*;
#(
  parameter int XLEN = 64
) (
  input  logic            xcpt_valid_i,
  input  fusion_kind_e    fusion_i,
  input  logic [XLEN-1:0] pc_i,
  output logic [XLEN-1:0] pc_o
);

  always_comb begin
    pc_o = pc_i;
    if (xcpt_valid_i) begin
      case (fusion_i)
        FK_IL:   pc_o = pc_i + XLEN'(2);
        FK_SL:   pc_o = pc_i + XLEN'(4);
        default: pc_o = pc_i;
      endcase
    end
  end

endmodule
