// fusion_alu: integer ALU extended with the Load Effective Address operation.
//
// Operations: HL_ADD, HL_SUB, HL_XOR, HL_OR, HL_AND, HL_SRA, HL_SRL, HL_SLL,
// HL_SLT (HL_SLTU behaviour with unsigned_i) and HL_F_LEA, which computes
// (rs1 << imm[4:0]) + rs2 in one step. word_i selects the 32-bit forms: add
// becomes addw, shifts use 5-bit amounts on the low word, and the result is
// sign-extended to XLEN. For LEA the shift is always a doubleword shift and
// word_i only selects add or addw for the addition, as in the fused
// c.slli/c.add(w) pair. With XLEN = 32 every operation is 32 bits wide and
// word_i is ignored. With FUSION_EN = 0 the unit is the plain ALU and
// HL_F_LEA returns 0. Operand 2 is whatever the register-read stage chose (a
// register or the immediate); imm_i is only used by LEA. Combinational.
module fusion_alu
  import fusion_pkg::*;
#(
  parameter int XLEN      = 64,
  parameter bit FUSION_EN = 1'b1
) (
  input  alu_op_e           op_i,
  input  logic              word_i,
  input  logic              unsigned_i,
  input  logic [XLEN-1:0]   data_rs1_i,
  input  logic [XLEN-1:0]   data_rs2_i,
  input  logic [XLEN-1:0]   imm_i,
  output logic [XLEN-1:0]   result_o
);

  localparam int SW = $clog2(XLEN);

  logic [XLEN-1:0] a, b, lea_sh, res;
  logic [31:0]     a32, b32, res32;
  logic            w;
  logic            lt;

  assign a   = data_rs1_i;
  assign b   = data_rs2_i;
  assign a32 = a[31:0];
  assign b32 = b[31:0];
  assign w   = (XLEN > 32) && word_i;
  assign lea_sh = a << imm_i[4:0];

  always_comb begin
    lt = unsigned_i ? (a < b) : ($signed(a) < $signed(b));
    res   = '0;
    res32 = '0;
    case (op_i)
      HL_ADD:  begin res = a + b;  res32 = a32 + b32; end
      HL_SUB:  begin res = a - b;  res32 = a32 - b32; end
      HL_XOR:  res = a ^ b;
      HL_OR:   res = a | b;
      HL_AND:  res = a & b;
      HL_SRA:  begin res = XLEN'($signed(a) >>> b[SW-1:0]); res32 = 32'($signed(a32) >>> b[4:0]); end
      HL_SRL:  begin res = a >> b[SW-1:0];  res32 = a32 >> b[4:0]; end
      HL_SLL:  begin res = a << b[SW-1:0];  res32 = a32 << b[4:0]; end
      HL_SLT:  res = XLEN'(lt);
      HL_F_LEA: if (FUSION_EN) begin res = lea_sh + b; res32 = lea_sh[31:0] + b32; end
      default: res = '0;
    endcase
    if (w && (op_i == HL_ADD || op_i == HL_SUB || op_i == HL_SRA || op_i == HL_SRL ||
              op_i == HL_SLL || op_i == HL_F_LEA))
      result_o = XLEN'($signed(res32));
    else
      result_o = res;
  end

endmodule
