// c_detector: recognises one fusible sequence starting at the first of three
// consecutive 16-bit fetch slots and encodes it as a single 32-bit fused
// instruction in the F_R4 format (see fusion_pkg).
//
// Sequences (all instructions compressed, RV64C encodings):
//   LEA : c.slli rd,imm ; c.add|c.addw rd,rs2
//   IL  : c.add|c.addw rd,rs2 ; c.ld|c.lw rd,0(rd)
//   SL  : c.slli rd,imm ; c.add|c.addw rd,rs2 ; c.ld|c.lw rd,0(rd)
//   LP  : c.ld|c.lw rd1,off(rs1) ; c.ld|c.lw rd2,off+size1(rs1), rd1 != rs1
// Register rules: every instruction of a Scaled Index sequence writes the same
// rd, the add reads that rd as rs1, the load uses it as base and destination
// with offset 0, and the shift amount is below 32. When a LEA prefix is seen
// the third slot is checked too, and a Scaled Load wins over the LEA.
// Own additions to those rules: the add's rs2 must differ from rd when the
// sequence starts with c.slli (otherwise the add would read the shifted value,
// which the fused form cannot reproduce), rd is never x0, and for a load pair
// the second offset must be encodable by its own instruction.
//
// Outputs: fused_o (slot 0 = bits 15:0, slot 1 = bits 31:16), replace_mask_o
// and invalid_mask_o (000/000 none, 011/000 two fused, 111/100 three fused).
// All outputs are zero when nothing matches. Purely combinational.
module c_detector
  import fusion_pkg::*;
(
  input  logic [2:0][15:0] instr_i,
  input  logic [2:0]       compressed_i,
  input  logic [2:0]       valid_i,
  output logic [31:0]      fused_o,
  output logic [2:0]       replace_mask_o,
  output logic [2:0]       invalid_mask_o
);

  // ---------------------------------------------------------- field decoding
  typedef struct packed {
    logic       is_slli;   // c.slli with shamt < 32
    logic       is_add;    // c.add
    logic       is_addw;   // c.addw
    logic       is_ld;     // c.ld
    logic       is_lw;     // c.lw
    logic [4:0] rd;        // destination (also rs1 for slli/add/addw)
    logic [4:0] rs2;       // add/addw second source
    logic [4:0] base;      // load base register
    logic [7:0] offset;    // load byte offset
    logic [4:0] offs5;     // load offset field scaled by its width
    logic [4:0] shamt;     // slli shift amount
  } cdec_t;

  function automatic cdec_t decode_c(input logic [15:0] i, input logic ok);
    cdec_t d;
    d = '0;
    if (ok) begin
      // c.slli: 000 shamt[5] rd shamt[4:0] 10
      if (i[15:13] == 3'b000 && i[1:0] == 2'b10 && i[11:7] != 5'd0 && i[12] == 1'b0) begin
        d.is_slli = 1'b1;
        d.rd      = i[11:7];
        d.shamt   = i[6:2];
      end
      // c.add: 1001 rd rs2 10 (rd, rs2 != 0)
      if (i[15:12] == 4'b1001 && i[1:0] == 2'b10 && i[11:7] != 5'd0 && i[6:2] != 5'd0) begin
        d.is_add = 1'b1;
        d.rd     = i[11:7];
        d.rs2    = i[6:2];
      end
      // c.addw: 100111 rd' 01 rs2' 01
      if (i[15:10] == 6'b100111 && i[6:5] == 2'b01 && i[1:0] == 2'b01) begin
        d.is_addw = 1'b1;
        d.rd      = {2'b01, i[9:7]};
        d.rs2     = {2'b01, i[4:2]};
      end
      // c.ld: 011 uimm[5:3] rs1' uimm[7:6] rd' 00
      if (i[15:13] == 3'b011 && i[1:0] == 2'b00) begin
        d.is_ld  = 1'b1;
        d.rd     = {2'b01, i[4:2]};
        d.base   = {2'b01, i[9:7]};
        d.offset = {i[6:5], i[12:10], 3'b000};
        d.offs5  = {i[6:5], i[12:10]};
      end
      // c.lw: 010 uimm[5:3] rs1' uimm[2|6] rd' 00
      if (i[15:13] == 3'b010 && i[1:0] == 2'b00) begin
        d.is_lw  = 1'b1;
        d.rd     = {2'b01, i[4:2]};
        d.base   = {2'b01, i[9:7]};
        d.offset = {1'b0, i[5], i[12:10], i[6], 2'b00};
        d.offs5  = {i[5], i[12:10], i[6]};
      end
    end
    return d;
  endfunction

  cdec_t d0, d1, d2;

  always_comb begin
    d0 = decode_c(instr_i[0], valid_i[0] & compressed_i[0]);
    d1 = decode_c(instr_i[1], valid_i[1] & compressed_i[1]);
    d2 = decode_c(instr_i[2], valid_i[2] & compressed_i[2]);
  end

  // ---------------------------------------------------------- matching
  logic lea_ok, sl_ok, il_ok, lp_ok;
  logic [8:0] lp_next;   // byte offset the second load must have

  always_comb begin
    // slli rd ; add rd,rd,rs2  (rs2 must not be rd, see header)
    lea_ok = d0.is_slli && (d1.is_add || d1.is_addw) &&
             (d0.rd == d1.rd) && (d1.rs2 != d1.rd);
    // ... ; ld rd,0(rd)
    sl_ok  = lea_ok && (d2.is_ld || d2.is_lw) &&
             (d2.rd == d1.rd) && (d2.base == d2.rd) && (d2.offset == 8'd0);
    // add rd,rd,rs2 ; ld rd,0(rd)
    il_ok  = (d0.is_add || d0.is_addw) && (d1.is_ld || d1.is_lw) &&
             (d1.rd == d0.rd) && (d1.base == d1.rd) && (d1.offset == 8'd0);
    // ld rd1,off(rs1) ; ld rd2,off+size1(rs1)
    lp_next = {1'b0, d0.offset} + (d0.is_ld ? 9'd8 : 9'd4);
    lp_ok  = (d0.is_ld || d0.is_lw) && (d1.is_ld || d1.is_lw) &&
             (d0.base == d1.base) && (d0.rd != d0.base) &&
             ({1'b0, d1.offset} == lp_next);
  end

  // ---------------------------------------------------------- encoding
  f_r4_t f;

  always_comb begin
    f              = '0;
    replace_mask_o = 3'b000;
    invalid_mask_o = 3'b000;
    if (sl_ok) begin
      f.imm5   = d0.shamt;
      f.func2  = F2_SL;
      f.rs2    = d1.rs2;
      f.rs1    = d0.rd;
      f.func3  = {d1.is_addw, d2.is_lw ? W_LW : W_LD};
      f.rd     = d0.rd;
      f.opcode = OPC_F_SI;
      replace_mask_o = 3'b111;
      invalid_mask_o = 3'b100;
    end else if (lea_ok) begin
      f.imm5   = d0.shamt;
      f.func2  = F2_LEA;
      f.rs2    = d1.rs2;
      f.rs1    = d0.rd;
      f.func3  = {d1.is_addw, 2'b00};
      f.rd     = d0.rd;
      f.opcode = OPC_F_SI;
      replace_mask_o = 3'b011;
    end else if (il_ok) begin
      f.imm5   = 5'd0;
      f.func2  = F2_IL;
      f.rs2    = d0.rs2;
      f.rs1    = d0.rd;
      f.func3  = {d0.is_addw, d1.is_lw ? W_LW : W_LD};
      f.rd     = d0.rd;
      f.opcode = OPC_F_SI;
      replace_mask_o = 3'b011;
    end else if (lp_ok) begin
      f.imm5   = d0.offs5;
      f.func2  = d0.is_lw ? W_LW : W_LD;
      f.rs2    = d1.rd;
      f.rs1    = d0.base;
      f.func3  = {1'b0, d1.is_lw ? W_LW : W_LD};
      f.rd     = d0.rd;
      f.opcode = OPC_F_LP;
      replace_mask_o = 3'b011;
    end
    fused_o = f;
  end

endmodule
