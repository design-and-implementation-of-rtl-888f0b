// fusion_il_fu: effective address of the fused Indexed Load.
//
// result = rs1 + rs2. With XLEN = 64, word_i selects the addw form: the sum of
// the low words, sign-extended to 64 bits. With XLEN = 32 the sum is plain
// and word_i is ignored. Combinational; the result goes straight to the
// address path of the load.
module fusion_il_fu #(
  parameter int XLEN = 64
) (
  input  logic [XLEN-1:0] data_rs1_i,
  input  logic [XLEN-1:0] data_rs2_i,
  input  logic            word_i,
  output logic [XLEN-1:0] result_o
);

  logic [XLEN-1:0] sum;
  logic [31:0]     sum32;

  assign sum   = data_rs1_i + data_rs2_i;
  assign sum32 = sum[31:0];
  assign result_o = (XLEN > 32 && word_i) ? XLEN'($signed(sum32)) : sum;

endmodule
