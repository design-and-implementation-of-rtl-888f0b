// fusion_sl_fu: effective address of the fused Scaled Load.
//
// result = (rs1 << imm) + rs2, with a doubleword shift and an add or addw
// (word_i, sign-extended low word) for the addition; with XLEN = 32 all is 32
// bits and word_i is ignored. LATENCY = 0: shift and add in the same cycle,
// combinational from valid_i to valid_o. LATENCY = 1: the shifted value,
// rs2 and word_i are registered and the addition is done in the next cycle,
// which keeps the shift off the path into the TLB; valid_o then follows
// valid_i by one cycle. The unit accepts one operation per cycle.
module fusion_sl_fu #(
  parameter int XLEN    = 64,
  parameter int LATENCY = 1
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic            valid_i,
  input  logic [XLEN-1:0] data_rs1_i,
  input  logic [XLEN-1:0] data_rs2_i,
  input  logic [4:0]      imm_i,
  input  logic            word_i,
  output logic            valid_o,
  output logic [XLEN-1:0] result_o
);

  logic [XLEN-1:0] shifted, sh, rs2;
  logic            word, vld;
  logic [XLEN-1:0] sum;
  logic [31:0]     sum32;

  assign shifted = data_rs1_i << imm_i;

  if (LATENCY == 0) begin : g_comb
    assign sh   = shifted;
    assign rs2  = data_rs2_i;
    assign word = word_i;
    assign vld  = valid_i;
  end else begin : g_reg
    logic [XLEN-1:0] intermediate_result_q, data_rs2_q;
    logic            word_q, valid_q;
    always_ff @(posedge clk_i or negedge rst_ni) begin
      if (!rst_ni) valid_q <= 1'b0;
      else         valid_q <= valid_i;
    end
    always_ff @(posedge clk_i) begin
      if (valid_i) begin
        intermediate_result_q <= shifted;
        data_rs2_q            <= data_rs2_i;
        word_q                <= word_i;
      end
    end
    assign sh   = intermediate_result_q;
    assign rs2  = data_rs2_q;
    assign word = word_q;
    assign vld  = valid_q;
  end

  assign sum      = sh + rs2;
  assign sum32    = sum[31:0];
  assign result_o = (XLEN > 32 && word) ? XLEN'($signed(sum32)) : sum;
  assign valid_o  = vld;

endmodule
