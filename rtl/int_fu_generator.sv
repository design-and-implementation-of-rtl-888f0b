// int_fu_generator: integer execution ports with their ALUs.
//
// N_PORTS issue ports, each a two-register pipeline: the issued operation
// (operands already read, Issue and Register Request in the same cycle) is
// registered into Execute, the ALU computes combinationally, and the result is
// registered in Complete. A result therefore appears on cmplt_o two clock
// edges after the operation is presented on iss_i; one operation per port per
// cycle.
// Allocation: a port gets an ALU where ALU_FU_VEC is set. Where ALU_FUSION_VEC
// is also set, that ALU is a Fusion ALU (the plain ALU plus LEA); a set
// ALU_FUSION_VEC bit without the ALU_FU_VEC bit allocates nothing. The
// multiplier, divider and branch units of the core's other ports are not part
// of this block: an operation issued to a port whose ALU cannot execute it
// (no ALU, or LEA on a plain ALU) raises fu_err_o for that port and produces
// no result. flush_i drops everything in flight.
module int_fu_generator
  import fusion_pkg::*;
#(
  parameter int                 N_PORTS        = 4,
  parameter logic [N_PORTS-1:0] ALU_FU_VEC     = 4'b1011,
  parameter logic [N_PORTS-1:0] ALU_FUSION_VEC = 4'b0001
) (
  input  logic                        clk_i,
  input  logic                        rst_ni,
  input  logic                        flush_i,
  input  int_iss_t   [N_PORTS-1:0]    iss_i,
  output int_cmplt_t [N_PORTS-1:0]    cmplt_o,
  output logic       [N_PORTS-1:0]    fu_err_o
);

  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    localparam bit HAS_ALU = ALU_FU_VEC[p];
    localparam bit HAS_LEA = ALU_FU_VEC[p] & ALU_FUSION_VEC[p];

    assign fu_err_o[p] = iss_i[p].valid &&
                         !(HAS_ALU && (iss_i[p].op != HL_F_LEA || HAS_LEA));

    if (HAS_ALU) begin : g_alu
      int_iss_t                exe_q;
      int_cmplt_t              cmplt_q;
      logic [XLEN_DEFAULT-1:0] result;
      logic                    can_exec;

      assign can_exec = iss_i[p].op != HL_F_LEA || HAS_LEA;

      always_ff @(posedge clk_i or negedge rst_ni) begin
        if (!rst_ni) begin
          exe_q.valid   <= 1'b0;
          cmplt_q.valid <= 1'b0;
        end else begin
          exe_q.valid   <= iss_i[p].valid && can_exec && !flush_i;
          cmplt_q.valid <= exe_q.valid && !flush_i;
          if (iss_i[p].valid) begin
            exe_q.op          <= iss_i[p].op;
            exe_q.word        <= iss_i[p].word;
            exe_q.unsigned_op <= iss_i[p].unsigned_op;
            exe_q.data_rs1    <= iss_i[p].data_rs1;
            exe_q.data_rs2    <= iss_i[p].data_rs2;
            exe_q.imm         <= iss_i[p].imm;
            exe_q.rob_id      <= iss_i[p].rob_id;
            exe_q.prd         <= iss_i[p].prd;
          end
          if (exe_q.valid) begin
            cmplt_q.result <= result;
            cmplt_q.rob_id <= exe_q.rob_id;
            cmplt_q.prd    <= exe_q.prd;
          end
        end
      end

      fusion_alu #(.XLEN(XLEN_DEFAULT), .FUSION_EN(HAS_LEA)) u_alu (
        .op_i       (exe_q.op),
        .word_i     (exe_q.word),
        .unsigned_i (exe_q.unsigned_op),
        .data_rs1_i (exe_q.data_rs1),
        .data_rs2_i (exe_q.data_rs2),
        .imm_i      (exe_q.imm),
        .result_o   (result)
      );

      assign cmplt_o[p] = cmplt_q;
    end else begin : g_no_alu
      assign cmplt_o[p] = '0;
    end
  end

endmodule
