// fusion_core_top: the instruction-fusion slice of an out-of-order RV64GC
// core, from the last fetch stage to commit.
//
// Path of an instruction:
//   F1 block (8 halfwords) -> fetch_f2_stage (predecode, fusion detection,
//   slot selection, write enables) -> fetch_queue (unordered write, is_fused
//   bit) -> decode_stage (4 lanes, fusion decoder | standard decoder)
//   -> [rename / dispatch / issue queues: outside, through ports]
//   -> int_fu_generator (ALUs, Fusion ALU for LEA) and mem_exec (MEM unit
//   with Indexed Load, MEM_SHIFT unit with Scaled Load) -> load/store unit
//   (outside) -> reorder_buffer (completion, in-order commit, fused-exception
//   handling, exception PC correction).
// Integer results complete into the ROB directly (ports 0..3 of its
// completion inputs); loads complete through lsu_cmplt_* (port 4). A taken
// exception, or flush_i from the core's branch recovery, empties the fetch
// queue, the execution pipelines and the F2 carry.
// The standard decoder, rename, issue queues, register file and load/store
// unit are the base core's and are reached through the ports below.
// Timing: F1 block to queue in the same cycle it is accepted; queue to decode
// output combinational; integer result in the ROB two edges after issue;
// memory request two edges after issue (three for a Scaled Load).
module fusion_core_top
  import fusion_pkg::*;
#(
  parameter int                 FQ_DEPTH       = 16,
  parameter int                 SL_LATENCY     = 1,
  parameter logic [3:0]         ALU_FU_VEC     = 4'b1011,
  parameter logic [3:0]         ALU_FUSION_VEC = 4'b0001
) (
  input  logic                          clk_i,
  input  logic                          rst_ni,
  input  logic                          flush_i,
  input  logic                          fusion_en_i,
  // from F1
  input  logic [7:0][15:0]              f1_data_i,
  input  logic [7:0]                    f1_valid_i,
  input  logic [XLEN_DEFAULT-1:0]       f1_pc_i,
  input  logic                          f1_xcpt_pf_i,
  input  logic                          f2_xcpt_af_i,
  output logic                          f1_ready_o,
  output logic [7:0]                    f2_fused_start_o,
  // decode: to the standard decoder and back, and on to rename
  output fq_instr_t [3:0]               dec_instr_o,
  input  ctrl_t     [3:0]               std_ctrl_i,
  output ctrl_t     [3:0]               dec_ctrl_o,
  input  logic                          dec_ready_i,
  // dispatch into the ROB
  input  logic       [3:0]              disp_valid_i,
  input  rob_entry_t [3:0]              disp_entry_i,
  output logic                          disp_ready_o,
  output logic       [3:0][ROB_ID_W_DEFAULT-1:0] disp_rob_id_o,
  // integer issue and write-back
  input  int_iss_t   [3:0]              int_iss_i,
  output int_cmplt_t [3:0]              int_cmplt_o,
  output logic       [3:0]              int_fu_err_o,
  // memory issue and load/store unit
  input  mem_iss_t                      mem_iss_i,
  output logic                          mem_iss_ready_o,
  output mem_req_t                      mem_req_o,
  input  logic                          lsu_cmplt_valid_i,
  input  logic [ROB_ID_W_DEFAULT-1:0]   lsu_cmplt_rob_id_i,
  input  logic                          lsu_xcpt_valid_i,
  input  logic [ROB_ID_W_DEFAULT-1:0]   lsu_xcpt_rob_id_i,
  input  logic [3:0]                    lsu_xcpt_cause_i,
  // commit and exceptions
  output logic       [3:0]              commit_valid_o,
  output rob_entry_t [3:0]              commit_entry_o,
  output logic       [3:0]              commit_rdy_o,
  output logic                          partial_commit_o,
  output logic                          xcpt_o,
  output logic [3:0]                    xcpt_cause_o,
  output logic [XLEN_DEFAULT-1:0]       xcpt_pc_o,
  output logic [ROB_ID_W_DEFAULT-1:0]   xcpt_rob_id_o,
  // status
  output logic [$clog2(FQ_DEPTH+1)-1:0] fq_count_o,
  output logic [ROB_ID_W_DEFAULT-1:0]   rob_head_o,
  output logic [ROB_ID_W_DEFAULT:0]     rob_used_o
);

  localparam int ROB_ENTRIES = 1 << ROB_ID_W_DEFAULT;

  logic                 flush;
  fq_slot_t [7:0]       f2_slot;
  logic [7:0]           f2_we;
  logic                 fq_ready;
  fq_instr_t [3:0]      fq_instr;
  logic [4:0]           cmplt_valid;
  logic [4:0][ROB_ID_W_DEFAULT-1:0] cmplt_rob_id;

  assign flush = flush_i | xcpt_o;

  fetch_f2_stage #(.N_ENTRIES(8)) u_f2 (
    .clk_i         (clk_i),
    .rst_ni        (rst_ni),
    .flush_i       (flush),
    .fusion_en_i   (fusion_en_i),
    .data_i        (f1_data_i),
    .valid_i       (f1_valid_i),
    .pc_i          (f1_pc_i),
    .xcpt_pf_i     (f1_xcpt_pf_i),
    .xcpt_af_i     (f2_xcpt_af_i),
    .accept_i      (fq_ready),
    .slot_o        (f2_slot),
    .we_o          (f2_we),
    .fused_start_o (f2_fused_start_o)
  );

  fetch_queue #(.DEPTH(FQ_DEPTH), .N_WR(8), .N_RD(4)) u_fq (
    .clk_i      (clk_i),
    .rst_ni     (rst_ni),
    .flush_i    (flush),
    .slot_i     (f2_slot),
    .we_i       (f2_we),
    .ready_o    (fq_ready),
    .instr_o    (fq_instr),
    .rd_ready_i (dec_ready_i),
    .count_o    (fq_count_o)
  );

  assign f1_ready_o  = fq_ready;
  assign dec_instr_o = fq_instr;

  decode_stage #(.N_LANES(4)) u_decode (
    .instr_i    (fq_instr),
    .std_ctrl_i (std_ctrl_i),
    .ctrl_o     (dec_ctrl_o)
  );

  int_fu_generator #(.N_PORTS(4), .ALU_FU_VEC(ALU_FU_VEC), .ALU_FUSION_VEC(ALU_FUSION_VEC)) u_int (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .flush_i  (flush),
    .iss_i    (int_iss_i),
    .cmplt_o  (int_cmplt_o),
    .fu_err_o (int_fu_err_o)
  );

  mem_exec #(.SL_LATENCY(SL_LATENCY)) u_mem (
    .clk_i       (clk_i),
    .rst_ni      (rst_ni),
    .flush_i     (flush),
    .iss_i       (mem_iss_i),
    .iss_ready_o (mem_iss_ready_o),
    .req_o       (mem_req_o)
  );

  always_comb begin
    for (int p = 0; p < 4; p++) begin
      cmplt_valid[p]  = int_cmplt_o[p].valid;
      cmplt_rob_id[p] = int_cmplt_o[p].rob_id;
    end
    cmplt_valid[4]  = lsu_cmplt_valid_i;
    cmplt_rob_id[4] = lsu_cmplt_rob_id_i;
  end

  reorder_buffer #(.ROB_ENTRIES(ROB_ENTRIES), .DISP_W(4), .COMMIT_W(4), .N_CMPLT(5)) u_rob (
    .clk_i            (clk_i),
    .rst_ni           (rst_ni),
    .disp_valid_i     (disp_valid_i & {4{~flush_i}}),
    .disp_entry_i     (disp_entry_i),
    .disp_ready_o     (disp_ready_o),
    .disp_rob_id_o    (disp_rob_id_o),
    .cmplt_valid_i    (cmplt_valid),
    .cmplt_rob_id_i   (cmplt_rob_id),
    .xcpt_valid_i     (lsu_xcpt_valid_i),
    .xcpt_rob_id_i    (lsu_xcpt_rob_id_i),
    .xcpt_cause_i     (lsu_xcpt_cause_i),
    .commit_valid_o   (commit_valid_o),
    .commit_entry_o   (commit_entry_o),
    .commit_rdy_o     (commit_rdy_o),
    .partial_commit_o (partial_commit_o),
    .xcpt_o           (xcpt_o),
    .xcpt_cause_o     (xcpt_cause_o),
    .xcpt_pc_o        (xcpt_pc_o),
    .xcpt_rob_id_o    (xcpt_rob_id_o),
    .head_o           (rob_head_o),
    .used_o           (rob_used_o)
  );

endmodule
