// reorder_buffer: in-order commit with support for fused-instruction
// exceptions.
//
// Structure:
//  * rob_fifo_ctrl manages head/tail of the ROB_ENTRIES-entry circular
//    buffer. Dispatch writes up to DISP_W entries per cycle (PC, fusion kind,
//    architectural and physical destinations); a group is taken whole or not
//    at all (disp_ready_o) and the granted rob ids come back on
//    disp_rob_id_o in the same cycle.
//  * completed vector, one bit per entry: set by the N_CMPLT completion ports
//    (addressed by rob id), cleared when an entry is allocated and by the
//    fused-exception handler's reset request.
//  * exception collector: keeps the oldest reported exception (age measured
//    from the head). When it matches the head and the head is not completed,
//    the exception is taken: xcpt_o is raised for one cycle with the cause and
//    the PC corrected by fusion_xcpt_pc, and the ROB is emptied.
//  * commit: the completed bits of the COMMIT_W entries from the head form
//    rdy_vector; fusion_xcptn_handler turns it into commit_valid_mask (what
//    commits, also commit_rdy_o for the load/store unit and the read enables of
//    the entry memory) and controller_rd_ens_mask (how far the head moves).
//    Normally both are the in-order ready prefix; for a partially completed
//    fused instruction the head stops on it, its completed bit is cleared at
//    the next edge, and the exception is taken when it is seen at the head.
// Commit is combinational from the state: an entry completed at edge t can
// commit in the cycle after t. Sizes and the collector's single register are
// this implementation's choices.
module reorder_buffer
  import fusion_pkg::*;
#(
  parameter int ROB_ENTRIES = 64,
  parameter int DISP_W      = 4,
  parameter int COMMIT_W    = 4,
  parameter int N_CMPLT     = 5
) (
  input  logic                                   clk_i,
  input  logic                                   rst_ni,
  // dispatch
  input  logic       [DISP_W-1:0]                disp_valid_i,
  input  rob_entry_t [DISP_W-1:0]                disp_entry_i,
  output logic                                   disp_ready_o,
  output logic       [DISP_W-1:0][$clog2(ROB_ENTRIES)-1:0] disp_rob_id_o,
  // completion
  input  logic       [N_CMPLT-1:0]               cmplt_valid_i,
  input  logic       [N_CMPLT-1:0][$clog2(ROB_ENTRIES)-1:0] cmplt_rob_id_i,
  // exception reports
  input  logic                                   xcpt_valid_i,
  input  logic       [$clog2(ROB_ENTRIES)-1:0]   xcpt_rob_id_i,
  input  logic       [3:0]                       xcpt_cause_i,
  // commit
  output logic       [COMMIT_W-1:0]              commit_valid_o,
  output rob_entry_t [COMMIT_W-1:0]              commit_entry_o,
  output logic       [COMMIT_W-1:0]              commit_rdy_o,
  output logic                                   partial_commit_o,
  // taken exception
  output logic                                   xcpt_o,
  output logic       [3:0]                       xcpt_cause_o,
  output logic       [XLEN_DEFAULT-1:0]          xcpt_pc_o,
  output logic       [$clog2(ROB_ENTRIES)-1:0]   xcpt_rob_id_o,
  output logic       [$clog2(ROB_ENTRIES)-1:0]   head_o,
  output logic       [$clog2(ROB_ENTRIES+1)-1:0] used_o
);

  localparam int IW = $clog2(ROB_ENTRIES);
  localparam int CW = $clog2(ROB_ENTRIES + 1);

  rob_entry_t [ROB_ENTRIES-1:0] mem_q;
  logic [ROB_ENTRIES-1:0]       completed_q;

  logic [DISP_W-1:0]            wr_gnt;
  logic [DISP_W-1:0][IW-1:0]    wr_idx;
  logic [COMMIT_W-1:0]          rd_gnt;
  logic [COMMIT_W-1:0][IW-1:0]  rd_idx;
  logic [IW-1:0]                head, tail;
  logic                         full, empty;
  logic [CW-1:0]                free, used;
  logic [CW-1:0]                n_disp;
  logic                         flush;

  logic [COMMIT_W-1:0]          rdy_vector, commit_valid_mask, ctrl_rd_ens_mask;
  logic                         cmplt_reset;
  logic                         partial_in_window;  // seen in the window, may still wait
  logic [IW-1:0]                cmplt_reset_id;

  logic                         pend_q;
  logic [IW-1:0]                pend_id_q;
  logic [3:0]                   pend_cause_q;
  logic                         take;

  always_comb begin
    n_disp = '0;
    for (int k = 0; k < DISP_W; k++) n_disp = n_disp + CW'(disp_valid_i[k]);
  end
  assign disp_ready_o = free >= n_disp;

  rob_fifo_ctrl #(.DEPTH(ROB_ENTRIES), .N_WR(DISP_W), .N_RD(COMMIT_W)) u_fifo_ctrl (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .flush_i  (flush),
    .wr_req_i (disp_valid_i & {DISP_W{disp_ready_o & ~flush}}),
    .wr_gnt_o (wr_gnt),
    .wr_idx_o (wr_idx),
    .rd_req_i (ctrl_rd_ens_mask & {COMMIT_W{~flush}}),
    .rd_gnt_o (rd_gnt),
    .rd_idx_o (rd_idx),
    .head_o   (head),
    .tail_o   (tail),
    .full_o   (full),
    .empty_o  (empty),
    .free_o   (free),
    .used_o   (used)
  );

  assign disp_rob_id_o = wr_idx;

  // Commit window.
  always_comb begin
    for (int k = 0; k < COMMIT_W; k++)
      rdy_vector[k] = completed_q[IW'(head + IW'(k))] && (CW'(k) < used);
  end

  fusion_xcptn_handler #(.ROB_ENTRIES(ROB_ENTRIES), .COMMIT_W(COMMIT_W)) u_fusion_xcptn (
    .rob_head_i               (head),
    .used_i                   (used),
    .rdy_vector_i             (rdy_vector),
    .xcpt_valid_i             (pend_q),
    .xcpt_rob_id_i            (pend_id_q),
    .commit_valid_mask_o      (commit_valid_mask),
    .controller_rd_ens_mask_o (ctrl_rd_ens_mask),
    .partial_o                (partial_in_window),
    .cmplt_reset_o            (cmplt_reset),
    .cmplt_reset_id_o         (cmplt_reset_id)
  );

  // Read grants of the commit path: same prefix rule as the controller, on
  // commit_valid_mask.
  always_comb begin
    logic run;
    run = 1'b1;
    for (int k = 0; k < COMMIT_W; k++) begin
      run               = run && commit_valid_mask[k] && (CW'(k) < used) && !flush;
      commit_valid_o[k] = run;
      commit_entry_o[k] = mem_q[rd_idx[k]];
    end
  end
  assign commit_rdy_o = commit_valid_o;
  // the partially completed fused instruction commits in this cycle
  assign partial_commit_o = cmplt_reset;

  // Exception collector.
  assign take  = pend_q && !empty && (pend_id_q == head) && !completed_q[head];
  assign flush = take;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      pend_q       <= 1'b0;
      pend_id_q    <= '0;
      pend_cause_q <= '0;
    end else if (take) begin
      pend_q <= 1'b0;
    end else if (xcpt_valid_i &&
                 (!pend_q || IW'(xcpt_rob_id_i - head) < IW'(pend_id_q - head))) begin
      pend_q       <= 1'b1;
      pend_id_q    <= xcpt_rob_id_i;
      pend_cause_q <= xcpt_cause_i;
    end
  end

  fusion_xcpt_pc #(.XLEN(XLEN_DEFAULT)) u_xcpt_pc (
    .xcpt_valid_i (take),
    .fusion_i     (mem_q[head].fusion),
    .pc_i         (mem_q[head].pc),
    .pc_o         (xcpt_pc_o)
  );

  assign xcpt_o        = take;
  assign xcpt_cause_o  = pend_cause_q;
  assign xcpt_rob_id_o = pend_id_q;
  assign head_o        = head;
  assign used_o        = used;

  // Completed vector and entry memory.
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      completed_q <= '0;
    end else if (flush) begin
      completed_q <= '0;
    end else begin
      for (int c = 0; c < N_CMPLT; c++)
        if (cmplt_valid_i[c]) completed_q[cmplt_rob_id_i[c]] <= 1'b1;
      for (int k = 0; k < DISP_W; k++)
        if (wr_gnt[k]) completed_q[wr_idx[k]] <= 1'b0;
      if (cmplt_reset) completed_q[cmplt_reset_id] <= 1'b0;
    end
  end

  always_ff @(posedge clk_i) begin
    for (int k = 0; k < DISP_W; k++)
      if (wr_gnt[k]) mem_q[wr_idx[k]] <= disp_entry_i[k];
  end

  // The controller's read grants follow the head-advance mask, a full buffer
  // grants no dispatch, dispatch starts at the tail, and a completed-bit reset
  // only happens for a partially completed instruction seen in the window.
  assert property (@(posedge clk_i) disable iff (!rst_ni) (rd_gnt == (ctrl_rd_ens_mask & {COMMIT_W{~flush}})));
  assert property (@(posedge clk_i) disable iff (!rst_ni) (full |-> (wr_gnt == '0)));
  assert property (@(posedge clk_i) disable iff (!rst_ni) (wr_idx[0] == tail));
  assert property (@(posedge clk_i) disable iff (!rst_ni) (cmplt_reset |-> partial_in_window));

  // Dispatch groups are packed from lane 0 and never partly granted.
  assert property (@(posedge clk_i) disable iff (!rst_ni) (wr_gnt == (disp_valid_i & {DISP_W{disp_ready_o & ~flush}})));

endmodule
