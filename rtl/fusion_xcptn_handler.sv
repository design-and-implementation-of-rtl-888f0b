// fusion_xcptn_handler: commit masks for a fused instruction that both
// completed and raised an exception ("partially completed").
//
// The only instruction of a fused sequence that can fault is its final load,
// and the instructions before it must still retire. Such a fused instruction
// is marked completed and would otherwise be committed and leave the ROB
// without its exception ever being taken at the head.
// Each cycle the handler
//  1. checks whether the rob_id of the pending exception lies in the commit
//     window [head, head + COMMIT_W). The window is compared against its two
//     bounds; when it wraps past the end of the circular buffer the test
//     becomes "id >= head or id < upper bound". The window is also limited to
//     the used entries.
//  2. if that entry is completed (rdy_vector_i at its position), it is
//     partially completed: commit_valid_mask_o lets the in-order ready prefix
//     commit up to and including it and nothing after it, while
//     controller_rd_ens_mask_o stops before it, so the head advances exactly
//     to the fused instruction and stays there.
//  3. when the fused instruction does commit, cmplt_reset_o asks the ROB to
//     clear its completed bit at the next edge: it then waits at the head,
//     uncompleted, where the exception collector finds it and takes the
//     exception, and it cannot commit twice.
// Without a partially completed instruction both masks equal the in-order
// ready prefix. Combinational.
module fusion_xcptn_handler #(
  parameter int ROB_ENTRIES = 64,
  parameter int COMMIT_W    = 4
) (
  input  logic [$clog2(ROB_ENTRIES)-1:0]   rob_head_i,
  input  logic [$clog2(ROB_ENTRIES+1)-1:0] used_i,
  input  logic [COMMIT_W-1:0]              rdy_vector_i,
  input  logic                             xcpt_valid_i,
  input  logic [$clog2(ROB_ENTRIES)-1:0]   xcpt_rob_id_i,
  output logic [COMMIT_W-1:0]              commit_valid_mask_o,
  output logic [COMMIT_W-1:0]              controller_rd_ens_mask_o,
  output logic                             partial_o,
  output logic                             cmplt_reset_o,
  output logic [$clog2(ROB_ENTRIES)-1:0]   cmplt_reset_id_o
);

  localparam int IW = $clog2(ROB_ENTRIES);
  localparam int CW = $clog2(ROB_ENTRIES + 1);

  logic [IW:0]   upper;        // head + COMMIT_W, one extra bit for the wrap
  logic          wraps, in_window;
  logic [IW-1:0] pos_full;
  logic [COMMIT_W-1:0] prefix;

  always_comb begin
    upper = {1'b0, rob_head_i} + (IW+1)'(COMMIT_W);
    wraps = upper[IW];
    if (!wraps)
      in_window = (xcpt_rob_id_i >= rob_head_i) && ({1'b0, xcpt_rob_id_i} < upper);
    else
      in_window = (xcpt_rob_id_i >= rob_head_i) || (xcpt_rob_id_i < upper[IW-1:0]);
    pos_full = xcpt_rob_id_i - rob_head_i;
    in_window = in_window && xcpt_valid_i && (CW'(pos_full) < used_i);
  end

  always_comb begin
    logic run;
    logic hit;
    run       = 1'b1;
    partial_o = 1'b0;
    for (int k = 0; k < COMMIT_W; k++) begin
      run       = run && rdy_vector_i[k] && (CW'(k) < used_i);
      prefix[k] = run;
    end
    commit_valid_mask_o      = prefix;
    controller_rd_ens_mask_o = prefix;
    hit = 1'b0;
    for (int k = 0; k < COMMIT_W; k++) begin
      if (in_window && pos_full == IW'(k) && rdy_vector_i[k]) partial_o = 1'b1;
      if (in_window && pos_full == IW'(k)) hit = 1'b1;
      if (partial_o && hit) begin
        // k is at or after the partially completed instruction
        if (pos_full != IW'(k)) commit_valid_mask_o[k] = 1'b0;
        controller_rd_ens_mask_o[k] = 1'b0;
      end
    end
    cmplt_reset_o    = 1'b0;
    for (int k = 0; k < COMMIT_W; k++)
      if (partial_o && pos_full == IW'(k) && commit_valid_mask_o[k]) cmplt_reset_o = 1'b1;
    cmplt_reset_id_o = xcpt_rob_id_i;
  end

endmodule
