// tb_reorder_buffer: random dispatch, out-of-order completion and exception
// injection against an in-order model of the ROB.
// Exceptions are injected one at a time: on a plain instruction the report
// arrives without completion; on an Indexed or Scaled Load the instruction
// completes and reports the exception in the same cycle (its address
// arithmetic retired, its load faulted). Every cycle the model predicts the
// commit mask (in-order completed prefix, up to 4, stopping after a partially
// completed fused instruction), the partial flag, the taken exception with
// its cause and PC (+2 for IL, +4 for SL) and the dispatch grant. Partial
// commits inside a wrapping commit window, full-ROB stalls and both exception
// kinds are counted and must occur.
module tb_reorder_buffer;
  import fusion_pkg::*;
  localparam int N = 64;

  logic clk = 0, rst_n = 0;
  logic       [3:0]      disp_valid;
  rob_entry_t [3:0]      disp_entry;
  logic                  disp_ready;
  logic       [3:0][5:0] disp_id;
  logic       [4:0]      cmplt_valid;
  logic       [4:0][5:0] cmplt_id;
  logic                  xv;
  logic       [5:0]      xid;
  logic       [3:0]      xcause;
  logic       [3:0]      commit_valid, commit_rdy;
  rob_entry_t [3:0]      commit_entry;
  logic                  partial, xcpt;
  logic       [3:0]      xcpt_cause;
  logic       [63:0]     xcpt_pc;
  logic       [5:0]      xcpt_id, head;
  logic       [6:0]      used;

  int checks = 0, failures = 0;
  int n_commit = 0, n_commit4 = 0, n_partial = 0, n_partial_wrap = 0, n_plain_x = 0, n_il_x = 0, n_sl_x = 0, n_full = 0;

  always #5 clk = ~clk;

  reorder_buffer #(.ROB_ENTRIES(N), .DISP_W(4), .COMMIT_W(4), .N_CMPLT(5)) dut (
    .clk_i(clk), .rst_ni(rst_n), .disp_valid_i(disp_valid), .disp_entry_i(disp_entry), .disp_ready_o(disp_ready),
    .disp_rob_id_o(disp_id), .cmplt_valid_i(cmplt_valid), .cmplt_rob_id_i(cmplt_id), .xcpt_valid_i(xv),
    .xcpt_rob_id_i(xid), .xcpt_cause_i(xcause), .commit_valid_o(commit_valid), .commit_entry_o(commit_entry),
    .commit_rdy_o(commit_rdy), .partial_commit_o(partial), .xcpt_o(xcpt), .xcpt_cause_o(xcpt_cause),
    .xcpt_pc_o(xcpt_pc), .xcpt_rob_id_o(xcpt_id), .head_o(head), .used_o(used));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  typedef struct {
    logic [5:0]   id;
    logic [63:0]  pc;
    fusion_kind_e fk;
    bit           comp;
    bit           committed;
    bit           fault;
    logic [3:0]   cause;
  } m_t;

  initial begin : stim
    automatic m_t rob[$];
    m_t e;
    int m_tail, outstanding;
    logic [63:0] pc;
    fusion_kind_e kinds[5];
    kinds = '{FK_NONE, FK_LEA, FK_IL, FK_SL, FK_LP};
    m_tail = 0; outstanding = 0; pc = 64'h8000_0000;
    disp_valid = 0; disp_entry = '0; cmplt_valid = 0; cmplt_id = '0; xv = 0; xid = 0; xcause = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      bit take, ppart;
      int ncom, phase;
      logic [3:0] ecom;
      @(negedge clk);
      phase = (t / 400) % 3;     // 0: normal, 1: slow completion (fills), 2: fast
      // ------------------------------------------------ expected outputs
      take  = rob.size() > 0 && rob[0].fault && !rob[0].comp;
      ecom  = 4'b0; ppart = 0; ncom = 0;
      if (!take)
        for (int k = 0; k < 4 && k < rob.size(); k++) begin
          if (!rob[k].comp) break;
          ecom[k] = 1'b1; ncom++;
          if (rob[k].fault) begin
            ppart = 1;
            if (int'(head) + k >= N) n_partial_wrap++;
            break;
          end
        end
      checks++;
      if (commit_valid !== ecom || commit_rdy !== ecom || partial !== ppart) begin
        failures++; $display("FAIL t=%0d commit %b exp %b partial %b exp %b", t, commit_valid, ecom, partial, ppart);
      end
      for (int k = 0; k < 4; k++) if (ecom[k]) begin
        checks++;
        if (commit_entry[k].pc !== rob[k].pc || commit_entry[k].fusion !== rob[k].fk) begin
          failures++; $display("FAIL t=%0d commit entry %0d pc %h exp %h", t, k, commit_entry[k].pc, rob[k].pc);
        end
      end
      checks++;
      if (xcpt !== take) begin
        failures++; $display("FAIL t=%0d xcpt=%b exp %b", t, xcpt, take);
      end else if (take) begin
        logic [63:0] epc;
        epc = rob[0].pc + (rob[0].fk == FK_IL ? 2 : rob[0].fk == FK_SL ? 4 : 0);
        checks++;
        if (xcpt_pc !== epc || xcpt_cause !== rob[0].cause || xcpt_id !== rob[0].id) begin
          failures++; $display("FAIL t=%0d xcpt pc %h exp %h", t, xcpt_pc, epc);
        end
        if (rob[0].fk == FK_IL) n_il_x++; else if (rob[0].fk == FK_SL) n_sl_x++; else n_plain_x++;
      end
      checks++;
      if (used !== 7'(rob.size()) || (rob.size() > 0 && head !== rob[0].id)) begin
        failures++; $display("FAIL t=%0d used %0d exp %0d", t, used, rob.size());
      end
      if (ppart && rob[ncom-1].committed) begin
        failures++; $display("FAIL t=%0d fused instruction committed twice", t);
      end
      n_commit += ncom;
      if (ncom == 4) n_commit4++;
      if (ppart) n_partial++;

      // ------------------------------------------------ inputs
      disp_valid = 0; cmplt_valid = 0; xv = 0;
      if (!take) begin
        int nd, nc;
        // completions
        nc = (phase == 1) ? $urandom_range(0, 1) : (phase == 2 ? 5 : $urandom_range(1, 4));
        for (int c = 0; c < nc; c++) begin
          int cand[$];
          cand.delete();
          for (int i = 0; i < rob.size(); i++)
            if (!rob[i].comp && !rob[i].committed && !rob[i].fault && (i < 8 || $urandom_range(0, 3) == 0)) cand.push_back(i);
          if (cand.size() == 0) break;
          begin
            int i;
            i = cand[$urandom_range(0, cand.size() - 1)];
            rob[i].comp = 1;
            cmplt_valid[c] = 1'b1;
            cmplt_id[c] = rob[i].id;
            // exception injection
            if (outstanding == 0 && $urandom_range(0, 15) == 0 &&
                (rob[i].fk == FK_IL || rob[i].fk == FK_SL || rob[i].fk == FK_NONE)) begin
              rob[i].fault = 1; rob[i].cause = 4'($urandom_range(1, 15));
              outstanding = 1;
              xv = 1; xid = rob[i].id; xcause = rob[i].cause;
              if (rob[i].fk == FK_NONE) begin
                rob[i].comp = 0; cmplt_valid[c] = 1'b0;   // plain faulting instruction never completes
              end
            end
          end
        end
        // dispatch
        nd = $urandom_range(0, 4);
        for (int k = 0; k < 4; k++) begin
          disp_valid[k] = (k < nd);
          disp_entry[k] = '0;
          disp_entry[k].pc = pc + 64'(2 * k);
          disp_entry[k].fusion = kinds[$urandom_range(0, 4)];
          disp_entry[k].rd = 5'($urandom);
        end
        #1;
        checks++;
        if (disp_ready !== (N - rob.size() >= nd)) begin
          failures++; $display("FAIL t=%0d disp_ready %b", t, disp_ready);
        end
        if (!disp_ready) n_full++;
        if (disp_ready) begin
          for (int k = 0; k < nd; k++) begin
            checks++;
            if (disp_id[k] !== 6'(m_tail + k)) begin failures++; $display("FAIL t=%0d disp id", t); end
            e.id = 6'(m_tail + k); e.pc = disp_entry[k].pc; e.fk = disp_entry[k].fusion;
            e.comp = 0; e.committed = 0; e.fault = 0; e.cause = 0;
            rob.push_back(e);
          end
          m_tail += nd; pc += 64'(2 * nd);
        end
      end
      // ------------------------------------------------ state update at the edge
      if (take) begin
        rob.delete(); outstanding = 0; m_tail = 0;
      end else begin
        for (int k = 0; k < ncom; k++) begin
          if (ppart && k == ncom - 1) begin
            rob[0].committed = 1; rob[0].comp = 0;
          end else void'(rob.pop_front());
        end
      end
    end
    $display("commits=%0d groups4=%0d partial=%0d partial_wrapped=%0d xcpt plain=%0d il=%0d sl=%0d full_stalls=%0d",
             n_commit, n_commit4, n_partial, n_partial_wrap, n_plain_x, n_il_x, n_sl_x, n_full);
    if (n_partial == 0 || n_partial_wrap == 0 || n_plain_x == 0 || n_il_x == 0 || n_sl_x == 0 || n_full == 0 || n_commit4 == 0) begin
      failures++; $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
