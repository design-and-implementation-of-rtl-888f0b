// tb_fusion_core_top: end-to-end test of the fusion slice at its default
// parameters.
//
// The testbench plays the parts of the core that are outside the slice:
//  * F1: sends 8-halfword blocks of compressed code, built from fusible
//    sequences (LEA, IL, SL, load pair) mixed with random instructions. Some
//    blocks carry a fetch page fault, and fusion is switched off in some
//    phases.
//  * standard decoder: answers every lane with a fixed control word.
//  * rename/dispatch: takes the decoded group when the ROB has room and
//    dispatches it into the ROB.
//  * issue: LEA goes to integer port 0 (the Fusion ALU), other instructions
//    to ports 1 and 3 as additions, Indexed and Scaled Loads to the memory
//    unit; now and then a LEA is sent to port 3 (a plain ALU) and must be
//    refused.
//  * load/store unit: completes fused loads and load pairs a few cycles later
//    and sometimes reports a fault on an Indexed or Scaled Load.
// Checks: the decoded stream against the reference fusion of every block
// (kind, encoding, PC, exception flag, control word), every ALU result and
// memory address, commit in program order, the partial commit of a faulting
// fused load followed by the exception with PC + 2 (IL) or + 4 (SL).
// Each mechanism is counted and the test fails if one never happened.
module tb_fusion_core_top;
  import fusion_pkg::*;
  import tb_rvc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic flush = 0, fusion_en;
  logic [7:0][15:0] f1_data;
  logic [7:0]       f1_valid;
  logic [63:0]      f1_pc;
  logic             f1_pf, f2_af, f1_ready;
  logic [7:0]       fused_start;
  fq_instr_t [3:0]  dec_instr;
  ctrl_t     [3:0]  std_ctrl, dec_ctrl;
  logic             dec_ready;
  logic       [3:0] disp_valid;
  rob_entry_t [3:0] disp_entry;
  logic             disp_ready;
  logic [3:0][5:0]  disp_id;
  int_iss_t   [3:0] int_iss;
  int_cmplt_t [3:0] int_cmplt;
  logic       [3:0] fu_err;
  mem_iss_t         mem_iss;
  logic             mem_ready;
  mem_req_t         mem_req;
  logic             lsu_cv, lsu_xv;
  logic [5:0]       lsu_cid, lsu_xid;
  logic [3:0]       lsu_cause;
  logic       [3:0] commit_valid, commit_rdy;
  rob_entry_t [3:0] commit_entry;
  logic             partial, xcpt;
  logic [3:0]       xcpt_cause;
  logic [63:0]      xcpt_pc;
  logic [5:0]       xcpt_id, rob_head;
  logic [6:0]       rob_used;
  logic [4:0]       fq_count;

  int checks = 0, failures = 0;
  int n_lea = 0, n_il = 0, n_sl = 0, n_lp = 0, n_freed = 0, n_pf_block = 0, n_off_block = 0;
  int n_fq_stall = 0, n_mem_hold = 0, n_lea_alu = 0, n_il_addr = 0, n_sl_addr = 0, n_partial = 0;
  int n_xcpt_il = 0, n_xcpt_sl = 0, n_fu_err = 0, n_rob_wrap = 0, n_commit = 0;

  always #5 clk = ~clk;

  fusion_core_top dut (
    .clk_i(clk), .rst_ni(rst_n), .flush_i(flush), .fusion_en_i(fusion_en),
    .f1_data_i(f1_data), .f1_valid_i(f1_valid), .f1_pc_i(f1_pc), .f1_xcpt_pf_i(f1_pf), .f2_xcpt_af_i(f2_af),
    .f1_ready_o(f1_ready), .f2_fused_start_o(fused_start),
    .dec_instr_o(dec_instr), .std_ctrl_i(std_ctrl), .dec_ctrl_o(dec_ctrl), .dec_ready_i(dec_ready),
    .disp_valid_i(disp_valid), .disp_entry_i(disp_entry), .disp_ready_o(disp_ready), .disp_rob_id_o(disp_id),
    .int_iss_i(int_iss), .int_cmplt_o(int_cmplt), .int_fu_err_o(fu_err),
    .mem_iss_i(mem_iss), .mem_iss_ready_o(mem_ready), .mem_req_o(mem_req),
    .lsu_cmplt_valid_i(lsu_cv), .lsu_cmplt_rob_id_i(lsu_cid), .lsu_xcpt_valid_i(lsu_xv),
    .lsu_xcpt_rob_id_i(lsu_xid), .lsu_xcpt_cause_i(lsu_cause),
    .commit_valid_o(commit_valid), .commit_entry_o(commit_entry), .commit_rdy_o(commit_rdy),
    .partial_commit_o(partial), .xcpt_o(xcpt), .xcpt_cause_o(xcpt_cause), .xcpt_pc_o(xcpt_pc),
    .xcpt_rob_id_o(xcpt_id), .fq_count_o(fq_count), .rob_head_o(rob_head), .rob_used_o(rob_used));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ------------------------------------------------------------------ models
  typedef struct {
    logic [63:0]  pc;
    logic [31:0]  instr;
    bit           fused;
    bit           xc;
    fusion_kind_e fk;
  } dexp_t;

  typedef struct {
    logic [5:0]   id;
    logic [63:0]  pc;
    fusion_kind_e fk;
    logic [31:0]  instr;
    bit           fault;
    logic [3:0]   cause;
  } rexp_t;

  typedef struct {
    int           due;
    logic [63:0]  addr;
    logic [5:0]   id;
    fusion_kind_e fk;
  } mexp_t;

  function automatic fusion_kind_e kind_of(logic [31:0] f);
    if (f[6:0] == 7'd1) return FK_LP;
    case (f[26:25])
      2'b00:   return FK_LEA;
      2'b01:   return FK_IL;
      default: return FK_SL;
    endcase
  endfunction

  function automatic logic [63:0] sx32(logic [63:0] v, bit w);
    return w ? {{32{v[31]}}, v[31:0]} : v;
  endfunction

  // One block of code: fusible sequences and random instructions.
  function automatic void gen_block(output ains_t a[8]);
    int n, r, rd, rs2, w;
    n = 0;
    while (n < 8) begin
      r  = $urandom_range(0, 9);
      rd = 8 + $urandom_range(0, 7);
      rs2 = 8 + $urandom_range(0, 7);
      if (rs2 == rd) rs2 = 8 + ((rd - 8 + 1) % 8);
      case (r)
        0, 1: begin   // LEA
          a[n] = mk(K_SLLI, rd, rd, 0, $urandom_range(0, 31)); n++;
          if (n < 8) begin a[n] = mk($urandom_range(0, 1) ? K_ADD : K_ADDW, rd, rd, rs2, 0); n++; end
        end
        2, 3: begin   // IL
          a[n] = mk($urandom_range(0, 1) ? K_ADD : K_ADDW, rd, rd, rs2, 0); n++;
          if (n < 8) begin a[n] = mk($urandom_range(0, 1) ? K_LD : K_LW, rd, rd, 0, 0); n++; end
        end
        4, 5: begin   // SL
          a[n] = mk(K_SLLI, rd, rd, 0, $urandom_range(0, 31)); n++;
          if (n < 8) begin a[n] = mk($urandom_range(0, 1) ? K_ADD : K_ADDW, rd, rd, rs2, 0); n++; end
          if (n < 8) begin a[n] = mk($urandom_range(0, 1) ? K_LD : K_LW, rd, rd, 0, 0); n++; end
        end
        6: begin      // load pair
          w = $urandom_range(0, 1);
          r = w ? 4 * $urandom_range(0, 20) : 8 * $urandom_range(0, 20);
          a[n] = mk(w ? K_LW : K_LD, rs2, rd, 0, r); n++;
          if (n < 8) begin a[n] = mk(w ? K_LW : K_LD, 8 + $urandom_range(0, 7), rd, 0, r + (w ? 4 : 8)); n++; end
        end
        default: begin a[n] = rand_ins(); n++; end
      endcase
    end
  endfunction

  // ------------------------------------------------------------------ stimulus
  initial begin : stim
    automatic dexp_t dq[$];
    automatic rexp_t rq[$];          // dispatched, in program order
    automatic rexp_t iq_lea[$], iq_std[$], iq_mem[$];
    automatic mexp_t mq[$];          // expected memory requests
    automatic mexp_t lq[$];          // load/store unit completions
    int_iss_t    ihist [2][4];
    bit          ihv   [2][4];
    logic [63:0] iexp  [2][4];
    ains_t       blk[8];
    bit          have_blk, outstanding;
    logic [63:0] next_pc;
    int          cyc, phase_off;
    logic [5:0]  last_head;
    bit          okv[8];

    fusion_en = 1; f1_data = '0; f1_valid = '0; f1_pc = '0; f1_pf = 0; f2_af = 0;
    dec_ready = 0; disp_valid = '0; disp_entry = '0; int_iss = '0; mem_iss = '0;
    lsu_cv = 0; lsu_xv = 0; lsu_cid = 0; lsu_xid = 0; lsu_cause = 0;
    for (int l = 0; l < 4; l++) begin
      std_ctrl[l] = '0;
      std_ctrl[l].valid = 1'b1;
      std_ctrl[l].instr_op = OP_STD;
      std_ctrl[l].rd = 5'(l + 1);
    end
    foreach (ihv[a, b]) ihv[a][b] = 0;
    foreach (okv[k]) okv[k] = 1;
    have_blk = 0; outstanding = 0; next_pc = 64'h1_0000; last_head = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    for (cyc = 0; cyc < 30000; cyc++) begin
      bit take;
      @(negedge clk);
      phase_off = ((cyc / 1000) % 5 == 3);
      take = xcpt;

      // ------------------------------------------ commit and exception
      if (rob_head < last_head) n_rob_wrap++;
      last_head = rob_head;
      for (int k = 0; k < 4; k++) if (commit_valid[k]) begin
        checks++;
        if (rq.size() == 0 || commit_entry[k].pc !== rq[0].pc || commit_entry[k].fusion !== rq[0].fk) begin
          failures++; $display("FAIL cyc=%0d commit lane %0d pc %h", cyc, k, commit_entry[k].pc);
        end
        n_commit++;
        if (rq.size() > 0) begin
          if (rq[0].fault) begin
            checks++;
            if (!partial || (k < 3 && commit_valid[k+1])) begin
              failures++; $display("FAIL cyc=%0d faulting fused load committed without partial commit", cyc);
            end
            n_partial++;   // it stays at the head until the exception is taken
          end else void'(rq.pop_front());
        end
      end
      if (take) begin
        checks++;
        if (rq.size() == 0 || !rq[0].fault || xcpt_cause !== rq[0].cause ||
            xcpt_pc !== rq[0].pc + (rq[0].fk == FK_IL ? 64'd2 : 64'd4)) begin
          failures++; $display("FAIL cyc=%0d exception pc %h", cyc, xcpt_pc);
        end else if (rq[0].fk == FK_IL) n_xcpt_il++; else n_xcpt_sl++;
      end

      // ------------------------------------------ integer results
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (int_cmplt[p].valid !== ihv[1][p]) begin
          failures++; $display("FAIL cyc=%0d int port %0d valid %b", cyc, p, int_cmplt[p].valid);
        end else if (ihv[1][p]) begin
          if (int_cmplt[p].result !== iexp[1][p] || int_cmplt[p].rob_id !== ihist[1][p].rob_id) begin
            failures++; $display("FAIL cyc=%0d int port %0d result %h exp %h", cyc, p, int_cmplt[p].result, iexp[1][p]);
          end
          if (ihist[1][p].op == HL_F_LEA) n_lea_alu++;
        end
      end

      // ------------------------------------------ memory requests
      checks++;
      if (mq.size() > 0 && mq[0].due == cyc) begin
        mexp_t m;
        m = mq.pop_front();
        if (!mem_req.valid || !mem_req.fused || mem_req.addr !== m.addr || mem_req.rob_id !== m.id) begin
          failures++; $display("FAIL cyc=%0d mem request addr %h exp %h", cyc, mem_req.addr, m.addr);
        end else begin
          if (m.fk == FK_IL) n_il_addr++; else n_sl_addr++;
          m.due = cyc + $urandom_range(1, 3);
          lq.push_back(m);
        end
      end else if (mem_req.valid) begin
        failures++; $display("FAIL cyc=%0d unexpected memory request", cyc);
      end

      // ------------------------------------------ decoded stream
      for (int l = 0; l < 4; l++) if (dec_instr[l].valid) begin
        checks++;
        if (l >= dq.size()) begin
          failures++; $display("FAIL cyc=%0d unexpected decoded instruction", cyc);
        end else begin
          dexp_t d;
          d = dq[l];
          if (dec_instr[l].pc !== d.pc || dec_instr[l].is_fused !== d.fused || dec_instr[l].xcpt !== d.xc ||
              (d.fused ? dec_instr[l].instr !== d.instr : dec_instr[l].instr[15:0] !== d.instr[15:0])) begin
            failures++;
            $display("FAIL cyc=%0d lane %0d pc %h/%h fused %b/%b instr %h/%h", cyc, l, dec_instr[l].pc, d.pc,
                     dec_instr[l].is_fused, d.fused, dec_instr[l].instr, d.instr);
          end
          checks++;
          if (d.fused ? (!dec_ctrl[l].valid || dec_ctrl[l].fusion !== d.fk || dec_ctrl[l].illegal ||
                         dec_ctrl[l].rd !== d.instr[11:7])
                      : dec_ctrl[l] !== std_ctrl[l]) begin
            failures++; $display("FAIL cyc=%0d lane %0d control word", cyc, l);
          end
        end
      end

      // ------------------------------------------ inputs for this cycle
      f1_valid = '0; f1_pf = 0; dec_ready = 0; disp_valid = '0; int_iss = '0; mem_iss = '0;
      lsu_cv = 0; lsu_xv = 0;
      if (take) begin
        dq.delete(); rq.delete(); iq_lea.delete(); iq_std.delete(); iq_mem.delete(); mq.delete(); lq.delete();
        have_blk = 0; outstanding = 0;
        next_pc += 64'h100;
        foreach (ihv[a, b]) ihv[a][b] = 0;
        @(posedge clk);
        last_head = 0;
        continue;
      end

      // F1 block
      fusion_en = !phase_off;
      if (!have_blk) begin gen_block(blk); have_blk = 1; end
      for (int k = 0; k < 8; k++) f1_data[k] = enc(blk[k]);
      f1_valid = 8'hff;
      f1_pc    = next_pc;
      f1_pf    = ($urandom_range(0, 24) == 0);
      #1;
      if (!f1_ready) n_fq_stall++;
      else begin
        logic [7:0][15:0] out;
        logic [7:0] rep, inv;
        int a1, a2, a3, a4, i;
        ref_window(blk, okv, out, rep, inv, a1, a2, a3, a4);
        if (f1_pf || phase_off) begin
          if (rep != 0) begin if (f1_pf) n_pf_block++; else n_off_block++; end
          rep = '0; inv = '0;
          for (int k = 0; k < 8; k++) out[k] = enc(blk[k]);
        end
        i = 0;
        while (i < 8) begin
          dexp_t d;
          d.pc = next_pc + 64'(2 * i); d.xc = f1_pf;
          if (rep[i]) begin
            d.instr = {out[i+1], out[i]}; d.fused = 1; d.fk = kind_of(d.instr);
            case (d.fk)
              FK_LEA: n_lea++;
              FK_IL:  n_il++;
              FK_SL:  begin n_sl++; n_freed++; end
              default: n_lp++;
            endcase
            i += (d.fk == FK_SL) ? 3 : 2;
          end else begin
            d.instr = {16'h0, out[i]}; d.fused = 0; d.fk = FK_NONE;
            i++;
          end
          dq.push_back(d);
        end
        next_pc += 64'd16;
        have_blk = 0;
      end

      // decode -> dispatch
      dec_ready = (rob_used <= 7'd60) && ($urandom_range(0, 4) != 0);
      if (dec_ready) begin
        for (int l = 0; l < 4; l++) if (dec_instr[l].valid) begin
          disp_valid[l] = 1'b1;
          disp_entry[l] = '0;
          disp_entry[l].pc = dec_instr[l].pc;
          disp_entry[l].fusion = dec_instr[l].is_fused ? dec_ctrl[l].fusion : FK_NONE;
          disp_entry[l].rd = dec_ctrl[l].rd;
        end
        #1;
        checks++;
        if (disp_valid != 0 && !disp_ready) begin failures++; $display("FAIL cyc=%0d dispatch refused", cyc); end
        for (int l = 0; l < 4; l++) if (disp_valid[l]) begin
          rexp_t r;
          r.id = disp_id[l]; r.pc = disp_entry[l].pc; r.fk = disp_entry[l].fusion;
          r.instr = dec_instr[l].instr; r.fault = 0; r.cause = 0;
          rq.push_back(r);
          case (r.fk)
            FK_LEA:        iq_lea.push_back(r);
            FK_IL, FK_SL:  iq_mem.push_back(r);
            FK_LP:         begin mexp_t m; m.due = cyc + $urandom_range(2, 5); m.id = r.id; m.fk = FK_LP; m.addr = 0; lq.push_back(m); end
            default:       iq_std.push_back(r);
          endcase
          void'(dq.pop_front());
        end
      end

      // integer issue
      for (int p = 0; p < 4; p++) begin ihist[1][p] = ihist[0][p]; ihv[1][p] = ihv[0][p]; iexp[1][p] = iexp[0][p]; ihv[0][p] = 0; end
      if (iq_lea.size() > 0 && $urandom_range(0, 3) != 0) begin
        rexp_t r;
        r = iq_lea.pop_front();
        int_iss[0].valid = 1; int_iss[0].op = HL_F_LEA; int_iss[0].word = r.instr[14];
        int_iss[0].data_rs1 = {$urandom, $urandom}; int_iss[0].data_rs2 = {$urandom, $urandom};
        int_iss[0].imm = 64'(r.instr[31:27]); int_iss[0].rob_id = r.id;
        ihist[0][0] = int_iss[0]; ihv[0][0] = 1;
        iexp[0][0] = sx32((int_iss[0].data_rs1 << r.instr[31:27]) + int_iss[0].data_rs2, r.instr[14]);
      end
      for (int p = 1; p < 4; p += 2) begin
        if (p == 3 && cyc % 97 == 0) begin
          // a LEA sent to a plain ALU is refused
          int_iss[3].valid = 1; int_iss[3].op = HL_F_LEA; int_iss[3].rob_id = 0;
          #1;
          checks++;
          if (fu_err !== 4'b1000) begin failures++; $display("FAIL cyc=%0d fu_err %b", cyc, fu_err); end
          else n_fu_err++;
        end else if (iq_std.size() > 0 && $urandom_range(0, 3) != 0) begin
          rexp_t r;
          r = iq_std.pop_front();
          int_iss[p].valid = 1; int_iss[p].op = HL_ADD;
          int_iss[p].data_rs1 = {$urandom, $urandom}; int_iss[p].data_rs2 = {$urandom, $urandom};
          int_iss[p].rob_id = r.id;
          ihist[0][p] = int_iss[p]; ihv[0][p] = 1;
          iexp[0][p] = int_iss[p].data_rs1 + int_iss[p].data_rs2;
        end
      end

      // memory issue
      if (iq_mem.size() > 0) begin
        rexp_t r;
        mexp_t m;
        r = iq_mem[0];
        mem_iss.valid = 1; mem_iss.op = (r.fk == FK_SL) ? MOP_F_SL : MOP_F_IL;
        mem_iss.word = r.instr[14]; mem_iss.width = r.instr[13:12];
        mem_iss.data_rs1 = {$urandom, $urandom}; mem_iss.data_rs2 = {$urandom, $urandom};
        mem_iss.imm = 64'(r.instr[31:27]); mem_iss.rob_id = r.id;
        #1;
        if (!mem_ready) n_mem_hold++;
        else begin
          void'(iq_mem.pop_front());
          m.id = r.id; m.fk = r.fk;
          m.due = cyc + ((r.fk == FK_SL) ? 3 : 2);
          m.addr = (r.fk == FK_SL) ? sx32((mem_iss.data_rs1 << r.instr[31:27]) + mem_iss.data_rs2, r.instr[14])
                                   : sx32(mem_iss.data_rs1 + mem_iss.data_rs2, r.instr[14]);
          mq.push_back(m);
          mq.sort() with (item.due);
        end
      end

      // load/store unit completion
      lq.sort() with (item.due);
      if (lq.size() > 0 && lq[0].due <= cyc) begin
        mexp_t m;
        m = lq.pop_front();
        lsu_cv = 1; lsu_cid = m.id;
        if (m.fk != FK_LP && !outstanding && $urandom_range(0, 29) == 0) begin
          lsu_xv = 1; lsu_xid = m.id; lsu_cause = 4'($urandom_range(1, 15));
          outstanding = 1;
          foreach (rq[i]) if (rq[i].id == m.id) begin rq[i].fault = 1; rq[i].cause = lsu_cause; end
        end
      end
    end

    $display("decoded fused: lea=%0d il=%0d sl=%0d lp=%0d freed_slots=%0d; fusion blocked: page_fault=%0d disabled=%0d",
             n_lea, n_il, n_sl, n_lp, n_freed, n_pf_block, n_off_block);
    $display("fq_stalls=%0d mem_holds=%0d lea_on_fusion_alu=%0d il_addr=%0d sl_addr=%0d fu_err=%0d",
             n_fq_stall, n_mem_hold, n_lea_alu, n_il_addr, n_sl_addr, n_fu_err);
    $display("commits=%0d partial_commits=%0d xcpt_il=%0d xcpt_sl=%0d rob_wraps=%0d",
             n_commit, n_partial, n_xcpt_il, n_xcpt_sl, n_rob_wrap);
    if (n_lea == 0 || n_il == 0 || n_sl == 0 || n_lp == 0 || n_freed == 0 || n_pf_block == 0 || n_off_block == 0 ||
        n_fq_stall == 0 || n_mem_hold == 0 || n_lea_alu == 0 || n_il_addr == 0 || n_sl_addr == 0 || n_fu_err == 0 ||
        n_partial == 0 || n_xcpt_il == 0 || n_xcpt_sl == 0 || n_rob_wrap == 0 || n_commit < 1000) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
