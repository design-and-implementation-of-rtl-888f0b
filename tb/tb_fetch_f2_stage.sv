// tb_fetch_f2_stage: random fetch blocks mixing fusible compressed
// instructions, other compressed instructions and 32-bit instructions, with a
// contiguous valid range, random fetch exceptions and fusion disabled now and
// then. Expected slots, is_fused bits, write enables and PCs come from the
// abstract reference in tb_rvc_pkg. A directed case checks a 32-bit
// instruction that straddles two blocks.
module tb_fetch_f2_stage;
  import fusion_pkg::*;
  import tb_rvc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic flush, en, pf, af, accept;
  logic [7:0][15:0] data;
  logic [7:0] valid, we, fstart;
  logic [63:0] pc;
  fq_slot_t [7:0] slot;
  int checks = 0, failures = 0, n_fused = 0, n_inv = 0, n_xcpt_blocked = 0;

  always #5 clk = ~clk;

  fetch_f2_stage dut (.clk_i(clk), .rst_ni(rst_n), .flush_i(flush), .fusion_en_i(en), .data_i(data),
                      .valid_i(valid), .pc_i(pc), .xcpt_pf_i(pf), .xcpt_af_i(af), .accept_i(accept),
                      .slot_o(slot), .we_o(we), .fused_start_o(fstart));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ains_t a[8];
    bit ok[8], iscomp[8];
    logic [7:0][15:0] eo;
    logic [7:0] erep, einv;
    int nl, ni, ns, np, s, e, k;
    flush = 0; en = 1; pf = 0; af = 0; accept = 1; data = '0; valid = '0; pc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      s = $urandom_range(0, 2); e = $urandom_range(6, 8);
      for (int i = 0; i < s; i++) begin a[i] = mk(K_OTHER, 1, 0, 0, 0); data[i] = 16'h0001; iscomp[i] = 1; end
      k = s;
      while (k < 8) begin
        if (k + 1 < e && $urandom_range(0, 5) == 0) begin
          a[k] = mk(K_OTHER, 1, 0, 0, 0); a[k+1] = a[k];
          data[k] = 16'($urandom) | 16'h3; data[k+1] = 16'($urandom);
          iscomp[k] = 0; iscomp[k+1] = 0;
          k += 2;
        end else begin
          a[k] = rand_ins(); data[k] = enc(a[k]); iscomp[k] = 1;
          k += 1;
        end
      end
      // half of the blocks: only compressed code built from fusible sequences
      if ($urandom_range(0, 1) == 0) begin
        fill_seq(a, s);
        for (int i = s; i < 8; i++) begin data[i] = enc(a[i]); iscomp[i] = 1; end
      end
      for (int i = 0; i < 8; i++) valid[i] = (i >= s && i < e);
      en = ($urandom_range(0, 9) != 0);
      pf = ($urandom_range(0, 19) == 0);
      af = ($urandom_range(0, 19) == 0);
      pc = {$urandom, $urandom} & ~64'hf;
      for (int i = 0; i < 8; i++) ok[i] = valid[i] && iscomp[i] && en && !pf && !af;
      ref_window(a, ok, eo, erep, einv, nl, ni, ns, np);
      #1;
      for (int i = 0; i < 8; i++) begin
        logic [15:0] ed;
        ed = erep[i] ? eo[i] : data[i];
        checks++;
        if (slot[i].data !== ed || slot[i].is_fused !== erep[i] ||
            slot[i].compressed !== (valid[i] && iscomp[i] && !erep[i]) ||
            we[i] !== (valid[i] && !einv[i]) || slot[i].pc !== pc + 64'(2 * i) ||
            slot[i].xcpt !== (pf | af)) begin
          failures++;
          $display("FAIL t=%0d slot %0d data=%h/%h fused=%b/%b comp=%b we=%b/%b", t, i, slot[i].data, ed,
                   slot[i].is_fused, erep[i], slot[i].compressed, we[i], valid[i] && !einv[i]);
        end
      end
      checks++;
      if ($countones(fstart) != nl + ni + ns + np) begin failures++; $display("FAIL fused_start %b", fstart); end
      n_fused += nl + ni + ns + np;
      n_inv   += $countones(einv);
      if ((pf || af) && en) begin
        for (int i = 0; i < 8; i++) ok[i] = valid[i] && iscomp[i];
        ref_window(a, ok, eo, erep, einv, nl, ni, ns, np);
        if (erep != 0) n_xcpt_blocked++;
      end
    end
    // straddling 32-bit instruction: lower half in slot 7, upper half in slot 0
    @(negedge clk);
    en = 1; pf = 0; af = 0; valid = 8'hff;
    for (int i = 0; i < 7; i++) data[i] = 16'h0001;
    data[7] = 16'h0003;
    @(negedge clk);
    // next block: slot 0 is the upper half, slots 1..2 an IL that must fuse
    data[0] = 16'h0003;   // would look like the start of another 32-bit one
    data[1] = enc(mk(K_ADD, 12, 12, 3, 0));
    data[2] = enc(mk(K_LD, 12, 12, 0, 0));
    for (int i = 3; i < 8; i++) data[i] = 16'h0001;
    #1;
    checks++;
    if (slot[0].compressed !== 1'b0 || slot[1].is_fused !== 1'b1 || slot[2].is_fused !== 1'b1 ||
        slot[3].compressed !== 1'b1) begin
      failures++; $display("FAIL straddle: comp0=%b fused1=%b fused2=%b", slot[0].compressed, slot[1].is_fused, slot[2].is_fused);
    end
    $display("fusions=%0d freed slots=%0d blocked by exceptions=%0d", n_fused, n_inv, n_xcpt_blocked);
    if (n_fused < 100 || n_inv == 0 || n_xcpt_blocked == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
