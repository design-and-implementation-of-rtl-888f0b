// tb_fusion_detector: checks the 8-slot fusion detector.
// Directed windows: SL at 0 and 3 with LEA at 6 (expected masks
// replace=1111_1111, invalid=0010_0100); four IL pairs; two SL and one IL;
// the same with the second SL's registers broken. Then 3000 random windows
// against the greedy in-order reference of tb_rvc_pkg, including slots that
// are not compressed or not valid.
module tb_fusion_detector;
  import tb_rvc_pkg::*;

  logic [7:0][15:0] instr, instr_o;
  logic [7:0]       comp, vld, rep, inv;
  int checks = 0, failures = 0;
  int tot_sl = 0, tot_il = 0, tot_lea = 0, tot_lp = 0;

  fusion_detector dut (.instr_i(instr), .instr_compressed_i(comp), .valid_i(vld),
                       .instr_o(instr_o), .replace_mask_o(rep), .invalid_mask_o(inv));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(ains_t a[8], bit cf[8], bit ok[8], string what);
    logic [7:0][15:0] eo;
    logic [7:0] erep, einv;
    bit rok[8];
    int nl, ni, ns, np;
    for (int k = 0; k < 8; k++) begin
      instr[k] = enc(a[k]); comp[k] = cf[k]; vld[k] = ok[k]; rok[k] = cf[k] && ok[k];
    end
    ref_window(a, rok, eo, erep, einv, nl, ni, ns, np);
    tot_sl += ns; tot_il += ni; tot_lea += nl; tot_lp += np;
    #1;
    checks++;
    if (instr_o !== eo || rep !== erep || inv !== einv) begin
      failures++;
      $display("FAIL %s: rep=%b/%b inv=%b/%b out=%h exp=%h", what, rep, erep, inv, einv, instr_o, eo);
    end
  endtask

  initial begin
    ains_t a[8];
    bit cf[8], ok[8];
    foreach (cf[k]) begin cf[k] = 1; ok[k] = 1; end
    // Example: SL @0, SL @3, LEA @6
    a = '{mk(K_SLLI, 8, 8, 0, 3), mk(K_ADD, 8, 8, 20, 0), mk(K_LD, 8, 8, 0, 0),
          mk(K_SLLI, 9, 9, 0, 2), mk(K_ADD, 9, 9, 21, 0), mk(K_LD, 9, 9, 0, 0),
          mk(K_SLLI, 10, 10, 0, 1), mk(K_ADD, 10, 10, 22, 0)};
    run(a, cf, ok, "sl sl lea");
    checks++;
    if (rep !== 8'b1111_1111 || inv !== 8'b0010_0100) begin failures++; $display("FAIL example masks"); end
    // Four IL
    for (int p = 0; p < 4; p++) begin
      a[2*p] = mk(K_ADD, 8 + p, 8 + p, 3, 0); a[2*p+1] = mk(K_LD, 8 + p, 8 + p, 0, 0);
    end
    run(a, cf, ok, "4 il");
    checks++;
    if (rep !== 8'hff || inv !== 8'h00) begin failures++; $display("FAIL 4 il masks"); end
    // SL, SL, IL
    a = '{mk(K_SLLI, 8, 8, 0, 3), mk(K_ADD, 8, 8, 20, 0), mk(K_LD, 8, 8, 0, 0),
          mk(K_SLLI, 9, 9, 0, 2), mk(K_ADD, 9, 9, 21, 0), mk(K_LD, 9, 9, 0, 0),
          mk(K_ADD, 10, 10, 22, 0), mk(K_LW, 10, 10, 0, 0)};
    run(a, cf, ok, "sl sl il");
    checks++;
    if (inv !== 8'b0010_0100) begin failures++; $display("FAIL sl sl il masks"); end
    // second SL broken (slli writes x11): only the add+ld behind it fuses as IL
    a[3] = mk(K_SLLI, 11, 11, 0, 2);
    run(a, cf, ok, "sl bad il");
    checks++;
    if (rep !== 8'b1111_0111 || inv !== 8'b0000_0100) begin failures++; $display("FAIL broken sl masks %b %b", rep, inv); end
    tot_sl = 0; tot_il = 0; tot_lea = 0; tot_lp = 0;
    for (int t = 0; t < 3000; t++) begin
      for (int k = 0; k < 8; k++) begin
        a[k]  = rand_ins();
        cf[k] = ($urandom_range(0, 15) != 0);
        ok[k] = ($urandom_range(0, 15) != 0);
      end
      // half of the windows: back-to-back fusible sequences
      if (t % 2 == 0) fill_seq(a, 0);
      run(a, cf, ok, "random");
    end
    $display("random: lea=%0d il=%0d sl=%0d lp=%0d", tot_lea, tot_il, tot_sl, tot_lp);
    if (tot_lea == 0 || tot_il == 0 || tot_sl == 0 || tot_lp == 0) begin
      failures++; $display("FAIL an idiom never appeared in the random windows");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
