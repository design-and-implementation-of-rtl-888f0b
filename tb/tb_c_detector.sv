// tb_c_detector: checks the c_detector against the abstract reference model.
// Directed part: the 10 Scaled Index sequences and the 4 Load Pair sequences
// with fixed registers, then the same with broken register rules, a slot that
// is not compressed and a slot that is not valid. Random part: 3000 windows of
// random instructions drawn from a small register pool.
module tb_c_detector;
  import tb_rvc_pkg::*;

  logic [2:0][15:0] instr;
  logic [2:0]       comp, vld;
  logic [31:0]      fused;
  logic [2:0]       rep, inv;
  int checks = 0, failures = 0, n_match = 0;

  c_detector dut (.instr_i(instr), .compressed_i(comp), .valid_i(vld),
                  .fused_o(fused), .replace_mask_o(rep), .invalid_mask_o(inv));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(ains_t a[3], bit ok[3], bit cflag[3], string what);
    logic [31:0] ef;
    int n;
    logic [2:0] erep, einv;
    bit rok[3];
    for (int k = 0; k < 3; k++) begin
      instr[k] = enc(a[k]);
      comp[k]  = cflag[k];
      vld[k]   = ok[k];
      rok[k]   = ok[k] && cflag[k];
    end
    n = ref_fuse(a, rok, ef);
    erep = (n == 3) ? 3'b111 : (n == 2) ? 3'b011 : 3'b000;
    einv = (n == 3) ? 3'b100 : 3'b000;
    #1;
    checks++;
    if (n > 0) n_match++;
    if (fused !== ef || rep !== erep || inv !== einv) begin
      failures++;
      $display("FAIL %s: fused=%h exp=%h rep=%b exp=%b inv=%b exp=%b", what, fused, ef, rep, erep, inv, einv);
    end
  endtask

  initial begin
    ains_t a[3];
    bit ok[3], cf[3];
    ok = '{1, 1, 1}; cf = '{1, 1, 1};
    // LEA: slli + add / addw
    a = '{mk(K_SLLI, 9, 9, 0, 3), mk(K_ADD, 9, 9, 20, 0), mk(K_OTHER, 5, 0, 0, 1)};   run(a, ok, cf, "lea add");
    if (fused !== f_r4(3, 0, 20, 9, 0, 9, 0)) begin failures++; $display("FAIL lea encoding"); end
    a = '{mk(K_SLLI, 10, 10, 0, 31), mk(K_ADDW, 10, 10, 11, 0), mk(K_OTHER, 5, 0, 0, 1)}; run(a, ok, cf, "lea addw");
    // IL: add|addw + ld|lw
    a = '{mk(K_ADD, 12, 12, 3, 0), mk(K_LD, 12, 12, 0, 0), mk(K_OTHER, 5, 0, 0, 1)};   run(a, ok, cf, "il dd");
    a = '{mk(K_ADD, 12, 12, 3, 0), mk(K_LW, 12, 12, 0, 0), mk(K_OTHER, 5, 0, 0, 1)};   run(a, ok, cf, "il dw");
    a = '{mk(K_ADDW, 13, 13, 8, 0), mk(K_LD, 13, 13, 0, 0), mk(K_OTHER, 5, 0, 0, 1)};  run(a, ok, cf, "il wd");
    a = '{mk(K_ADDW, 13, 13, 8, 0), mk(K_LW, 13, 13, 0, 0), mk(K_OTHER, 5, 0, 0, 1)};  run(a, ok, cf, "il ww");
    if (fused !== f_r4(0, 1, 8, 13, 5, 13, 0)) begin failures++; $display("FAIL il encoding"); end
    // SL: slli + add|addw + ld|lw
    a = '{mk(K_SLLI, 8, 8, 0, 2), mk(K_ADD, 8, 8, 15, 0), mk(K_LD, 8, 8, 0, 0)};     run(a, ok, cf, "sl dd");
    if (fused !== f_r4(2, 2, 15, 8, 0, 8, 0)) begin failures++; $display("FAIL sl encoding"); end
    a = '{mk(K_SLLI, 8, 8, 0, 2), mk(K_ADDW, 8, 8, 15, 0), mk(K_LD, 8, 8, 0, 0)};    run(a, ok, cf, "sl wd");
    a = '{mk(K_SLLI, 8, 8, 0, 2), mk(K_ADD, 8, 8, 15, 0), mk(K_LW, 8, 8, 0, 0)};     run(a, ok, cf, "sl dw");
    a = '{mk(K_SLLI, 8, 8, 0, 2), mk(K_ADDW, 8, 8, 15, 0), mk(K_LW, 8, 8, 0, 0)};    run(a, ok, cf, "sl ww");
    // LP: all four width combinations
    a = '{mk(K_LD, 9, 10, 0, 16), mk(K_LD, 11, 10, 0, 24), mk(K_OTHER, 5, 0, 0, 1)}; run(a, ok, cf, "lp dd");
    if (fused !== f_r4(2, 0, 11, 10, 0, 9, 1)) begin failures++; $display("FAIL lp encoding"); end
    a = '{mk(K_LW, 9, 10, 0, 12), mk(K_LW, 11, 10, 0, 16), mk(K_OTHER, 5, 0, 0, 1)}; run(a, ok, cf, "lp ww");
    a = '{mk(K_LD, 9, 10, 0, 8), mk(K_LW, 11, 10, 0, 16), mk(K_OTHER, 5, 0, 0, 1)};  run(a, ok, cf, "lp dw");
    a = '{mk(K_LW, 9, 10, 0, 4), mk(K_LD, 11, 10, 0, 8), mk(K_OTHER, 5, 0, 0, 1)};   run(a, ok, cf, "lp wd");
    if (n_match != 14) begin failures++; $display("FAIL only %0d of 14 sequences matched", n_match); end
    // Register rules violated: nothing may fuse.
    n_match = 0;
    a = '{mk(K_SLLI, 9, 9, 0, 3), mk(K_ADD, 10, 10, 20, 0), mk(K_OTHER, 5, 0, 0, 1)};  run(a, ok, cf, "lea rd");
    a = '{mk(K_SLLI, 9, 9, 0, 40), mk(K_ADD, 9, 9, 20, 0), mk(K_OTHER, 5, 0, 0, 1)};   run(a, ok, cf, "lea imm");
    a = '{mk(K_SLLI, 9, 9, 0, 3), mk(K_ADD, 9, 9, 9, 0), mk(K_OTHER, 5, 0, 0, 1)};     run(a, ok, cf, "lea rs2=rd");
    a = '{mk(K_ADD, 12, 12, 3, 0), mk(K_LD, 12, 12, 0, 8), mk(K_OTHER, 5, 0, 0, 1)};   run(a, ok, cf, "il off");
    a = '{mk(K_ADD, 12, 12, 3, 0), mk(K_LD, 12, 11, 0, 0), mk(K_OTHER, 5, 0, 0, 1)};   run(a, ok, cf, "il base");
    a = '{mk(K_LD, 9, 10, 0, 16), mk(K_LD, 11, 10, 0, 32), mk(K_OTHER, 5, 0, 0, 1)};  run(a, ok, cf, "lp off");
    a = '{mk(K_LD, 10, 10, 0, 16), mk(K_LD, 11, 10, 0, 24), mk(K_OTHER, 5, 0, 0, 1)}; run(a, ok, cf, "lp rd=rs1");
    a = '{mk(K_LD, 9, 10, 0, 16), mk(K_LD, 11, 12, 0, 24), mk(K_OTHER, 5, 0, 0, 1)};  run(a, ok, cf, "lp base");
    // SL with a bad load: falls back to LEA.
    a = '{mk(K_SLLI, 8, 8, 0, 2), mk(K_ADD, 8, 8, 15, 0), mk(K_LD, 8, 9, 0, 0)};     run(a, ok, cf, "sl->lea");
    if (rep !== 3'b011) begin failures++; $display("FAIL sl fallback"); end
    // Not compressed / not valid.
    a = '{mk(K_ADD, 12, 12, 3, 0), mk(K_LD, 12, 12, 0, 0), mk(K_OTHER, 5, 0, 0, 1)};
    cf = '{1, 0, 1}; run(a, ok, cf, "il uncompressed");
    cf = '{1, 1, 1}; ok = '{1, 0, 1}; run(a, ok, cf, "il invalid");
    if (n_match != 1) begin failures++; $display("FAIL %0d negative cases matched", n_match); end
    // Random windows.
    n_match = 0;
    ok = '{1, 1, 1};
    for (int t = 0; t < 3000; t++) begin
      for (int k = 0; k < 3; k++) begin
        a[k]  = rand_ins();
        cf[k] = ($urandom_range(0, 15) != 0);
      end
      run(a, ok, cf, "random");
    end
    $display("random windows with a fusion: %0d", n_match);
    if (n_match < 30) begin failures++; $display("FAIL too few random n_match"); end
    // Near misses: a real SL, IL, LEA or LP window with random registers,
    // widths and immediates, then often one field disturbed.
    n_match = 0;
    cf = '{1, 1, 1};
    for (int t = 0; t < 4000; t++) begin
      int r, s, sel;
      r   = 8 + $urandom_range(0, 7);
      s   = 8 + $urandom_range(0, 7);
      if (s == r) s = (r == 15) ? 8 : r + 1;
      sel = $urandom_range(0, 3);
      case (sel)
        0: a = '{mk(K_SLLI, r, r, 0, $urandom_range(0, 31)),
                 mk($urandom_range(0, 1) ? K_ADD : K_ADDW, r, r, s, 0),
                 mk($urandom_range(0, 1) ? K_LD : K_LW, r, r, 0, 0)};
        1: a = '{mk($urandom_range(0, 1) ? K_ADD : K_ADDW, r, r, s, 0),
                 mk($urandom_range(0, 1) ? K_LD : K_LW, r, r, 0, 0),
                 rand_ins()};
        2: a = '{mk(K_SLLI, r, r, 0, $urandom_range(0, 31)),
                 mk($urandom_range(0, 1) ? K_ADD : K_ADDW, r, r, s, 0),
                 rand_ins()};
        default: begin
          a[0] = mk($urandom_range(0, 1) ? K_LD : K_LW, s, r, 0, 0);
          a[0].imm = (a[0].kind == K_LD) ? 8 * $urandom_range(0, 7) : 4 * $urandom_range(0, 14);
          a[1] = mk($urandom_range(0, 1) ? K_LD : K_LW, 8 + $urandom_range(0, 7), r, 0,
                    a[0].imm + size(a[0]));
          if (a[1].kind == K_LD && a[1].imm % 8 != 0) a[1].kind = K_LW;
          a[2] = rand_ins();
        end
      endcase
      // disturb one field of one instruction in three windows out of four
      if ($urandom_range(0, 3) != 0) begin
        int k;
        k = $urandom_range(0, 2);
        case ($urandom_range(0, 3))
          0: a[k].rd  = 8 + $urandom_range(0, 7);
          1: a[k].rs1 = 8 + $urandom_range(0, 7);
          2: a[k].rs2 = 8 + $urandom_range(0, 7);
          default: a[k].imm = is_ldk(a[k]) ? size(a[k]) * $urandom_range(0, 3) : $urandom_range(0, 31);
        endcase
        if (a[k].kind == K_SLLI || is_addk(a[k])) a[k].rs1 = a[k].rd;
      end
      run(a, ok, cf, "near miss");
    end
    $display("near-miss windows with a fusion: %0d", n_match);
    if (n_match < 500) begin failures++; $display("FAIL too few near-miss matches"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
