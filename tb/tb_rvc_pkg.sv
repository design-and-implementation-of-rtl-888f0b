// tb_rvc_pkg: testbench helpers for the fusion front-end.
//
// Encodes the compressed instructions that take part in fusion from an
// abstract description (kind, registers, immediate) and gives a reference
// model of fusion written on that abstract level, independent of the bit
// decoding done by the RTL. Used by the detector, F2, queue and top-level
// testbenches.
package tb_rvc_pkg;

  typedef enum int {K_SLLI, K_ADD, K_ADDW, K_LD, K_LW, K_OTHER} kind_e;

  typedef struct {
    kind_e kind;
    int    rd;    // destination
    int    rs1;   // base of a load (rd for slli/add/addw)
    int    rs2;   // second source of add/addw
    int    imm;   // shift amount or byte offset
  } ains_t;

  function automatic logic [15:0] enc(ains_t a);
    logic [15:0] i;
    case (a.kind)
      K_SLLI:  i = {3'b000, 1'(a.imm >> 5), 5'(a.rd), 5'(a.imm), 2'b10};
      K_ADD:   i = {4'b1001, 5'(a.rd), 5'(a.rs2), 2'b10};
      K_ADDW:  i = {6'b100111, 3'(a.rd - 8), 2'b01, 3'(a.rs2 - 8), 2'b01};
      K_LD:    i = {3'b011, 3'(a.imm >> 3), 3'(a.rs1 - 8), 2'(a.imm >> 6), 3'(a.rd - 8), 2'b00};
      K_LW:    i = {3'b010, 3'(a.imm >> 3), 3'(a.rs1 - 8), 1'(a.imm >> 2), 1'(a.imm >> 6), 3'(a.rd - 8), 2'b00};
      default: i = {3'b010, 1'(a.imm >> 5), 5'(a.rd), 5'(a.imm), 2'b01}; // c.li
    endcase
    return i;
  endfunction

  function automatic ains_t mk(kind_e k, int rd, int rs1, int rs2, int imm);
    ains_t a;
    a.kind = k; a.rd = rd; a.rs1 = rs1; a.rs2 = rs2; a.imm = imm;
    return a;
  endfunction

  // Random instruction with registers from a small pool so matches are common.
  function automatic ains_t rand_ins();
    ains_t a;
    int k;
    k = $urandom_range(0, 5);
    a.kind = kind_e'(k);
    a.rd   = 8 + $urandom_range(0, 3);
    a.rs1  = ($urandom_range(0, 3) == 0) ? 8 + $urandom_range(0, 3) : a.rd;
    a.rs2  = 8 + $urandom_range(0, 3);
    case (a.kind)
      K_SLLI:  a.imm = ($urandom_range(0, 5) == 0) ? 32 + $urandom_range(0, 31) : $urandom_range(0, 31);
      K_LD:    a.imm = ($urandom_range(0, 1) == 0) ? 0 : 8 * $urandom_range(0, 3);
      K_LW:    a.imm = ($urandom_range(0, 1) == 0) ? 0 : 4 * $urandom_range(0, 5);
      default: a.imm = $urandom_range(0, 31);
    endcase
    if (a.kind == K_OTHER) a.rd = $urandom_range(1, 31);
    return a;
  endfunction

  // Fills a[from..7] with back-to-back fusible sequences (SL, IL, LEA, LP)
  // and single random instructions, registers from x8..x11, so that
  // sequences often overlap and chain. The last sequence may be cut at slot 7.
  task automatic fill_seq(ref ains_t a[8], input int from);
    int k, r, s;
    ains_t q[$];
    k = from;
    while (k < 8) begin
      r = 8 + $urandom_range(0, 3);
      s = 8 + $urandom_range(0, 3);
      if (s == r) s = (r == 11) ? 8 : r + 1;
      q.delete();
      case ($urandom_range(0, 4))
        0: begin
          q.push_back(mk(K_SLLI, r, r, 0, $urandom_range(0, 31)));
          q.push_back(mk($urandom_range(0, 1) ? K_ADD : K_ADDW, r, r, s, 0));
          q.push_back(mk($urandom_range(0, 1) ? K_LD : K_LW, r, r, 0, 0));
        end
        1: begin
          q.push_back(mk($urandom_range(0, 1) ? K_ADD : K_ADDW, r, r, s, 0));
          q.push_back(mk($urandom_range(0, 1) ? K_LD : K_LW, r, r, 0, 0));
        end
        2: begin
          q.push_back(mk(K_SLLI, r, r, 0, $urandom_range(0, 31)));
          q.push_back(mk($urandom_range(0, 1) ? K_ADD : K_ADDW, r, r, s, 0));
        end
        3: begin
          q.push_back(mk(K_LD, s, r, 0, 8 * $urandom_range(0, 3)));
          q.push_back(mk(K_LD, 8 + $urandom_range(0, 3), r, 0, q[0].imm + 8));
        end
        default: q.push_back(rand_ins());
      endcase
      foreach (q[i]) begin
        if (k < 8) a[k] = q[i];
        k++;
      end
    end
  endtask

  function automatic logic [31:0] f_r4(int imm5, int func2, int rs2, int rs1, int func3, int rd, int opc);
    return {5'(imm5), 2'(func2), 5'(rs2), 5'(rs1), 3'(func3), 5'(rd), 7'(opc)};
  endfunction

  function automatic bit is_addk(ains_t a); return a.kind == K_ADD || a.kind == K_ADDW; endfunction
  function automatic bit is_ldk(ains_t a);  return a.kind == K_LD  || a.kind == K_LW;   endfunction
  function automatic int wcode(ains_t a);   return (a.kind == K_LW) ? 1 : 0;            endfunction
  function automatic int size(ains_t a);    return (a.kind == K_LW) ? 4 : 8;            endfunction

  // Reference fusion of a window of up to three instructions (ok[k]: slot k is
  // a valid compressed instruction). Returns the number of fused slots (0, 2, 3).
  function automatic int ref_fuse(ains_t a[3], bit ok[3], output logic [31:0] fused);
    bit lea, sl, il, lp;
    fused = '0;
    lea = ok[0] && ok[1] && a[0].kind == K_SLLI && a[0].imm < 32 && is_addk(a[1]) &&
          a[1].rd == a[0].rd && a[1].rs2 != a[1].rd;
    sl  = lea && ok[2] && is_ldk(a[2]) && a[2].rd == a[1].rd && a[2].rs1 == a[2].rd && a[2].imm == 0;
    il  = ok[0] && ok[1] && is_addk(a[0]) && is_ldk(a[1]) && a[1].rd == a[0].rd &&
          a[1].rs1 == a[1].rd && a[1].imm == 0;
    lp  = ok[0] && ok[1] && is_ldk(a[0]) && is_ldk(a[1]) && a[0].rs1 == a[1].rs1 &&
          a[0].rd != a[0].rs1 && a[1].imm == a[0].imm + size(a[0]);
    if (sl) begin
      fused = f_r4(a[0].imm, 2, a[1].rs2, a[0].rd, (a[1].kind == K_ADDW ? 4 : 0) + wcode(a[2]), a[0].rd, 0);
      return 3;
    end
    if (lea) begin
      fused = f_r4(a[0].imm, 0, a[1].rs2, a[0].rd, (a[1].kind == K_ADDW ? 4 : 0), a[0].rd, 0);
      return 2;
    end
    if (il) begin
      fused = f_r4(0, 1, a[0].rs2, a[0].rd, (a[0].kind == K_ADDW ? 4 : 0) + wcode(a[1]), a[0].rd, 0);
      return 2;
    end
    if (lp) begin
      fused = f_r4(a[0].imm / size(a[0]), wcode(a[0]), a[1].rd, a[0].rs1, wcode(a[1]), a[0].rd, 1);
      return 2;
    end
    return 0;
  endfunction

  // Reference for a whole window of n slots: scan in order, fuse greedily.
  function automatic void ref_window(ains_t a[8], bit ok[8], output logic [7:0][15:0] out,
                                     output logic [7:0] rep, output logic [7:0] inv,
                                     output int n_lea, output int n_il, output int n_sl, output int n_lp);
    int i, n;
    logic [31:0] f;
    ains_t w[3];
    bit    wo[3];
    rep = '0; inv = '0;
    n_lea = 0; n_il = 0; n_sl = 0; n_lp = 0;
    for (int k = 0; k < 8; k++) out[k] = enc(a[k]);
    i = 0;
    while (i < 7) begin
      for (int k = 0; k < 3; k++) begin
        w[k]  = (i + k < 8) ? a[i+k] : a[0];
        wo[k] = (i + k < 8) ? ok[i+k] : 1'b0;
      end
      n = ref_fuse(w, wo, f);
      if (n > 0) begin
        out[i] = f[15:0]; out[i+1] = f[31:16];
        rep[i] = 1; rep[i+1] = 1;
        if (n == 3) begin rep[i+2] = 1; inv[i+2] = 1; n_sl++; end
        else if (f[6:0] == 7'd1) n_lp++;
        else if (f[26:25] == 2'b01) n_il++;
        else n_lea++;
        i += n;
      end else i++;
    end
  endfunction

endpackage
