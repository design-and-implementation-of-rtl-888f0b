// tb_fusion_loops: loop workloads through the fusion front end.
//
// Runs the fetch-to-decode path (fetch_f2_stage, fetch_queue, decode_stage at
// their default sizes: 8-halfword fetch block, 16-entry queue, 4 decode lanes)
// on six loop kernels, 10,000 iterations each, once with fusion enabled and
// once with it disabled:
//   LEA/IL/SL "ideal" : back-to-back fusible sequences and the loop control
//                       (c.addi counter, c.bnez), nothing else;
//   LEA/IL/SL "loop"  : the same idiom with a c.sd storing each result.
// The testbench plays F1 with a perfect predictor: it fetches the loop body's
// blocks in order, one per cycle while the queue accepts, and masks the slots
// behind the taken branch. Decode is always ready and a stand-in standard
// decoder marks every unfused instruction valid.
//
// The kernels are this testbench's own; their layouts keep every sequence
// inside one fetch block, and each body's expected numbers are worked out by
// hand below. Checks per run: the number of decoded instructions, the number
// of each fused kind, the number of source instructions those stand for, that
// no fusion happens when it is disabled, at most 4 instructions decode per
// cycle, and that the fused run of each kernel takes fewer cycles. The cycle
// counts and reductions are printed. Only the front end is modelled here, so
// the cycle numbers are decode throughput, not whole-core run time.
module tb_fusion_loops;
  import fusion_pkg::*;

  localparam int ITER = 10000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // ------------------------------------------------------------ encodings
  function automatic logic [15:0] c_slli(int rd, int sh);
    return {3'b000, 1'b0, 5'(rd), 5'(sh), 2'b10};
  endfunction
  function automatic logic [15:0] c_add(int rd, int rs2);
    return {4'b1001, 5'(rd), 5'(rs2), 2'b10};
  endfunction
  function automatic logic [15:0] c_ld0(int rd);   // ld rd,0(rd)
    return {3'b011, 3'b000, 3'(rd - 8), 2'b00, 3'(rd - 8), 2'b00};
  endfunction
  function automatic logic [15:0] c_sd(int rs2, int base, int off);
    return {3'b111, 3'(off >> 3), 3'(base - 8), 2'(off >> 6), 3'(rs2 - 8), 2'b00};
  endfunction
  function automatic logic [15:0] c_addi(int rd, int imm);
    return {3'b000, 1'(imm >> 5), 5'(rd), 5'(imm), 2'b01};
  endfunction
  function automatic logic [15:0] c_bnez(int rs1);  // backward branch
    return {3'b111, 3'b100, 3'(rs1 - 8), 5'b00000, 2'b01};
  endfunction

  // ------------------------------------------------------------ loop bodies
  localparam int MAXB = 2;
  typedef struct {
    string       name;
    int          nblk;
    logic [15:0] blk   [MAXB][8];
    logic [7:0]  vld   [MAXB];
    int          n_src;                 // source instructions per iteration
    int          n_dec;                 // decoded instructions with fusion
    int          n_lea, n_il, n_sl;     // fused instructions per iteration
  } body_t;

  body_t bodies[6];
  int    nb;

  task automatic put(ref logic [15:0] b[8], ref int k, input logic [15:0] h);
    b[k] = h;
    k++;
  endtask

  task automatic build();
    int k;
    body_t w;
    // LEA ideal: 7 x (c.slli r,3 ; c.add r,x5), c.addi x15,-1, c.bnez x15
    w = '{default: '0};
    w.name = "LEA ideal"; w.nblk = 2; w.vld = '{8'hff, 8'hff};
    k = 0; for (int r = 8; r < 12; r++) begin put(w.blk[0], k, c_slli(r, 3)); put(w.blk[0], k, c_add(r, 5)); end
    k = 0; for (int r = 12; r < 15; r++) begin put(w.blk[1], k, c_slli(r, 3)); put(w.blk[1], k, c_add(r, 5)); end
    put(w.blk[1], k, c_addi(15, -1)); put(w.blk[1], k, c_bnez(15));
    w.n_src = 16; w.n_dec = 9; w.n_lea = 7;
    bodies[0] = w;
    // IL ideal: 7 x (c.add r,x5 ; c.ld r,0(r)), loop control
    w = '{default: '0};
    w.name = "IL ideal"; w.nblk = 2; w.vld = '{8'hff, 8'hff};
    k = 0; for (int r = 8; r < 12; r++) begin put(w.blk[0], k, c_add(r, 5)); put(w.blk[0], k, c_ld0(r)); end
    k = 0; for (int r = 12; r < 15; r++) begin put(w.blk[1], k, c_add(r, 5)); put(w.blk[1], k, c_ld0(r)); end
    put(w.blk[1], k, c_addi(15, -1)); put(w.blk[1], k, c_bnez(15));
    w.n_src = 16; w.n_dec = 9; w.n_il = 7;
    bodies[1] = w;
    // SL ideal: 2 x (c.slli ; c.add ; c.ld) per block, loop control at the end
    w = '{default: '0};
    w.name = "SL ideal"; w.nblk = 2; w.vld = '{8'hff, 8'hff};
    k = 0;
    for (int r = 8; r < 10; r++) begin put(w.blk[0], k, c_slli(r, 3)); put(w.blk[0], k, c_add(r, 5)); put(w.blk[0], k, c_ld0(r)); end
    put(w.blk[0], k, c_addi(14, 16)); put(w.blk[0], k, c_addi(6, 1));
    k = 0;
    for (int r = 10; r < 12; r++) begin put(w.blk[1], k, c_slli(r, 3)); put(w.blk[1], k, c_add(r, 5)); put(w.blk[1], k, c_ld0(r)); end
    put(w.blk[1], k, c_addi(15, -1)); put(w.blk[1], k, c_bnez(15));
    w.n_src = 16; w.n_dec = 8; w.n_sl = 4;
    bodies[2] = w;
    // LEA loop: 2 x (LEA ; c.sd r,off(x15)), loop control
    w = '{default: '0};
    w.name = "LEA loop"; w.nblk = 1; w.vld = '{8'hff, 8'h00};
    k = 0;
    for (int r = 8; r < 10; r++) begin put(w.blk[0], k, c_slli(r, 3)); put(w.blk[0], k, c_add(r, 5)); put(w.blk[0], k, c_sd(r, 15, 8 * (r - 8))); end
    put(w.blk[0], k, c_addi(15, -1)); put(w.blk[0], k, c_bnez(15));
    w.n_src = 8; w.n_dec = 6; w.n_lea = 2;
    bodies[3] = w;
    // IL loop: 2 x (IL ; c.sd), loop control
    w = '{default: '0};
    w.name = "IL loop"; w.nblk = 1; w.vld = '{8'hff, 8'h00};
    k = 0;
    for (int r = 8; r < 10; r++) begin put(w.blk[0], k, c_add(r, 5)); put(w.blk[0], k, c_ld0(r)); put(w.blk[0], k, c_sd(r, 15, 8 * (r - 8))); end
    put(w.blk[0], k, c_addi(15, -1)); put(w.blk[0], k, c_bnez(15));
    w.n_src = 8; w.n_dec = 6; w.n_il = 2;
    bodies[4] = w;
    // SL loop: 3 x (SL ; c.sd), loop control; the fetch of the second block
    // ends at the taken branch, so its last two slots are not valid
    w = '{default: '0};
    w.name = "SL loop"; w.nblk = 2; w.vld = '{8'hff, 8'h3f};
    k = 0;
    for (int r = 8; r < 10; r++) begin put(w.blk[0], k, c_slli(r, 3)); put(w.blk[0], k, c_add(r, 5)); put(w.blk[0], k, c_ld0(r)); put(w.blk[0], k, c_sd(r, 15, 8 * (r - 8))); end
    k = 0;
    put(w.blk[1], k, c_slli(10, 3)); put(w.blk[1], k, c_add(10, 5)); put(w.blk[1], k, c_ld0(10)); put(w.blk[1], k, c_sd(10, 15, 16));
    put(w.blk[1], k, c_addi(15, -1)); put(w.blk[1], k, c_bnez(15));
    w.n_src = 14; w.n_dec = 8; w.n_sl = 3;
    bodies[5] = w;
    nb = 6;
  endtask

  // ------------------------------------------------------------ DUT chain
  logic                     flush = 1'b0;
  logic                     fusion_en;
  logic [7:0][15:0]         f1_data;
  logic [7:0]               f1_valid;
  logic [XLEN_DEFAULT-1:0]  f1_pc;
  fq_slot_t [7:0]           f2_slot;
  logic [7:0]               f2_we, f2_fused_start;
  logic                     fq_ready;
  fq_instr_t [3:0]          fq_instr;
  logic [4:0]               fq_count;
  ctrl_t [3:0]              std_ctrl, dec_ctrl;

  fetch_f2_stage #(.N_ENTRIES(8)) u_f2 (
    .clk_i(clk), .rst_ni(rst_n), .flush_i(flush), .fusion_en_i(fusion_en),
    .data_i(f1_data), .valid_i(f1_valid), .pc_i(f1_pc),
    .xcpt_pf_i(1'b0), .xcpt_af_i(1'b0), .accept_i(fq_ready),
    .slot_o(f2_slot), .we_o(f2_we), .fused_start_o(f2_fused_start)
  );

  fetch_queue #(.DEPTH(16), .N_WR(8), .N_RD(4)) u_fq (
    .clk_i(clk), .rst_ni(rst_n), .flush_i(flush),
    .slot_i(f2_slot), .we_i(f2_we), .ready_o(fq_ready),
    .instr_o(fq_instr), .rd_ready_i(1'b1), .count_o(fq_count)
  );

  decode_stage #(.N_LANES(4)) u_dec (
    .instr_i(fq_instr), .std_ctrl_i(std_ctrl), .ctrl_o(dec_ctrl)
  );

  always_comb begin
    for (int l = 0; l < 4; l++) begin
      std_ctrl[l]          = '0;
      std_ctrl[l].valid    = fq_instr[l].valid;
      std_ctrl[l].instr_op = OP_STD;
    end
  end

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ one run
  int dec_cnt, src_cnt, lea_cnt, il_cnt, sl_cnt, other_fused, over4;

  task automatic run(input int b, input logic en, output int cycles);
    int blk_i, iter, lanes;
    fusion_en = en;
    f1_valid  = '0;
    f1_data   = '0;
    f1_pc     = '0;
    rst_n     = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n  = 1'b1;
    dec_cnt = 0; src_cnt = 0; lea_cnt = 0; il_cnt = 0; sl_cnt = 0;
    other_fused = 0; over4 = 0;
    blk_i = 0; iter = 0; cycles = 0;
    while (src_cnt < ITER * bodies[b].n_src) begin
      // F1: present the current block of the loop body, clear of the edge
      #1;
      if (iter < ITER) begin
        for (int s = 0; s < 8; s++) f1_data[s] = bodies[b].blk[blk_i][s];
        f1_valid = bodies[b].vld[blk_i];
        f1_pc    = 64'h1000 + 64'(16 * blk_i);
      end else begin
        f1_valid = '0;
      end
      #1;
      // decode: count what leaves this cycle
      lanes = 0;
      for (int l = 0; l < 4; l++) begin
        if (fq_instr[l].valid) begin
          lanes++;
          dec_cnt++;
          case (dec_ctrl[l].fusion)
            FK_LEA:  begin lea_cnt++; src_cnt += 2; end
            FK_IL:   begin il_cnt++;  src_cnt += 2; end
            FK_SL:   begin sl_cnt++;  src_cnt += 3; end
            FK_NONE: src_cnt += 1;
            default: begin other_fused++; src_cnt += 2; end
          endcase
        end
      end
      if (lanes > 4) over4++;
      if (iter < ITER && fq_ready) begin
        if (blk_i == bodies[b].nblk - 1) begin
          blk_i = 0;
          iter++;
        end else begin
          blk_i++;
        end
      end
      @(posedge clk);
      cycles++;
    end
  endtask

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int cyc_on, cyc_off;
    build();
    for (int b = 0; b < nb; b++) begin
      // fusion disabled
      run(b, 1'b0, cyc_off);
      expect_eq({bodies[b].name, " off: decoded"}, dec_cnt, ITER * bodies[b].n_src);
      expect_eq({bodies[b].name, " off: fused"}, lea_cnt + il_cnt + sl_cnt + other_fused, 0);
      expect_eq({bodies[b].name, " off: >4 lanes"}, over4, 0);
      // fusion enabled
      run(b, 1'b1, cyc_on);
      expect_eq({bodies[b].name, " on: decoded"}, dec_cnt, ITER * bodies[b].n_dec);
      expect_eq({bodies[b].name, " on: source"}, src_cnt, ITER * bodies[b].n_src);
      expect_eq({bodies[b].name, " on: LEA"}, lea_cnt, ITER * bodies[b].n_lea);
      expect_eq({bodies[b].name, " on: IL"}, il_cnt, ITER * bodies[b].n_il);
      expect_eq({bodies[b].name, " on: SL"}, sl_cnt, ITER * bodies[b].n_sl);
      expect_eq({bodies[b].name, " on: other fused"}, other_fused, 0);
      checks++;
      if (!(cyc_on < cyc_off)) begin
        failures++;
        $display("FAIL %s: fused run not faster (%0d vs %0d cycles)", bodies[b].name, cyc_on, cyc_off);
      end
      $display("%-10s  instructions %0d -> %0d (-%0d%%)  front-end cycles %0d -> %0d (-%0d%%)",
               bodies[b].name, ITER * bodies[b].n_src, dec_cnt,
               100 * (ITER * bodies[b].n_src - dec_cnt) / (ITER * bodies[b].n_src),
               cyc_off, cyc_on, 100 * (cyc_off - cyc_on) / cyc_off);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
