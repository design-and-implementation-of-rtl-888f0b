// tb_int_fu_generator: default allocation (ALU on ports 0, 1, 3; Fusion ALU on
// port 0 only; nothing on port 2). Random ADD/SUB/XOR/AND/OR/LEA operations
// on every port every cycle: each executable one must complete exactly two
// edges later with the right result, rob id and destination; LEA on a plain
// ALU port and anything on port 2 must raise fu_err_o and produce nothing. A
// flush must drop what is in flight.
module tb_int_fu_generator;
  import fusion_pkg::*;

  logic clk = 0, rst_n = 0, flush;
  int_iss_t   [3:0] iss;
  int_cmplt_t [3:0] cm;
  logic       [3:0] err;
  int checks = 0, failures = 0, n_lea = 0, n_err = 0, n_res = 0;

  always #5 clk = ~clk;

  int_fu_generator dut (.clk_i(clk), .rst_ni(rst_n), .flush_i(flush), .iss_i(iss), .cmplt_o(cm), .fu_err_o(err));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [63:0] ref_op(int_iss_t i);
    logic [63:0] r;
    case (i.op)
      HL_ADD:   r = i.word ? {{32{r[31]}}, 32'(i.data_rs1[31:0] + i.data_rs2[31:0])} : i.data_rs1 + i.data_rs2;
      HL_SUB:   r = i.data_rs1 - i.data_rs2;
      HL_XOR:   r = i.data_rs1 ^ i.data_rs2;
      HL_AND:   r = i.data_rs1 & i.data_rs2;
      HL_OR:    r = i.data_rs1 | i.data_rs2;
      default:  r = (i.data_rs1 << i.imm[4:0]) + i.data_rs2;
    endcase
    if (i.op == HL_ADD && i.word) begin
      r = 64'(i.data_rs1[31:0] + i.data_rs2[31:0]);
      r = {{32{r[31]}}, r[31:0]};
    end
    return r;
  endfunction

  initial begin
    int_iss_t hist [2][4];
    bit       hv   [2][4];
    alu_op_e  ops[6];
    ops = '{HL_ADD, HL_SUB, HL_XOR, HL_AND, HL_OR, HL_F_LEA};
    flush = 0; iss = '0;
    foreach (hv[a, b]) hv[a][b] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      flush = (t % 500 == 250);
      for (int p = 0; p < 4; p++) begin
        iss[p] = '0;
        iss[p].valid    = ($urandom_range(0, 3) != 0);
        iss[p].op       = ops[$urandom_range(0, 5)];
        iss[p].word     = (iss[p].op == HL_ADD || iss[p].op == HL_F_LEA) ? 1'($urandom) : 1'b0;
        if (iss[p].op == HL_F_LEA) iss[p].word = 1'b0;
        iss[p].data_rs1 = {$urandom, $urandom};
        iss[p].data_rs2 = {$urandom, $urandom};
        iss[p].imm      = 64'($urandom_range(0, 31));
        iss[p].rob_id   = 6'($urandom);
        iss[p].prd      = 7'($urandom);
      end
      #1;
      // outputs now reflect operations issued two cycles ago
      for (int p = 0; p < 4; p++) begin
        bit can;
        can = (p != 2) && (iss[p].op != HL_F_LEA || p == 0);
        checks++;
        if (err[p] !== (iss[p].valid && !can)) begin failures++; $display("FAIL err port %0d", p); end
        if (iss[p].valid && !can) n_err++;
        checks++;
        if (cm[p].valid !== hv[1][p]) begin
          failures++; $display("FAIL t=%0d port %0d valid=%b exp %b", t, p, cm[p].valid, hv[1][p]);
        end else if (hv[1][p]) begin
          n_res++;
          if (hist[1][p].op == HL_F_LEA) n_lea++;
          if (cm[p].result !== ref_op(hist[1][p]) || cm[p].rob_id !== hist[1][p].rob_id || cm[p].prd !== hist[1][p].prd) begin
            failures++; $display("FAIL port %0d %s result %h exp %h", p, hist[1][p].op.name(), cm[p].result, ref_op(hist[1][p]));
          end
        end
      end
      @(posedge clk);
      for (int p = 0; p < 4; p++) begin
        hist[1][p] = hist[0][p]; hv[1][p] = hv[0][p] && !flush;
        hist[0][p] = iss[p];
        hv[0][p]   = iss[p].valid && (p != 2) && (iss[p].op != HL_F_LEA || p == 0) && !flush;
      end
    end
    $display("results=%0d lea=%0d refused=%0d", n_res, n_lea, n_err);
    if (n_lea < 50 || n_err < 50) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
