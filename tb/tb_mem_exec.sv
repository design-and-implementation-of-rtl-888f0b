// tb_mem_exec: random loads, stores, Indexed Loads and Scaled Loads issued
// whenever the unit is ready. Every request must reach req_o with the right
// address, width, rob id and fused flag: two edges after issue for the MEM
// unit, three for the MEM_SHIFT unit (SL_LATENCY = 1). The one-cycle hold of
// a MEM operation behind a Scaled Load must occur and be the only refusal.
module tb_mem_exec;
  import fusion_pkg::*;

  logic clk = 0, rst_n = 0;
  mem_iss_t iss;
  logic     rdy;
  mem_req_t req;
  int checks = 0, failures = 0, n_hold = 0, n_sl = 0, n_il = 0, n_ld = 0, n_st = 0;
  int cyc = 0;

  typedef struct { int due; logic [63:0] addr; logic [5:0] rob; logic fused; logic st; logic [1:0] w; } exp_t;
  exp_t expq[$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  mem_exec dut (.clk_i(clk), .rst_ni(rst_n), .flush_i(1'b0), .iss_i(iss), .iss_ready_o(rdy), .req_o(req));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [63:0] sx(logic [63:0] v, logic w);
    return w ? {{32{v[31]}}, v[31:0]} : v;
  endfunction

  initial begin
    exp_t e;
    bit prev_sl;
    iss = '0; prev_sl = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      iss = '0;
      iss.valid    = ($urandom_range(0, 4) != 0);
      iss.op       = mem_op_e'($urandom_range(0, 3));
      iss.word     = (iss.op == MOP_F_IL || iss.op == MOP_F_SL) ? 1'($urandom) : 1'b0;
      iss.width    = 2'($urandom_range(0, 1));
      iss.data_rs1 = {$urandom, $urandom};
      iss.data_rs2 = {$urandom, $urandom};
      iss.imm      = (iss.op == MOP_F_SL) ? 64'($urandom_range(0, 31)) : 64'($signed(12'($urandom)));
      iss.rob_id   = 6'($urandom);
      #1;
      checks++;
      if (rdy !== !(prev_sl && iss.op != MOP_F_SL)) begin failures++; $display("FAIL ready=%b", rdy); end
      if (!rdy && iss.valid) n_hold++;
      // check the request register
      checks++;
      if (expq.size() > 0 && expq[0].due == cyc) begin
        e = expq.pop_front();
        if (!req.valid || req.addr !== e.addr || req.rob_id !== e.rob || req.fused !== e.fused ||
            req.is_store !== e.st || req.width !== e.w) begin
          failures++; $display("FAIL t=%0d req v=%b addr=%h exp %h", t, req.valid, req.addr, e.addr);
        end
      end else if (req.valid) begin
        failures++; $display("FAIL t=%0d unexpected request", t);
      end
      if (iss.valid && rdy) begin
        e.rob = iss.rob_id; e.w = iss.width; e.st = (iss.op == MOP_STORE);
        e.fused = (iss.op == MOP_F_IL || iss.op == MOP_F_SL);
        case (iss.op)
          MOP_F_IL: begin e.addr = sx(iss.data_rs1 + iss.data_rs2, iss.word); e.due = cyc + 2; n_il++; end
          MOP_F_SL: begin e.addr = sx((iss.data_rs1 << iss.imm[4:0]) + iss.data_rs2, iss.word); e.due = cyc + 3; n_sl++; end
          MOP_STORE: begin e.addr = iss.data_rs1 + iss.imm; e.due = cyc + 2; n_st++; end
          default:  begin e.addr = iss.data_rs1 + iss.imm; e.due = cyc + 2; n_ld++; end
        endcase
        expq.push_back(e);
        expq.sort() with (item.due);
      end
      prev_sl = iss.valid && rdy && iss.op == MOP_F_SL;
    end
    $display("ld=%0d st=%0d il=%0d sl=%0d holds=%0d", n_ld, n_st, n_il, n_sl, n_hold);
    if (n_hold == 0 || n_sl == 0 || n_il == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
