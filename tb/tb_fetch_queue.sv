// tb_fetch_queue: random slot bundles with random write enables (holes like
// the slot freed by a fusion) and random decode back-pressure, against a
// queue model. Each cycle the four offered instructions and ready_o are
// compared with the model; a fused slot pair must come out as one 32-bit
// instruction with is_fused set.
module tb_fetch_queue;
  import fusion_pkg::*;

  logic clk = 0, rst_n = 0;
  logic flush, ready, rd_ready;
  fq_slot_t [7:0] slot;
  logic [7:0] we;
  fq_instr_t [3:0] ins;
  logic [4:0] count;
  int checks = 0, failures = 0, n_full = 0, n_hole = 0, n_fused_out = 0, n_32 = 0;
  fq_slot_t model[$];

  always #5 clk = ~clk;

  fetch_queue dut (.clk_i(clk), .rst_ni(rst_n), .flush_i(flush), .slot_i(slot), .we_i(we), .ready_o(ready),
                   .instr_o(ins), .rd_ready_i(rd_ready), .count_o(count));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // random bundle of whole instructions: compressed, 32-bit or fused pairs
  task automatic make_bundle();
    int k;
    k = 0;
    slot = '0;
    while (k < 8) begin
      int kind;
      kind = (k < 7) ? $urandom_range(0, 2) : 0;
      slot[k].data = 16'($urandom); slot[k].pc = 64'(k * 2 + 64'h1000);
      if (kind == 0) begin
        slot[k].compressed = 1; k++;
      end else begin
        slot[k+1].data = 16'($urandom); slot[k+1].pc = 64'(k * 2 + 64'h1002);
        slot[k].is_fused = (kind == 2); slot[k+1].is_fused = (kind == 2);
        k += 2;
      end
    end
    // holes only on compressed slots, so no instruction is cut in half
    for (int i = 0; i < 8; i++) we[i] = !(slot[i].compressed && $urandom_range(0, 5) == 0);
  endtask

  initial begin
    int n_wr, off;
    bit exp_ready;
    flush = 0; rd_ready = 0; we = '0; slot = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      if ($urandom_range(0, 2) != 0) make_bundle(); else we = '0;
      rd_ready = ($urandom_range(0, 3) != 0);
      #1;
      // compare the read side
      off = 0;
      for (int l = 0; l < 4; l++) begin
        bit ev;
        logic [31:0] ei;
        bit ef;
        ev = 0; ei = 0; ef = 0;
        if (off < model.size()) begin
          if (model[off].compressed && !model[off].is_fused) begin
            ev = 1; ei = {16'h0, model[off].data}; off += 1;
          end else if (off + 1 < model.size()) begin
            ev = 1; ei = {model[off+1].data, model[off].data}; ef = model[off].is_fused; off += 2;
          end else off = 99;
        end else off = 99;
        checks++;
        if (ins[l].valid !== ev || (ev && (ins[l].instr !== ei || ins[l].is_fused !== ef))) begin
          failures++; $display("FAIL t=%0d lane %0d v=%b/%b instr=%h/%h", t, l, ins[l].valid, ev, ins[l].instr, ei);
        end
        if (ev && ef) n_fused_out++;
        if (ev && !ins[l].compressed) n_32++;
        if (off == 99) break;
      end
      n_wr = $countones(we);
      exp_ready = (16 - model.size()) >= n_wr;
      checks++;
      if (ready !== exp_ready || count !== 5'(model.size())) begin
        failures++; $display("FAIL ready=%b exp %b count=%0d model=%0d", ready, exp_ready, count, model.size());
      end
      if (!exp_ready) n_full++;
      if (exp_ready && we != 0 && !(&we)) n_hole++;
      // update the model at the edge
      @(posedge clk);
      if (rd_ready) begin
        for (int l = 0; l < 4; l++)
          if (ins[l].valid) repeat ((ins[l].compressed) ? 1 : 2) void'(model.pop_front());
      end
      if (exp_ready) for (int i = 0; i < 8; i++) if (we[i]) model.push_back(slot[i]);
    end
    $display("full=%0d holes=%0d fused=%0d 32bit=%0d", n_full, n_hole, n_fused_out, n_32);
    if (n_full == 0 || n_hole == 0 || n_fused_out == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
