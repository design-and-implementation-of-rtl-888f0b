// tb_rob_fifo_ctrl: random write/read request vectors (including non-prefix
// ones) and occasional flushes against a queue model. Grants must be the
// in-order prefix that fits, write slots must follow the tail and read slots
// the head, and a token written through the granted slots must come back out
// of the read slots in the same order. Full, empty and pointer wrap-around
// are counted and must all occur.
module tb_rob_fifo_ctrl;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0, flush;
  logic [3:0] wr_req, wr_gnt, rd_req, rd_gnt;
  logic [3:0][5:0] wr_idx, rd_idx;
  logic [5:0] head, tail;
  logic full, empty;
  logic [6:0] free, used;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0, n_wrap = 0;

  always #5 clk = ~clk;

  rob_fifo_ctrl #(.DEPTH(DEPTH), .N_WR(4), .N_RD(4)) dut (
    .clk_i(clk), .rst_ni(rst_n), .flush_i(flush), .wr_req_i(wr_req), .wr_gnt_o(wr_gnt), .wr_idx_o(wr_idx),
    .rd_req_i(rd_req), .rd_gnt_o(rd_gnt), .rd_idx_o(rd_idx), .head_o(head), .tail_o(tail),
    .full_o(full), .empty_o(empty), .free_o(free), .used_o(used));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int tokens [DEPTH];
    int model[$];
    int m_head, m_used, next_tok;
    logic [3:0] eg_w, eg_r;
    bit run;
    m_head = 0; m_used = 0; next_tok = 1;
    flush = 0; wr_req = 0; rd_req = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 8000; t++) begin
      int bias;
      @(negedge clk);
      bias = (t / 700) % 3;   // phases: fill, drain, balanced
      wr_req = 4'($urandom);
      rd_req = 4'($urandom);
      if (bias == 0) rd_req = rd_req & 4'($urandom);
      if (bias == 1) wr_req = wr_req & 4'($urandom);
      if ($urandom_range(0, 3) == 0) wr_req = 4'b1111;
      if ($urandom_range(0, 3) == 0) rd_req = 4'b1111;
      flush = ($urandom_range(0, 999) == 0);
      #1;
      run = 1;
      for (int k = 0; k < 4; k++) begin run = run && wr_req[k] && (k < DEPTH - m_used); eg_w[k] = run; end
      run = 1;
      for (int k = 0; k < 4; k++) begin run = run && rd_req[k] && (k < m_used); eg_r[k] = run; end
      checks++;
      if (wr_gnt !== eg_w || rd_gnt !== eg_r) begin
        failures++; $display("FAIL t=%0d gnt w=%b/%b r=%b/%b", t, wr_gnt, eg_w, rd_gnt, eg_r);
      end
      checks++;
      if (used !== 7'(m_used) || free !== 7'(DEPTH - m_used) || full !== (m_used == DEPTH) ||
          empty !== (m_used == 0) || head !== 6'(m_head) || tail !== 6'(m_head + m_used)) begin
        failures++; $display("FAIL t=%0d status used=%0d exp %0d", t, used, m_used);
      end
      if (full) n_full++;
      if (empty) n_empty++;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (wr_idx[k] !== 6'(m_head + m_used + k) || rd_idx[k] !== 6'(m_head + k)) begin
          failures++; $display("FAIL t=%0d idx %0d", t, k);
        end
      end
      // reads see the oldest tokens in order
      for (int k = 0; k < 4; k++) if (rd_gnt[k]) begin
        checks++;
        if (tokens[rd_idx[k]] != model[k]) begin
          failures++; $display("FAIL t=%0d read order %0d: %0d exp %0d", t, k, tokens[rd_idx[k]], model[k]);
        end
      end
      @(posedge clk);
      if (flush) begin
        model.delete(); m_head = 0; m_used = 0;
      end else begin
        int nr, nw;
        nr = $countones(eg_r); nw = $countones(eg_w);
        for (int k = 0; k < nr; k++) void'(model.pop_front());
        for (int k = 0; k < nw; k++) begin
          tokens[6'(m_head + m_used + k)] = next_tok;
          model.push_back(next_tok);
          next_tok++;
        end
        if (m_head + nr >= DEPTH) n_wrap++;
        m_head = (m_head + nr) % DEPTH;
        m_used = m_used + nw - nr;
      end
    end
    $display("full=%0d empty=%0d wraps=%0d", n_full, n_empty, n_wrap);
    if (n_full == 0 || n_empty == 0 || n_wrap == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
