// fetch_queue: fetch-decode inter-stage queue of 16-bit slots.
//
// Write side: up to N_WR slots per cycle with individual write enables. The
// write is unordered: the enabled slots are packed in order at the tail, so
// a disabled slot (for instance the one freed by a three-instruction fusion)
// does not stop the enabled slots after it. A block is taken whole or not at
// all: ready_o is high when the free space covers the enabled slots.
// Read side: up to N_RD instructions per cycle, in order from the head. An
// instruction is one slot when the slot is a compressed instruction that is
// not fused, otherwise two slots (a 32-bit instruction or a fused one; the
// is_fused bit of the first slot travels with it). An instruction is offered
// only when all its slots are present. Every offered instruction is removed
// when rd_ready_i is high. flush_i empties the queue.
// DEPTH, the all-or-nothing write and the read rules are this design's choices;
// the unordered write and the is_fused bit follow the fusion scheme.
module fetch_queue
  import fusion_pkg::*;
#(
  parameter int DEPTH = 16,
  parameter int N_WR  = 8,
  parameter int N_RD  = 4
) (
  input  logic                   clk_i,
  input  logic                   rst_ni,
  input  logic                   flush_i,
  input  fq_slot_t [N_WR-1:0]    slot_i,
  input  logic [N_WR-1:0]        we_i,
  output logic                   ready_o,
  output fq_instr_t [N_RD-1:0]   instr_o,
  input  logic                   rd_ready_i,
  output logic [$clog2(DEPTH+1)-1:0] count_o
);

  localparam int PW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH + 1);

  fq_slot_t [DEPTH-1:0] mem_q;
  logic [PW-1:0]        head_q, tail_q;
  logic [CW-1:0]        count_q;
  logic [CW-1:0]        n_wr, n_rd;
  logic                 do_wr;

  always_comb begin
    n_wr = '0;
    for (int i = 0; i < N_WR; i++) n_wr = n_wr + CW'(we_i[i]);
  end

  assign ready_o = (CW'(DEPTH) - count_q) >= n_wr;
  assign do_wr   = ready_o && (n_wr != '0);
  assign count_o = count_q;

  // Read side: assemble up to N_RD instructions.
  always_comb begin
    logic [CW-1:0] off;
    logic          stop;
    fq_slot_t      s0, s1;
    off  = '0;
    stop = 1'b0;
    n_rd = '0;
    for (int k = 0; k < N_RD; k++) begin
      s0 = mem_q[PW'(head_q + PW'(off))];
      s1 = mem_q[PW'(head_q + PW'(off) + PW'(1))];
      instr_o[k] = '0;
      if (!stop && off < count_q) begin
        if (s0.compressed && !s0.is_fused) begin
          instr_o[k].valid      = 1'b1;
          instr_o[k].instr      = {16'h0000, s0.data};
          instr_o[k].compressed = 1'b1;
          instr_o[k].is_fused   = 1'b0;
          instr_o[k].xcpt       = s0.xcpt;
          instr_o[k].pc         = s0.pc;
          off = off + CW'(1);
        end else if (off + CW'(1) < count_q) begin
          instr_o[k].valid      = 1'b1;
          instr_o[k].instr      = {s1.data, s0.data};
          instr_o[k].compressed = 1'b0;
          instr_o[k].is_fused   = s0.is_fused;
          instr_o[k].xcpt       = s0.xcpt | s1.xcpt;
          instr_o[k].pc         = s0.pc;
          off = off + CW'(2);
        end else begin
          stop = 1'b1;
        end
      end else begin
        stop = 1'b1;
      end
    end
    n_rd = rd_ready_i ? off : '0;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
    end else if (flush_i) begin
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
    end else begin
      head_q  <= head_q + PW'(n_rd);
      if (do_wr) tail_q <= tail_q + PW'(n_wr);
      count_q <= count_q - n_rd + (do_wr ? n_wr : '0);
    end
  end

  // Packed write of the enabled slots.
  always_ff @(posedge clk_i) begin
    if (do_wr && !flush_i) begin
      logic [PW-1:0] p;
      p = tail_q;
      for (int i = 0; i < N_WR; i++) begin
        if (we_i[i]) begin
          mem_q[p] <= slot_i[i];
          p = p + PW'(1);
        end
      end
    end
  end

  // The write never overruns the read.
  assert property (@(posedge clk_i) disable iff (!rst_ni) count_q <= CW'(DEPTH));

endmodule
