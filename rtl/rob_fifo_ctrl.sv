// rob_fifo_ctrl: controller of the reorder buffer's circular buffer.
//
// Keeps the head (oldest, read side) and tail (newest, write side) pointers of
// a DEPTH-entry circular buffer and the number of used slots. Up to N_WR write
// requests and N_RD read requests arrive each cycle; both are served in order
// (request k is granted only if requests 0..k are present and fit), so the
// grants are always a prefix. Granted write k gets the slot tail + k, granted
// read k is the slot head + k; the pointers advance by the number of grants
// at the clock edge. A slot has to be read before it can be written again,
// which bounds how far the pointers drift apart. Status: full, empty, free and
// used counts. flush_i empties the buffer.
module rob_fifo_ctrl #(
  parameter int DEPTH = 64,
  parameter int N_WR  = 4,
  parameter int N_RD  = 4
) (
  input  logic                             clk_i,
  input  logic                             rst_ni,
  input  logic                             flush_i,
  input  logic [N_WR-1:0]                  wr_req_i,
  output logic [N_WR-1:0]                  wr_gnt_o,
  output logic [N_WR-1:0][$clog2(DEPTH)-1:0] wr_idx_o,
  input  logic [N_RD-1:0]                  rd_req_i,
  output logic [N_RD-1:0]                  rd_gnt_o,
  output logic [N_RD-1:0][$clog2(DEPTH)-1:0] rd_idx_o,
  output logic [$clog2(DEPTH)-1:0]         head_o,
  output logic [$clog2(DEPTH)-1:0]         tail_o,
  output logic                             full_o,
  output logic                             empty_o,
  output logic [$clog2(DEPTH+1)-1:0]       free_o,
  output logic [$clog2(DEPTH+1)-1:0]       used_o
);

  localparam int PW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH + 1);

  logic [PW-1:0] head_q, tail_q;
  logic [CW-1:0] used_q, n_wr, n_rd;

  always_comb begin
    logic run;
    n_wr = '0;
    run  = 1'b1;
    for (int k = 0; k < N_WR; k++) begin
      run         = run && wr_req_i[k] && (CW'(k) < CW'(DEPTH) - used_q);
      wr_gnt_o[k] = run;
      wr_idx_o[k] = tail_q + PW'(k);
      n_wr        = n_wr + CW'(run);
    end
    n_rd = '0;
    run  = 1'b1;
    for (int k = 0; k < N_RD; k++) begin
      run         = run && rd_req_i[k] && (CW'(k) < used_q);
      rd_gnt_o[k] = run;
      rd_idx_o[k] = head_q + PW'(k);
      n_rd        = n_rd + CW'(run);
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      head_q <= '0;
      tail_q <= '0;
      used_q <= '0;
    end else if (flush_i) begin
      head_q <= '0;
      tail_q <= '0;
      used_q <= '0;
    end else begin
      head_q <= head_q + PW'(n_rd);
      tail_q <= tail_q + PW'(n_wr);
      used_q <= used_q + n_wr - n_rd;
    end
  end

  assign head_o  = head_q;
  assign tail_o  = tail_q;
  assign used_o  = used_q;
  assign free_o  = CW'(DEPTH) - used_q;
  assign full_o  = used_q == CW'(DEPTH);
  assign empty_o = used_q == '0;

  assert property (@(posedge clk_i) disable iff (!rst_ni) used_q <= CW'(DEPTH));

endmodule
