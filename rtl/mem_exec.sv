// mem_exec: memory execution with the fused-load address units.
//
// One operation per cycle arrives from the memory issue queue with its
// operands. It is registered into Execute, where two units compute the
// effective address that is then registered and handed to the load/store unit
// on req_o:
//  * MEM unit: base + offset for ordinary loads and stores, and rs1 + rs2
//    (add or addw) for the Indexed Load through fusion_il_fu.
//  * MEM_SHIFT unit: (rs1 << imm) + rs2 for the Scaled Load through
//    fusion_sl_fu, in 0 or SL_LATENCY = 1 extra cycles.
// Latency from iss_i to req_o: 2 clock edges for the MEM unit and
// 2 + SL_LATENCY for the MEM_SHIFT unit. With SL_LATENCY = 1 a MEM-unit
// operation issued right behind a Scaled Load would reach the single request
// register in the same cycle, so iss_ready_o refuses it for that one cycle (a
// Scaled Load behind a Scaled Load is accepted). req_o.fused marks requests of
// IL and SL operations. flush_i drops everything in flight. Where the MEM and
// MEM_SHIFT units sit follows the design; the request format, the single
// request port and the one-cycle hold are this implementation's choices.
module mem_exec
  import fusion_pkg::*;
#(
  parameter int SL_LATENCY = 1
) (
  input  logic     clk_i,
  input  logic     rst_ni,
  input  logic     flush_i,
  input  mem_iss_t iss_i,
  output logic     iss_ready_o,
  output mem_req_t req_o
);

  localparam int XLEN = XLEN_DEFAULT;

  typedef struct packed {
    logic [1:0]                  width;
    logic [ROB_ID_W_DEFAULT-1:0] rob_id;
    logic [PREG_W-1:0]           prd;
  } meta_t;

  mem_iss_t        exe_q;
  mem_req_t        req_q, req_d;
  logic [XLEN-1:0] il_addr, sl_addr, base_addr;
  logic            exe_sl, sl_valid_o;
  meta_t           sl_meta;

  assign iss_ready_o = !(SL_LATENCY != 0 && exe_q.valid && exe_q.op == MOP_F_SL &&
                         iss_i.op != MOP_F_SL);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      exe_q.valid <= 1'b0;
      req_q.valid <= 1'b0;
    end else begin
      exe_q.valid <= iss_i.valid && iss_ready_o && !flush_i;
      req_q.valid <= req_d.valid && !flush_i;
      if (iss_i.valid && iss_ready_o) begin
        exe_q.op       <= iss_i.op;
        exe_q.word     <= iss_i.word;
        exe_q.width    <= iss_i.width;
        exe_q.data_rs1 <= iss_i.data_rs1;
        exe_q.data_rs2 <= iss_i.data_rs2;
        exe_q.imm      <= iss_i.imm;
        exe_q.rob_id   <= iss_i.rob_id;
        exe_q.prd      <= iss_i.prd;
      end
      if (req_d.valid) begin
        req_q.is_store   <= req_d.is_store;
        req_q.fused      <= req_d.fused;
        req_q.width      <= req_d.width;
        req_q.addr       <= req_d.addr;
        req_q.store_data <= req_d.store_data;
        req_q.rob_id     <= req_d.rob_id;
        req_q.prd        <= req_d.prd;
      end
    end
  end

  // MEM unit.
  assign base_addr = exe_q.data_rs1 + exe_q.imm;

  fusion_il_fu #(.XLEN(XLEN)) u_il (
    .data_rs1_i (exe_q.data_rs1),
    .data_rs2_i (exe_q.data_rs2),
    .word_i     (exe_q.word),
    .result_o   (il_addr)
  );

  // MEM_SHIFT unit.
  assign exe_sl = exe_q.valid && exe_q.op == MOP_F_SL;

  fusion_sl_fu #(.XLEN(XLEN), .LATENCY(SL_LATENCY)) u_sl (
    .clk_i      (clk_i),
    .rst_ni     (rst_ni),
    .valid_i    (exe_sl && !flush_i),
    .data_rs1_i (exe_q.data_rs1),
    .data_rs2_i (exe_q.data_rs2),
    .imm_i      (exe_q.imm[4:0]),
    .word_i     (exe_q.word),
    .valid_o    (sl_valid_o),
    .result_o   (sl_addr)
  );

  if (SL_LATENCY == 0) begin : g_meta_comb
    assign sl_meta = '{width: exe_q.width, rob_id: exe_q.rob_id, prd: exe_q.prd};
  end else begin : g_meta_reg
    meta_t meta_q;
    always_ff @(posedge clk_i) begin
      if (exe_sl) meta_q <= '{width: exe_q.width, rob_id: exe_q.rob_id, prd: exe_q.prd};
    end
    assign sl_meta = meta_q;
  end

  always_comb begin
    req_d = '0;
    if (sl_valid_o && !flush_i) begin
      req_d.valid  = 1'b1;
      req_d.fused  = 1'b1;
      req_d.width  = sl_meta.width;
      req_d.addr   = sl_addr;
      req_d.rob_id = sl_meta.rob_id;
      req_d.prd    = sl_meta.prd;
    end else if (exe_q.valid && exe_q.op != MOP_F_SL) begin
      req_d.valid      = 1'b1;
      req_d.is_store   = exe_q.op == MOP_STORE;
      req_d.fused      = exe_q.op == MOP_F_IL;
      req_d.width      = exe_q.width;
      req_d.addr       = (exe_q.op == MOP_F_IL) ? il_addr : base_addr;
      req_d.store_data = exe_q.data_rs2;
      req_d.rob_id     = exe_q.rob_id;
      req_d.prd        = exe_q.prd;
    end
  end

  assign req_o = req_q;

  // The MEM and MEM_SHIFT units never deliver in the same cycle.
  assert property (@(posedge clk_i) disable iff (!rst_ni)
                   !(sl_valid_o && exe_q.valid && exe_q.op != MOP_F_SL));

endmodule
