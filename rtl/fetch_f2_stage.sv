// fetch_f2_stage: last fetch stage with instruction-fusion support.
//
// Takes the N_ENTRIES halfword slots of one fetch block coming from F1 and
// produces the slots and write enables for the fetch-decode queue:
//  * predecode: walks the valid slots in order and marks each slot as a
//    compressed instruction, the first half or the second half of a 32-bit
//    instruction. A 32-bit instruction whose first half is the last slot of the
//    block continues in the next block; the carry is kept in a register and
//    updated when the queue accepts the block (accept_i).
//  * fusion: the fusion_detector runs on the predecoded slots in parallel with
//    the rest of the stage. A fetch exception on the block (page fault
//    reported by F1 or access fault found in F2) or fusion_en_i low
//    invalidates the detector input, so nothing is fused.
//  * slot selection: replace_mask picks the fused halves instead of the
//    original ones and becomes the is_fused bit of each slot; fused halves are
//    32-bit halves, so their compressed flag is cleared.
//  * write enables: valid slots minus invalid_mask (the slot freed by a
//    three-instruction fusion). The queue writes enabled slots unordered, so a
//    freed slot does not stop the slots after it.
// Each slot carries its own PC (pc_i + 2*slot). Combinational apart from the
// carry register. The predecoder and the fusion enable are this design's
// simplest rendering of what the F2 stage must provide.
module fetch_f2_stage
  import fusion_pkg::*;
#(
  parameter int N_ENTRIES = 8
) (
  input  logic                            clk_i,
  input  logic                            rst_ni,
  input  logic                            flush_i,
  input  logic                            fusion_en_i,
  input  logic [N_ENTRIES-1:0][15:0]      data_i,
  input  logic [N_ENTRIES-1:0]            valid_i,
  input  logic [XLEN_DEFAULT-1:0]         pc_i,
  input  logic                            xcpt_pf_i,
  input  logic                            xcpt_af_i,
  input  logic                            accept_i,
  output fq_slot_t [N_ENTRIES-1:0]        slot_o,
  output logic [N_ENTRIES-1:0]            we_o,
  output logic [N_ENTRIES-1:0]            fused_start_o
);

  logic                       upper_carry_q, upper_carry_d;
  logic [N_ENTRIES-1:0]       compressed;
  logic [N_ENTRIES-1:0][15:0] det_instr;
  logic [N_ENTRIES-1:0]       replace_mask, invalid_mask;
  logic                       xcpt;

  assign xcpt = xcpt_pf_i | xcpt_af_i;

  // Predecode.
  always_comb begin
    logic in_upper;
    in_upper = upper_carry_q;
    upper_carry_d = 1'b0;
    for (int i = 0; i < N_ENTRIES; i++) begin
      compressed[i] = 1'b0;
      if (valid_i[i]) begin
        if (in_upper) begin
          in_upper = 1'b0;
        end else if (data_i[i][1:0] != 2'b11) begin
          compressed[i] = 1'b1;
        end else begin
          in_upper = 1'b1;
        end
      end
    end
    upper_carry_d = in_upper;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)           upper_carry_q <= 1'b0;
    else if (flush_i)      upper_carry_q <= 1'b0;
    else if (accept_i && |valid_i) upper_carry_q <= upper_carry_d;
  end

  fusion_detector #(.N_ENTRIES(N_ENTRIES)) u_fusion_detector (
    .instr_i            (data_i),
    .instr_compressed_i (compressed),
    .valid_i            (valid_i & {N_ENTRIES{fusion_en_i & ~xcpt}}),
    .instr_o            (det_instr),
    .replace_mask_o     (replace_mask),
    .invalid_mask_o     (invalid_mask)
  );

  always_comb begin
    for (int i = 0; i < N_ENTRIES; i++) begin
      slot_o[i].data       = replace_mask[i] ? det_instr[i] : data_i[i];
      slot_o[i].compressed = compressed[i] & ~replace_mask[i];
      slot_o[i].is_fused   = replace_mask[i];
      slot_o[i].xcpt       = xcpt;
      slot_o[i].pc         = pc_i + XLEN_DEFAULT'(2 * i);
    end
    we_o = valid_i & ~invalid_mask;
  end

  // First halves of the fused instructions of this block.
  always_comb begin
    logic expect_hi;
    expect_hi = 1'b0;
    for (int i = 0; i < N_ENTRIES; i++) begin
      fused_start_o[i] = 1'b0;
      if (replace_mask[i] && !invalid_mask[i]) begin
        fused_start_o[i] = !expect_hi;
        expect_hi        = !expect_hi;
      end else begin
        expect_hi = 1'b0;
      end
    end
  end

endmodule
