// fusion_detector: finds fusible sequences in one fetch window of N_ENTRIES
// 16-bit slots and replaces them by fused 32-bit instructions.
//
// One c_detector per start slot (N_ENTRIES-1 of them) looks at slots i, i+1,
// i+2; the last one gets an empty third slot, so it can only find two-slot
// sequences. A sequence is only accepted when its first slot is not already
// covered by an accepted sequence starting earlier; scanning from slot 0
// upward this keeps the longest match of an overlap (a Scaled Load wins over
// the Indexed Load found one slot later). The accepted per-detector masks are
// reduced by two shift_bitwise_reductor instances into replace_mask_o and
// invalid_mask_o. The output slot multiplexers then put the low half of a
// fused instruction where a sequence starts (sel_mux) and its high half in the
// following slot; all other slots keep the original halfword.
//
// replace_mask_o marks every slot taking part in a fusion (it is the is_fused
// bit of the fetch queue); invalid_mask_o marks the third slot of a
// three-instruction fusion, which becomes free. valid_i gates which slots may
// take part in a fusion. Purely combinational.
module fusion_detector
  import fusion_pkg::*;
#(
  parameter int N_ENTRIES = 8
) (
  input  logic [N_ENTRIES-1:0][15:0] instr_i,
  input  logic [N_ENTRIES-1:0]       instr_compressed_i,
  input  logic [N_ENTRIES-1:0]       valid_i,
  output logic [N_ENTRIES-1:0][15:0] instr_o,
  output logic [N_ENTRIES-1:0]       replace_mask_o,
  output logic [N_ENTRIES-1:0]       invalid_mask_o
);

  localparam int N_DET = N_ENTRIES - 1;

  logic [N_DET-1:0][31:0] det_fused;
  logic [N_DET-1:0][2:0]  det_replace, det_invalid;
  logic [N_DET-1:0][2:0]  acc_replace, acc_invalid;
  logic [N_DET-1:0]       sel_start;   // an accepted sequence starts at slot i

  for (genvar i = 0; i < N_DET; i++) begin : g_det
    logic [2:0][15:0] win;
    logic [2:0]       win_c, win_v;
    always_comb begin
      win[0] = instr_i[i];  win_c[0] = instr_compressed_i[i];  win_v[0] = valid_i[i];
      win[1] = instr_i[i+1]; win_c[1] = instr_compressed_i[i+1]; win_v[1] = valid_i[i+1];
      if (i + 2 < N_ENTRIES) begin
        win[2] = instr_i[i+2]; win_c[2] = instr_compressed_i[i+2]; win_v[2] = valid_i[i+2];
      end else begin
        win[2] = '0; win_c[2] = 1'b0; win_v[2] = 1'b0;
      end
    end
    c_detector u_c_detector (
      .instr_i        (win),
      .compressed_i   (win_c),
      .valid_i        (win_v),
      .fused_o        (det_fused[i]),
      .replace_mask_o (det_replace[i]),
      .invalid_mask_o (det_invalid[i])
    );
  end

  // Overlap resolution, in slot order.
  always_comb begin
    logic [N_ENTRIES+1:0] covered;
    covered = '0;
    for (int i = 0; i < N_DET; i++) begin
      sel_start[i]   = det_replace[i][0] && !covered[i];
      acc_replace[i] = sel_start[i] ? det_replace[i] : 3'b000;
      acc_invalid[i] = sel_start[i] ? det_invalid[i] : 3'b000;
      for (int k = 0; k < 3; k++) begin
        if (acc_replace[i][k]) covered[i+k] = 1'b1;
      end
    end
  end

  shift_bitwise_reductor #(.N_BATCH(N_DET), .BATCH_W(3), .OUT_W(N_ENTRIES)) u_red_replace (
    .batch_i (acc_replace),
    .mask_o  (replace_mask_o)
  );

  shift_bitwise_reductor #(.N_BATCH(N_DET), .BATCH_W(3), .OUT_W(N_ENTRIES)) u_red_invalid (
    .batch_i (acc_invalid),
    .mask_o  (invalid_mask_o)
  );

  // Output slot selection: slot 0 can only hold a low half, the last slot only
  // a high half; the others choose with sel_start.
  always_comb begin
    for (int i = 0; i < N_ENTRIES; i++) begin
      instr_o[i] = instr_i[i];
      if (replace_mask_o[i]) begin
        if (i < N_DET && sel_start[i]) instr_o[i] = det_fused[i][15:0];
        else if (i > 0 && sel_start[i-1]) instr_o[i] = det_fused[i-1][31:16];
      end
    end
  end

endmodule
