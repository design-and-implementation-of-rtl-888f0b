// shift_bitwise_reductor: reduces per-batch partial masks into one mask.
//
// Batch i produces a BATCH_W-bit partial mask that describes output bits
// i .. i+BATCH_W-1. Each partial mask is shifted left by i and all of them are
// ORed together; bits shifted beyond OUT_W are dropped. This is how the fusion
// detector turns the masks of its seven c_detectors (one per start slot) into
// the replace and invalid masks of the eight fetch slots. Combinational.
module shift_bitwise_reductor #(
  parameter int N_BATCH = 7,
  parameter int BATCH_W = 3,
  parameter int OUT_W   = 8
) (
  input  logic [N_BATCH-1:0][BATCH_W-1:0] batch_i,
  output logic [OUT_W-1:0]                mask_o
);

  always_comb begin
    mask_o = '0;
    for (int b = 0; b < N_BATCH; b++) begin
      for (int k = 0; k < BATCH_W; k++) begin
        if (b + k < OUT_W) mask_o[b+k] = mask_o[b+k] | batch_i[b][k];
      end
    end
  end

endmodule
