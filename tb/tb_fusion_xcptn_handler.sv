// tb_fusion_xcptn_handler: exhaustive-style random test of the commit masks.
// The reference computes the position of the pending exception relative to
// the head with modular arithmetic (the design compares against the window
// bounds instead), then derives both masks, the partial flag and the
// completed-bit reset. Cases where the window wraps past the last entry are
// counted and must occur with a partially completed instruction.
module tb_fusion_xcptn_handler;
  localparam int N = 64;
  logic [5:0] head, xid, rid;
  logic [6:0] used;
  logic [3:0] rdy, cmask, rmask;
  logic       xv, partial, creset;
  int checks = 0, failures = 0, n_partial = 0, n_wrap = 0, n_plain = 0;

  fusion_xcptn_handler #(.ROB_ENTRIES(N), .COMMIT_W(4)) dut (
    .rob_head_i(head), .used_i(used), .rdy_vector_i(rdy), .xcpt_valid_i(xv), .xcpt_rob_id_i(xid),
    .commit_valid_mask_o(cmask), .controller_rd_ens_mask_o(rmask), .partial_o(partial),
    .cmplt_reset_o(creset), .cmplt_reset_id_o(rid));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int pos;
      bit inwin, ep;
      logic [3:0] pre, ec, er;
      head = 6'($urandom);
      if ($urandom_range(0, 3) == 0) head = 6'($urandom_range(58, 63));
      used = 7'($urandom_range(0, 64));
      if ($urandom_range(0, 1)) used = 7'($urandom_range(0, 5));
      rdy  = 4'($urandom);
      if ($urandom_range(0, 1)) rdy = 4'b1111;
      xv   = ($urandom_range(0, 4) != 0);
      xid  = ($urandom_range(0, 2) != 0) ? 6'(head + $urandom_range(0, 4)) : 6'($urandom);
      #1;
      pos   = int'(6'(xid - head));
      inwin = xv && pos < 4 && pos < used;
      for (int k = 0; k < 4; k++) pre[k] = rdy[k] && (k < used) && (k == 0 || pre[k-1]);
      ep = inwin && rdy[pos];
      ec = pre; er = pre;
      if (ep) for (int k = 0; k < 4; k++) begin
        if (k > pos) ec[k] = 1'b0;
        if (k >= pos) er[k] = 1'b0;
      end
      checks++;
      if (partial !== ep || cmask !== ec || rmask !== er || creset !== (ep && pre[pos]) || (ep && rid !== xid)) begin
        failures++;
        $display("FAIL head=%0d used=%0d rdy=%b xv=%b xid=%0d: c=%b/%b r=%b/%b p=%b/%b", head, used, rdy, xv, xid,
                 cmask, ec, rmask, er, partial, ep);
      end
      if (ep) n_partial++; else n_plain++;
      if (ep && head + pos >= N) n_wrap++;
    end
    $display("partial=%0d wrapped=%0d plain=%0d", n_partial, n_wrap, n_plain);
    if (n_partial < 100 || n_wrap < 20) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
