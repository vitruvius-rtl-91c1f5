// tb_smu: stores of 256, 77 and 8 elements read from eight lane models
// that offer their words with random gaps.  Checks: lines carry elements in
// order, eight per line, the last one partial; no line is sent without a
// credit (the core model returns credits late, so the SMU must stall, and
// the stall is seen); completion comes only after all lines and sync_end.
`timescale 1ns/1ps
module tb_smu;
  import vpu_pkg::*;
  localparam int NL = 8, CREDITS = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start_valid, busy, mrd_start;
  preg_t start_preg, mrd_preg;
  vl_t start_vl, mrd_nwords;
  logic mrd_valid [NL], mrd_ready [NL];
  elem_t mrd_data [NL];
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL: %s", what); end
  endtask
  elem_t vals [MVL];
  int lk [NL];          // next word each lane model offers
  int lane_nw [NL];
  // lane models: word k of lane l is element k*8+l
  always @(posedge clk) if (rst_n) begin
    if (mrd_start) for (int l = 0; l < NL; l++) begin
      lk[l] = 0; lane_nw[l] = int'(lane_words(mrd_nwords, l));
    end else
      for (int l = 0; l < NL; l++) if (mrd_valid[l] && mrd_ready[l]) lk[l]++;
  end
  always @(negedge clk)
    for (int l = 0; l < NL; l++) begin
      mrd_valid[l] = rst_n && lk[l] < lane_nw[l] && ($urandom_range(0, 3) != 0);
      mrd_data[l]  = vals[(lk[l] * NL + l) % MVL];
    end
  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic store_valid, store_credit, sync_end, cpl_valid, ev_credit_stall;
  logic [LINE_W-1:0] store_data;
  sbid_t start_sb_id, sync_end_sb_id, cpl_sb_id;
  smu #(.NL(NL), .CREDITS(CREDITS)) dut (.*);
  int credits = CREDITS, outstanding [$], cyc = 0, nlines = 0, stalls = 0, ncpl = 0;
  elem_t got [$];
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n) begin
    if (store_valid) begin
      check(credits > 0, "line sent without a credit");
      credits--; nlines++;
      outstanding.push_back(cyc + 60 + $urandom_range(0, 30));
      for (int n = 0; n < 8; n++) got.push_back(store_data[n * 64 +: 64]);
    end
    if (store_credit) credits++;
    if (ev_credit_stall) stalls++;
    if (cpl_valid) ncpl++;
  end
  always @(negedge clk) begin
    store_credit = 0;
    if (outstanding.size() != 0 && outstanding[0] <= cyc) begin store_credit = 1; void'(outstanding.pop_front()); end
  end
  initial begin
    int vl_list [3] = '{256, 77, 8};
    start_valid = 0; start_preg = '0; start_vl = '0; start_sb_id = '0; sync_end = 0; sync_end_sb_id = '0;
    for (int l = 0; l < NL; l++) begin lk[l] = 0; lane_nw[l] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (vl_list[t]) begin
      int vl, n0;
      vl = vl_list[t];
      for (int i = 0; i < MVL; i++) vals[i] = {$urandom, $urandom};
      got.delete(); n0 = ncpl; nlines = 0;
      @(negedge clk);
      start_valid = 1; start_preg = preg_t'(t + 3); start_vl = vl_t'(vl); start_sb_id = sbid_t'(t + 9);
      @(negedge clk);
      start_valid = 0;
      while (got.size() < ((vl + 7) / 8) * 8) @(negedge clk);
      repeat (5) @(negedge clk);
      check(ncpl == n0, "no completion before sync_end");
      check(nlines == (vl + 7) / 8, $sformatf("%0d lines for %0d elements", nlines, vl));
      for (int i = 0; i < vl; i++) check(got[i] == vals[i], $sformatf("element %0d", i));
      for (int i = vl; i < got.size(); i++) check(got[i] == '0, "unused slot of the last line is zero");
      sync_end = 1; sync_end_sb_id = sbid_t'(t + 9);
      @(negedge clk);
      sync_end = 0;
      repeat (3) @(negedge clk);
      check(ncpl == n0 + 1 && cpl_sb_id == sbid_t'(t + 9) && !busy, "store completed after sync_end");
      while (outstanding.size() != 0) @(negedge clk);
      repeat (2) @(negedge clk);
    end
    check(stalls > 0, "credit stall seen");
    check(credits == CREDITS, "all credits back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
