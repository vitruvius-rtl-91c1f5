// tb_imu: indexed-load index streams of 256, 13 and 1 elements read from
// eight lane models that offer their words with random gaps.  Checks: one
// item per element, in element order, with the index in bits 63:0 and bit 64
// set; last_idx only on the final item; never more items outstanding than
// credits; busy drops after the last item.
`timescale 1ns/1ps
module tb_imu;
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
  logic item_valid, last_idx, mask_idx_credit;
  logic [ELEM_W:0] item;
  imu #(.NL(NL), .CREDITS(CREDITS)) dut (.*);
  int credits = CREDITS, outstanding [$], cyc = 0, nlast = 0;
  elem_t got [$];
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n) begin
    if (item_valid) begin
      check(credits > 0, "item sent without a credit");
      check(item[ELEM_W], "mask bit set");
      credits--;
      outstanding.push_back(cyc + 3 + $urandom_range(0, 8));
      got.push_back(item[ELEM_W-1:0]);
      if (last_idx) nlast++;
    end else check(!last_idx, "last_idx without an item");
    if (mask_idx_credit) credits++;
  end
  always @(negedge clk) begin
    mask_idx_credit = 0;
    if (outstanding.size() != 0 && outstanding[0] <= cyc) begin mask_idx_credit = 1; void'(outstanding.pop_front()); end
  end
  initial begin
    int vl_list [3] = '{256, 13, 1};
    start_valid = 0; start_preg = '0; start_vl = '0;
    for (int l = 0; l < NL; l++) begin lk[l] = 0; lane_nw[l] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (vl_list[t]) begin
      int vl, l0;
      vl = vl_list[t];
      for (int i = 0; i < MVL; i++) vals[i] = {$urandom, $urandom};
      got.delete(); l0 = nlast;
      @(negedge clk);
      start_valid = 1; start_preg = preg_t'(t + 3); start_vl = vl_t'(vl);
      @(negedge clk);
      start_valid = 0;
      while (busy) @(negedge clk);
      repeat (3) @(negedge clk);
      check(got.size() == vl, $sformatf("%0d items for %0d elements", got.size(), vl));
      for (int i = 0; i < vl && i < got.size(); i++) check(got[i] == vals[i], $sformatf("item %0d", i));
      check(nlast == l0 + 1, "exactly one last_idx");
      while (outstanding.size() != 0) @(negedge clk);
      repeat (2) @(negedge clk);
    end
    check(credits == CREDITS, "all credits back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
