// tb_reorder_buffer: instructions are allocated in order with random old
// registers, completed in random order on the four completion ports
// (arithmetic, load, store, renaming unit with a random illegal flag) and
// marked senior in order with random delays, sometimes before allocation.
// Checks: COMPLETED reports every sb_id once, in allocation order, never
// before the instruction is both done and senior, with the right illegal
// flag; each commit releases the old register (if any) in the same cycle;
// at most one commit per cycle, and back-to-back commits when everything
// is ready.
`timescale 1ns/1ps
module tb_reorder_buffer;
  import vpu_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic alloc, alloc_has_old, alloc_ready;
  sbid_t alloc_sb_id;
  preg_t alloc_pold;
  logic cpl_a_valid, cpl_m_valid, cpl_s_valid, cpl_r_valid, cpl_r_illegal, senior_valid;
  sbid_t cpl_a_sb_id, cpl_m_sb_id, cpl_s_sb_id, cpl_r_sb_id, senior_sb_id;
  logic completed_valid, completed_illegal, rel_valid;
  sbid_t completed_sb_id;
  preg_t rel_preg;
  reorder_buffer #(.DEPTH(DEPTH)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 6) $display("FAIL: %s", what); end
  endtask
  typedef struct { int sb; bit has_old; preg_t pold; bit ill; } ent_t;
  ent_t order [$];
  bit   done [32], senior [32];
  int   ncommit = 0;
  always @(posedge clk) if (rst_n) begin
    if (completed_valid) begin
      ent_t e;
      check(order.size() != 0, "commit with nothing in flight");
      if (order.size() != 0) begin
        e = order.pop_front();
        check(int'(completed_sb_id) == e.sb, $sformatf("commit sb %0d expected %0d", completed_sb_id, e.sb));
        check(completed_illegal == e.ill, "illegal flag");
        check(rel_valid == e.has_old && (!e.has_old || rel_preg == e.pold), "release of the old register");
        check(done[e.sb] && senior[e.sb], "committed before done and senior");
        done[e.sb] = 0; senior[e.sb] = 0;
      end
      ncommit++;
    end else check(!rel_valid, "release without commit");
  end
  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int inflight [$];      // allocated, not yet completed
  int sen_q [$];         // to be marked senior (in order)
  int next_sb = 0, nalloc = 0;
  initial begin
    alloc = 0; alloc_sb_id = '0; alloc_has_old = 0; alloc_pold = '0;
    cpl_a_valid = 0; cpl_m_valid = 0; cpl_s_valid = 0; cpl_r_valid = 0; cpl_r_illegal = 0; senior_valid = 0;
    cpl_a_sb_id = '0; cpl_m_sb_id = '0; cpl_s_sb_id = '0; cpl_r_sb_id = '0; senior_sb_id = '0;
    for (int i = 0; i < 32; i++) begin done[i] = 0; senior[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      alloc = 0; cpl_a_valid = 0; cpl_m_valid = 0; cpl_s_valid = 0; cpl_r_valid = 0; senior_valid = 0;
      // allocation (sb_ids stay unique: at most DEPTH in flight, 32 ids)
      if (nalloc < 2000 && order.size() < DEPTH && $urandom_range(0, 1)) begin
        ent_t e;
        e.sb = next_sb; e.has_old = $urandom_range(0, 1); e.pold = preg_t'($urandom_range(0, 39)); e.ill = 0;
        alloc = 1; alloc_sb_id = sbid_t'(e.sb); alloc_has_old = e.has_old; alloc_pold = e.pold;
        order.push_back(e); inflight.push_back(e.sb); sen_q.push_back(e.sb);
        next_sb = (next_sb + 1) % 32; nalloc++;
      end
      // senior marks in order; sometimes the very instruction being allocated
      if (sen_q.size() != 0 && $urandom_range(0, 2) == 0) begin
        senior_valid = 1; senior_sb_id = sbid_t'(sen_q[0]); senior[sen_q[0]] = 1; void'(sen_q.pop_front());
      end
      // completions in random order, up to one per port
      for (int port = 0; port < 4; port++) if (inflight.size() != 0 && $urandom_range(0, 2) == 0) begin
        int k, s;
        k = $urandom_range(0, inflight.size() - 1);
        s = inflight[k];
        if (alloc && s == int'(alloc_sb_id)) continue;   // complete only after allocation
        inflight.delete(k);
        done[s] = 1;
        case (port)
          0: begin cpl_a_valid = 1; cpl_a_sb_id = sbid_t'(s); end
          1: begin cpl_m_valid = 1; cpl_m_sb_id = sbid_t'(s); end
          2: begin cpl_s_valid = 1; cpl_s_sb_id = sbid_t'(s); end
          default: begin
            cpl_r_valid = 1; cpl_r_sb_id = sbid_t'(s); cpl_r_illegal = $urandom_range(0, 1);
            foreach (order[j]) if (order[j].sb == s) order[j].ill = cpl_r_illegal;
          end
        endcase
      end
    end
    @(negedge clk);
    alloc = 0; cpl_a_valid = 0; cpl_m_valid = 0; cpl_s_valid = 0; cpl_r_valid = 0; senior_valid = 0;
    // drain everything: all done and senior -> one commit per cycle
    while (inflight.size() != 0) begin
      cpl_a_valid = 1; cpl_a_sb_id = sbid_t'(inflight.pop_front()); done[cpl_a_sb_id] = 1; @(negedge clk);
    end
    cpl_a_valid = 0;
    while (sen_q.size() != 0) begin
      senior_valid = 1; senior_sb_id = sbid_t'(sen_q[0]); senior[sen_q[0]] = 1; void'(sen_q.pop_front()); @(negedge clk);
    end
    senior_valid = 0;
    repeat (DEPTH + 3) @(negedge clk);
    check(order.size() == 0 && ncommit == nalloc, $sformatf("%0d of %0d committed", ncommit, nalloc));
    // rate: DEPTH ready instructions commit in DEPTH cycles
    begin
      int n0;
      int sbs [DEPTH];
      for (int i = 0; i < DEPTH; i++) begin
        ent_t e;
        e.sb = next_sb; e.has_old = 1; e.pold = preg_t'(i); e.ill = 0;
        alloc = 1; alloc_sb_id = sbid_t'(e.sb); alloc_has_old = 1; alloc_pold = e.pold;
        senior_valid = 1; senior_sb_id = sbid_t'(e.sb); senior[e.sb] = 1;
        order.push_back(e);
        next_sb = (next_sb + 1) % 32; nalloc++;
        @(negedge clk);
      end
      alloc = 0; senior_valid = 0;
      n0 = ncommit;
      foreach (sbs[i]) sbs[i] = order[i].sb;
      for (int i = 0; i < DEPTH; i++) begin
        cpl_r_valid = 1; cpl_r_illegal = 0; cpl_r_sb_id = sbid_t'(sbs[i]); done[sbs[i]] = 1;
        @(negedge clk);
      end
      cpl_r_valid = 0;
      repeat (3) @(negedge clk);
      check(ncommit - n0 == DEPTH, $sformatf("back-to-back commits: %0d of %0d", ncommit - n0, DEPTH));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
