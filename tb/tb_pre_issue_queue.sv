// tb_pre_issue_queue: a core model sends random instructions only while it
// holds ISSUE credits (it starts with DEPTH) while the consumer takes them
// at random.  Checks: every instruction comes out once, in order, with its
// scalar operand, sb_id and CSRs; one credit returns per instruction taken,
// one cycle after it is taken; with a consumer that always takes, the queue
// sustains one instruction per cycle.
`timescale 1ns/1ps
module tb_pre_issue_queue;
  import vpu_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic issue_valid, issue_credit, out_valid, out_ready;
  logic [31:0] issue_inst, out_inst;
  elem_t issue_scalar_opnd, out_scalar;
  sbid_t issue_sb_id, out_sb_id;
  logic [39:0] issue_v_csr, out_v_csr;
  pre_issue_queue #(.DEPTH(DEPTH)) dut (.*);
  int checks = 0, failures = 0;
  typedef struct packed { logic [31:0] i; elem_t s; sbid_t b; logic [39:0] c; } ent_t;
  ent_t q [$];
  int credits, taken = 0, credit_back = 0, cyc = 0, last_take = -10;
  bit greedy = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n) begin
    if (issue_credit) begin
      credits++; credit_back++;
      checks++;
      if (cyc != last_take + 1) begin failures++; $display("FAIL: credit not one cycle after the take"); end
    end
    if (out_valid && out_ready) begin
      ent_t e;
      e = q.pop_front();
      checks++;
      if ({out_inst, out_scalar, out_sb_id, out_v_csr} !== e) begin
        failures++;
        if (failures < 5) $display("FAIL: got %h expected %h", {out_inst, out_scalar, out_sb_id, out_v_csr}, e);
      end
      taken++; last_take = cyc;
    end
  end
  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    issue_valid = 0; out_ready = 0; issue_inst = '0; issue_scalar_opnd = '0; issue_sb_id = '0; issue_v_csr = '0;
    credits = DEPTH;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      for (int t = 0; t < 3000; t++) begin
        @(negedge clk);
        out_ready = greedy ? 1'b1 : ($urandom_range(0, 2) == 0);
      end
      for (int n = 0; n < 1200; n++) begin
        @(negedge clk);
        while (credits == 0 || (!greedy && $urandom_range(0, 1) == 0)) begin
          issue_valid = 0; @(negedge clk);
        end
        issue_valid = 1;
        issue_inst = $urandom; issue_scalar_opnd = {$urandom, $urandom};
        issue_sb_id = sbid_t'(n); issue_v_csr = {$urandom, $urandom};
        q.push_back({issue_inst, issue_scalar_opnd, issue_sb_id, issue_v_csr});
        credits--;
        if (n == 800) greedy = 1;
      end
    join_any
    // throughput with the greedy consumer: 100 instructions in ~100 cycles
    begin
      int t0, k0;
      @(negedge clk); issue_valid = 0;
      repeat (10) @(negedge clk);
      t0 = cyc; k0 = taken;
      for (int n = 0; n < 100; n++) begin
        while (credits == 0) begin issue_valid = 0; @(negedge clk); end
        issue_valid = 1; issue_inst = $urandom; issue_scalar_opnd = '0; issue_sb_id = sbid_t'(n); issue_v_csr = '0;
        q.push_back({issue_inst, issue_scalar_opnd, issue_sb_id, issue_v_csr});
        credits--;
        @(negedge clk);
      end
      issue_valid = 0;
      repeat (5) @(negedge clk);
      checks++;
      if (taken - k0 != 100 || cyc - t0 > 110) begin
        failures++; $display("FAIL: %0d instructions in %0d cycles", taken - k0, cyc - t0);
      end
    end
    checks++;
    if (q.size() != 0 || credits != DEPTH) begin failures++; $display("FAIL: %0d left, %0d credits", q.size(), credits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
