// tb_issue_stage: random renamed instructions (loads, stores, arithmetic)
// enter while both downstream sides take them at random.  Checks: memory
// instructions leave on the memory side and all others on the arithmetic
// side, each side in program order, nothing lost; a blocked arithmetic side
// does not stop memory instructions (and the other way round); with both
// sides always ready, one instruction per cycle passes.
`timescale 1ns/1ps
module tb_issue_stage;
  import vpu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, arith_valid, arith_ready, mem_valid, mem_ready;
  ren_inst_t in, arith_inst, mem_inst;
  issue_stage dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 6) $display("FAIL: %s", what); end
  endtask
  ren_inst_t qa [$], qm [$];
  int na = 0, nm = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n) begin
    if (arith_valid && arith_ready) begin
      check(qa.size() != 0 && arith_inst == qa[0], "arithmetic order");
      check(!(arith_inst.d.cls inside {CLS_LOAD, CLS_STORE}), "memory instruction on arithmetic side");
      void'(qa.pop_front()); na++;
    end
    if (mem_valid && mem_ready) begin
      check(qm.size() != 0 && mem_inst == qm[0], "memory order");
      check(mem_inst.d.cls inside {CLS_LOAD, CLS_STORE}, "arithmetic instruction on memory side");
      void'(qm.pop_front()); nm++;
    end
  end
  function automatic ren_inst_t rnd(int kind);
    ren_inst_t r;
    r = '0;
    r.d.sb_id = sbid_t'($urandom);
    r.d.cls = (kind == 0) ? CLS_ARITH : (kind == 1) ? CLS_LOAD : CLS_STORE;
    r.d.op = vop_e'($urandom_range(0, 14));
    r.d.vl = vl_t'($urandom);
    r.pvd = preg_t'($urandom_range(0, 39));
    r.d.scalar = {$urandom, $urandom};
    return r;
  endfunction
  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic push(ren_inst_t r);
    in_valid = 1; in = r;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    if (r.d.cls inside {CLS_LOAD, CLS_STORE}) qm.push_back(r); else qa.push_back(r);
    @(negedge clk);
    in_valid = 0;
  endtask
  initial begin
    in_valid = 0; in = '0; arith_ready = 0; mem_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // arithmetic side blocked: memory instructions still flow
    @(negedge clk);
    for (int i = 0; i < 4; i++) push(rnd(0));
    mem_ready = 1;
    for (int i = 0; i < 6; i++) push(rnd(1 + i % 2));
    repeat (3) @(negedge clk);
    check(nm == 6 && na == 0, "memory side passes a blocked arithmetic side");
    arith_ready = 1; mem_ready = 0;
    for (int i = 0; i < 3; i++) push(rnd(1));
    for (int i = 0; i < 3; i++) push(rnd(0));
    repeat (3) @(negedge clk);
    check(na == 7, "arithmetic side passes a blocked memory side");
    mem_ready = 1;
    repeat (3) @(negedge clk);
    // random traffic
    fork
      for (int t = 0; t < 3000; t++) begin
        @(negedge clk);
        arith_ready = $urandom_range(0, 1); mem_ready = $urandom_range(0, 1);
      end
      for (int i = 0; i < 1000; i++) push(rnd($urandom_range(0, 2)));
    join
    arith_ready = 1; mem_ready = 1;
    repeat (20) @(negedge clk);
    check(qa.size() == 0 && qm.size() == 0, "all instructions left");
    // throughput
    begin
      int c0, n0;
      c0 = cyc; n0 = na + nm;
      for (int i = 0; i < 100; i++) push(rnd($urandom_range(0, 2)));
      repeat (4) @(negedge clk);
      check(na + nm - n0 == 100 && cyc - c0 <= 106, $sformatf("100 instructions in %0d cycles", cyc - c0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
