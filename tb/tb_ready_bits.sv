// tb_ready_bits: random clr / fill / set traffic on the ready table against a
// model of per-word written bits; every cycle all four query ports ask about
// random (register, group, word count) triples and must match the model
// (group ready = every word of the group below the word count written).
`timescale 1ns/1ps
module tb_ready_bits;
  import vpu_pkg::*;
  localparam int NSET = 6, NQ = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clr, fill;
  preg_t clr_preg, fill_preg;
  logic [NSET-1:0] set;
  preg_t set_preg [NSET];
  logic [K_W-1:0] set_k [NSET];
  preg_t q_preg [NQ];
  logic [GRP_W-1:0] q_grp [NQ];
  vl_t q_nw [NQ];
  logic [NQ-1:0] q_ready;
  ready_bits #(.NSET(NSET), .NQ(NQ)) dut (.*);
  int checks = 0, failures = 0;
  bit m [NUM_PREGS][EPL];
  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    clr = 0; fill = 0; set = '0; clr_preg = '0; fill_preg = '0;
    for (int i = 0; i < NSET; i++) begin set_preg[i] = '0; set_k[i] = '0; end
    for (int i = 0; i < NQ; i++) begin q_preg[i] = '0; q_grp[i] = '0; q_nw[i] = '0; end
    for (int p = 0; p < NUM_PREGS; p++) for (int k = 0; k < EPL; k++) m[p][k] = 1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      // queries on the current state
      for (int i = 0; i < NQ; i++) begin
        bit e;
        q_preg[i] = preg_t'($urandom_range(0, 3));      // few registers: more hits
        q_grp[i]  = GRP_W'($urandom_range(0, NUM_GROUPS - 1));
        q_nw[i]   = vl_t'($urandom_range(0, EPL));
        #1;
        e = 1;
        for (int j = 0; j < NUM_BANKS; j++) begin
          int k;
          k = int'(q_grp[i]) * NUM_BANKS + j;
          if (k < EPL && k < int'(q_nw[i]) && !m[q_preg[i]][k]) e = 0;
        end
        checks++;
        if (q_ready[i] !== e) begin
          failures++;
          if (failures < 5) $display("FAIL p%0d g%0d nw%0d: %b expected %b", q_preg[i], q_grp[i], q_nw[i], q_ready[i], e);
        end
      end
      // updates for the next edge
      clr = ($urandom_range(0, 15) == 0); clr_preg = preg_t'($urandom_range(0, 3));
      fill = ($urandom_range(0, 31) == 0); fill_preg = preg_t'($urandom_range(0, 3));
      for (int i = 0; i < NSET; i++) begin
        set[i] = $urandom_range(0, 1);
        set_preg[i] = preg_t'($urandom_range(0, 3));
        set_k[i] = K_W'($urandom_range(0, EPL - 1));
      end
      @(posedge clk);
      if (clr) for (int k = 0; k < EPL; k++) m[clr_preg][k] = 0;
      for (int i = 0; i < NSET; i++) if (set[i]) m[set_preg[i]][set_k[i]] = 1;
      if (fill) for (int k = 0; k < EPL; k++) m[fill_preg][k] = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
