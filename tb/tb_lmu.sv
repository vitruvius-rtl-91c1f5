// tb_lmu: two loads in flight at once; their lines (unit-stride lines of up
// to 8 elements starting at any offset, and single-element lines) arrive
// interleaved and shuffled, while lanes randomly refuse elements.  Checks:
// every element reaches lane e % 8 as word e / 8 of the right register,
// exactly once, with the right data; at most one element per lane per cycle;
// a full stride-1 line with all lanes ready is delivered in one cycle; each
// load completes (with a fill of its register) only after sync_end and all
// its elements.
`timescale 1ns/1ps
module tb_lmu;
  import vpu_pkg::*;
  localparam int NL = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start_valid, start_ready, load_valid, sync_end, cpl_valid, fill_valid;
  sbid_t start_sb_id, sync_end_sb_id, cpl_sb_id;
  preg_t start_preg, fill_preg;
  vl_t start_vl;
  logic [LINE_W-1:0] load_data;
  seq_id_t load_seq_id;
  logic ld_valid [NL], ld_ready [NL];
  preg_t ld_preg [NL];
  logic [K_W-1:0] ld_k [NL];
  elem_t ld_data [NL];
  lmu #(.NL(NL)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL: %s", what); end
  endtask
  elem_t exp_d [2][MVL];
  int    got [2][MVL];
  preg_t pr [2] = '{preg_t'(7), preg_t'(33)};
  sbid_t sb [2] = '{sbid_t'(4), sbid_t'(19)};
  int vls [2] = '{256, 77};
  bit ended [2], completed [2];
  int fills = 0;
  always @(posedge clk) if (rst_n) begin
    for (int l = 0; l < NL; l++) if (ld_valid[l] && ld_ready[l]) begin
      int w, e;
      w = (ld_preg[l] == pr[0]) ? 0 : 1;
      e = int'(ld_k[l]) * NL + l;
      check(ld_preg[l] == pr[w], "register");
      check(ld_data[l] == exp_d[w][e], $sformatf("load %0d element %0d data", w, e));
      got[w][e]++;
    end
    if (cpl_valid) begin
      int w;
      w = (cpl_sb_id == sb[0]) ? 0 : 1;
      check(ended[w], "completion before sync_end");
      for (int e = 0; e < vls[w]; e++) check(got[w][e] == 1, $sformatf("load %0d element %0d delivered %0d times", w, e, got[w][e]));
      completed[w] = 1;
    end
    if (fill_valid) begin
      fills++;
      check(fill_preg == pr[(cpl_sb_id == sb[0]) ? 0 : 1], "fill register");
    end
  end
  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  typedef struct { int w, el, cnt, off; } line_t;
  line_t lines [$];
  task automatic send(line_t ln);
    logic [LINE_W-1:0] d;
    d = '0;
    for (int n = 0; n < ln.cnt; n++) d[(ln.off + n) * 64 +: 64] = exp_d[ln.w][ln.el + n];
    load_valid = 1; load_data = d;
    load_seq_id = '{sb_id: sb[ln.w], el_count: 7'(ln.cnt), el_off: 6'(ln.off * 8), el_id: 11'(ln.el), v_reg: '0};
    @(negedge clk);
    load_valid = 0;
    repeat ($urandom_range(1, 2)) @(negedge clk);
  endtask
  initial begin
    start_valid = 0; load_valid = 0; sync_end = 0; start_sb_id = '0; start_preg = '0; start_vl = '0;
    sync_end_sb_id = '0; load_data = '0; load_seq_id = '0;
    for (int l = 0; l < NL; l++) ld_ready[l] = 1;
    for (int w = 0; w < 2; w++) begin
      ended[w] = 0; completed[w] = 0;
      for (int e = 0; e < MVL; e++) begin exp_d[w][e] = {$urandom, $urandom}; got[w][e] = 0; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // single full line with every lane ready: all 8 elements in one cycle
    for (int w = 0; w < 2; w++) begin
      start_valid = 1; start_sb_id = sb[w]; start_preg = pr[w]; start_vl = vl_t'(vls[w]);
      #1; check(start_ready, "start accepted");
      @(negedge clk);
    end
    start_valid = 0;
    send('{0, 0, 8, 0});
    begin
      int n;
      n = 0;
      for (int e = 0; e < 8; e++) n += got[0][e];
      check(n == 8, $sformatf("one aligned line delivered in one cycle (%0d elements)", n));
    end
    // load 0: misaligned unit-stride lines from element 8; load 1: single elements
    begin
      int e;
      e = 8;
      while (e < vls[0]) begin
        int off, cnt;
        off = $urandom_range(0, 7);
        cnt = 8 - off;
        if (cnt > vls[0] - e) cnt = vls[0] - e;
        lines.push_back('{0, e, cnt, off});
        e += cnt;
      end
      for (int i = 0; i < vls[1]; i++) lines.push_back('{1, i, 1, $urandom_range(0, 7)});
    end
    lines.shuffle();
    fork
      begin
        foreach (lines[i]) send(lines[i]);
      end
      begin
        for (int t = 0; t < 600; t++) begin
          @(negedge clk);
          for (int l = 0; l < NL; l++) ld_ready[l] = ($urandom_range(0, 4) != 0);
        end
      end
    join
    for (int l = 0; l < NL; l++) ld_ready[l] = 1;
    repeat (20) @(negedge clk);
    check(!completed[0] && !completed[1], "no completion before sync_end");
    for (int w = 1; w >= 0; w--) begin
      sync_end = 1; sync_end_sb_id = sb[w]; ended[w] = 1;
      @(negedge clk);
      sync_end = 0;
      repeat (4) @(negedge clk);
      check(completed[w], $sformatf("load %0d completed", w));
    end
    check(fills == 2, "two fills");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
