// tb_vitruvius_top: end-to-end test of the vector unit at its default size.
//
// The testbench plays the scalar core and the memory system on the OVI
// ports.  It issues a short vector program under ISSUE credits, marks each
// instruction senior a few cycles later (DISPATCH), serves the memory
// instructions after their sync_start (unit-stride load lines arrive in a
// shuffled order and may start mid-line, strided loads come one element per
// line, indexed loads are served from the MASK_IDX items, store lines are
// written to memory and their credits returned with a random delay) and
// ends each one with sync_end.  A behavioural model of the architectural
// vector registers runs alongside.  At the end every result register is
// stored to memory and compared with the model; COMPLETED must report every
// instruction once, in issue order, with the illegal flag only on the
// deliberately illegal one.  The `events` port is counted and every mechanism
// (out-of-order group read, overlap, chaining wait, fast move, clockwise and
// counter-clockwise ring use, ring direction switch, reduction tree, slide
// traffic, store credit stall, load delivery) must have happened at least
// once.  A dependent pair of 256-element operations must finish within a
// bound that assumes overlapping execution.  Top parameters are the defaults.
`timescale 1ns/1ps
module tb_vitruvius_top;
  import vpu_pkg::*;

  localparam int MEMW = 16384;               // 64-bit words of memory

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         issue_valid, issue_credit;
  logic [31:0]  issue_inst;
  logic [63:0]  issue_scalar_opnd;
  logic [4:0]   issue_sb_id;
  logic [39:0]  issue_v_csr;
  logic         dispatch_next_senior, dispatch_kill;
  logic [4:0]   dispatch_sb_id;
  logic         completed_valid, completed_vxsat, completed_illegal;
  logic [4:0]   completed_sb_id, completed_fflags;
  logic [63:0]  completed_dest_reg;
  logic [13:0]  completed_vstart;
  logic         memop_sync_start, memop_sync_end;
  logic [4:0]   memop_sb_id;
  logic [14:0]  memop_vstart_vlfof;
  logic         load_valid, load_mask_valid;
  logic [511:0] load_data;
  logic [33:0]  load_seq_id;
  logic [63:0]  load_mask;
  logic         store_valid, store_credit;
  logic [511:0] store_data;
  logic         mask_idx_valid, mask_idx_last_idx, mask_idx_credit;
  logic [64:0]  mask_idx_item;
  logic [9:0]   events;

  vitruvius_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---- memory and architectural model ------------------------------------
  logic [63:0] mem [MEMW];
  logic [63:0] vreg [32][MVL];
  int          vlen [32];

  // ---- instruction encodings ---------------------------------------------------
  function automatic logic [31:0] op_v(logic [5:0] f6, logic [2:0] f3, int vd, int vs2, int vs1, bit vm = 1);
    return {f6, vm, 5'(vs2), 5'(vs1), f3, 5'(vd), 7'b1010111};
  endfunction
  function automatic logic [31:0] op_ld(logic [1:0] mop, int vd, int vs2);
    return {3'b000, 1'b0, mop, 1'b1, 5'(vs2), 5'd1, 3'b111, 5'(vd), 7'b0000111};
  endfunction
  function automatic logic [31:0] op_st(int vs3);
    return {3'b000, 3'b000, 1'b1, 5'd0, 5'd1, 3'b111, 5'(vs3), 7'b0100111};
  endfunction
  function automatic logic [39:0] csr(int vl, int sew);
    logic [39:0] c;
    c = '0;
    c[CSR_SEW_LSB +: 3] = 3'(sew);
    c[CSR_VL_LSB +: CSR_VL_W] = 15'(vl);
    return c;
  endfunction

  // ---- core side state ------------------------------------------------------------
  typedef struct {
    int kind;          // 0 unit load, 1 strided load, 2 indexed load, 3 store
    int sb, vl, base, stride, vd, vs2;
  } memop_t;
  memop_t mq [$];            // issued, waiting for sync_start
  memop_t started [$];       // started, served in order
  int     exp_sb [$];        // expected COMPLETED order
  bit     exp_ill [$];
  int     senior_q [$];
  int     senior_t [$];
  int     credits;
  int     next_sb = 0;
  int     n_issued = 0;
  int     cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // issue one instruction (model updated by the caller)
  task automatic issue(logic [31:0] inst, logic [63:0] scalar, int vl, int sew, bit ill = 0,
                       int mkind = -1, int base = 0, int stride = 1, int vd = 0, int vs2 = 0);
    while (credits == 0) @(negedge clk);
    issue_valid = 1'b1; issue_inst = inst; issue_scalar_opnd = scalar;
    issue_sb_id = 5'(next_sb); issue_v_csr = csr(vl, sew);
    exp_sb.push_back(next_sb); exp_ill.push_back(ill);
    senior_q.push_back(next_sb); senior_t.push_back(cyc + 1 + int'($urandom_range(0, 6)));
    if (mkind >= 0) mq.push_back('{mkind, next_sb, vl, base, stride, vd, vs2});
    credits--;
    n_issued++;
    @(negedge clk);
    issue_valid = 1'b0;
    next_sb = (next_sb + 1) % 32;
  endtask

  always @(posedge clk) if (rst_n && issue_credit) credits++;

  // DISPATCH: next_senior some cycles after issue
  initial begin
    dispatch_next_senior = 1'b0; dispatch_kill = 1'b0; dispatch_sb_id = '0;
    forever begin
      @(negedge clk);
      dispatch_next_senior = 1'b0;
      if (senior_q.size() != 0 && senior_t[0] <= cyc) begin
        dispatch_next_senior = 1'b1;
        dispatch_sb_id = 5'(senior_q.pop_front());
        void'(senior_t.pop_front());
      end
    end
  end

  // COMPLETED: in order
  int ncompleted = 0;
  always @(posedge clk) if (rst_n && completed_valid) begin
    ncompleted++;
    if (exp_sb.size() == 0) check(0, "unexpected completion");
    else begin
      int s; bit il;
      s = exp_sb.pop_front(); il = exp_ill.pop_front();
      check(int'(completed_sb_id) == s && completed_illegal == il,
            $sformatf("completed sb_id %0d illegal %0b, expected %0d %0b", completed_sb_id, completed_illegal, s, il));
    end
  end

  always @(posedge clk) if (rst_n && memop_sync_start) begin
    if (mq.size() == 0) check(0, "sync_start without a memory instruction");
    else started.push_back(mq.pop_front());
  end

  // store lines and index items arrive on their own buses
  logic [511:0] st_lines [$];
  logic [63:0]  idx_items [$];
  int           st_ret [$], ix_ret [$];
  int           nstall_cred = 0;
  always @(posedge clk) if (rst_n) begin
    if (store_valid) begin
      st_lines.push_back(store_data);
      st_ret.push_back(cyc + 10 + int'($urandom_range(0, 30)));
    end
    if (mask_idx_valid) begin
      idx_items.push_back(mask_idx_item[63:0]);
      ix_ret.push_back(cyc + 1 + int'($urandom_range(0, 3)));
    end
  end
  initial begin
    store_credit = 1'b0; mask_idx_credit = 1'b0;
    forever begin
      @(negedge clk);
      store_credit = 1'b0; mask_idx_credit = 1'b0;
      if (st_ret.size() != 0 && st_ret[0] <= cyc) begin store_credit = 1'b1; void'(st_ret.pop_front()); end
      if (ix_ret.size() != 0 && ix_ret[0] <= cyc) begin mask_idx_credit = 1'b1; void'(ix_ret.pop_front()); end
    end
  end

  // one load line
  task automatic send_line(int sb, int el_id, int cnt, int off_w, logic [63:0] w [8]);
    seq_id_t sid;
    logic [511:0] d;
    d = '0;
    for (int n = 0; n < cnt; n++) d[(off_w + n) * 64 +: 64] = w[n];
    sid = '{sb_id: 5'(sb), el_count: 7'(cnt), el_off: 6'(off_w * 8), el_id: 11'(el_id), v_reg: 5'd0};
    load_valid = 1'b1; load_data = d; load_seq_id = sid;
    @(negedge clk);
    load_valid = 1'b0;
    repeat ($urandom_range(0, 1)) @(negedge clk);
  endtask

  // memory side of the core: serve started memory instructions in order
  initial begin
    load_valid = 1'b0; load_data = '0; load_seq_id = '0; load_mask = '0; load_mask_valid = 1'b0;
    memop_sync_end = 1'b0; memop_sb_id = '0; memop_vstart_vlfof = '0;
    forever begin
      memop_t m;
      @(negedge clk);
      if (started.size() == 0) continue;
      m = started.pop_front();
      if (m.kind == 0) begin
        // unit stride: lines of 8 aligned words, sent in random order
        int firsts [$];
        int e;
        e = 0;
        firsts.delete();
        while (e < m.vl) begin
          int a, cnt;
          a = m.base + e;
          cnt = 8 - (a % 8);
          if (cnt > m.vl - e) cnt = m.vl - e;
          firsts.push_back(e);
          e += cnt;
        end
        firsts.shuffle();
        foreach (firsts[i]) begin
          logic [63:0] w [8];
          int a, cnt;
          a = m.base + firsts[i];
          cnt = 8 - (a % 8);
          if (cnt > m.vl - firsts[i]) cnt = m.vl - firsts[i];
          for (int n = 0; n < 8; n++) w[n] = (n < cnt) ? mem[a + n] : '0;
          send_line(m.sb, firsts[i], cnt, a % 8, w);
        end
      end else if (m.kind == 1) begin
        for (int i = 0; i < m.vl; i++) begin
          logic [63:0] w [8];
          int a;
          a = m.base + i * m.stride;
          for (int n = 0; n < 8; n++) w[n] = '0;
          w[0] = mem[a];
          send_line(m.sb, i, 1, a % 8, w);
        end
      end else if (m.kind == 2) begin
        for (int i = 0; i < m.vl; i++) begin
          logic [63:0] w [8];
          int a;
          while (idx_items.size() == 0) @(negedge clk);
          a = m.base + int'(idx_items.pop_front());
          for (int n = 0; n < 8; n++) w[n] = '0;
          w[0] = mem[a];
          send_line(m.sb, i, 1, a % 8, w);
        end
      end else begin
        int e;
        e = 0;
        while (e < m.vl) begin
          logic [511:0] l;
          while (st_lines.size() == 0) @(negedge clk);
          l = st_lines.pop_front();
          for (int n = 0; n < 8 && e < m.vl; n++) begin
            mem[m.base + e] = l[n * 64 +: 64];
            e++;
          end
        end
      end
      memop_sync_end = 1'b1; memop_sb_id = 5'(m.sb);
      @(negedge clk);
      memop_sync_end = 1'b0;
    end
  end

  // ---- event counters -----------------------------------------------------------
  int ev_cnt [11];
  logic last_dir;
  initial for (int i = 0; i < 11; i++) ev_cnt[i] = 0;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 10; i++) if (events[i]) ev_cnt[i]++;
    if (dut.u_vcu.dir_cw != last_dir) ev_cnt[10]++;
    last_dir <= dut.u_vcu.dir_cw;
  end

  // ---- program helpers (issue + model) ---------------------------------------
  function automatic logic [63:0] sx(logic [63:0] v);
    return v;
  endfunction

  task automatic vload(int vd, int base, int vl);
    for (int i = 0; i < vl; i++) vreg[vd][i] = mem[base + i];
    vlen[vd] = vl;
    issue(op_ld(2'b00, vd, 0), 64'(base), vl, 3, 0, 0, base, 1, vd);
  endtask
  task automatic vload_s(int vd, int base, int stride, int vl);
    for (int i = 0; i < vl; i++) vreg[vd][i] = mem[base + i * stride];
    vlen[vd] = vl;
    issue(op_ld(2'b10, vd, 0), 64'(base), vl, 3, 0, 1, base, stride, vd);
  endtask
  task automatic vload_x(int vd, int base, int vidx, int vl);
    for (int i = 0; i < vl; i++) vreg[vd][i] = mem[base + int'(vreg[vidx][i])];
    vlen[vd] = vl;
    issue(op_ld(2'b11, vd, vidx), 64'(base), vl, 3, 0, 2, base, 1, vd, vidx);
  endtask
  task automatic vstore(int vs, int base, int vl);
    issue(op_st(vs), 64'(base), vl, 3, 0, 3, base, 1, vs);
  endtask

  // 64-bit element arithmetic (.vv)
  task automatic varith(string op, int vd, int vs2, int vs1, int vl);
    logic [5:0] f6; logic [2:0] f3;
    for (int i = 0; i < vl; i++) begin
      logic [63:0] a, b;
      a = vreg[vs1][i]; b = vreg[vs2][i];
      case (op)
        "add":  vreg[vd][i] = b + a;
        "sub":  vreg[vd][i] = b - a;
        "xor":  vreg[vd][i] = b ^ a;
        "max":  vreg[vd][i] = ($signed(a) > $signed(b)) ? a : b;
        "mul":  vreg[vd][i] = b * a;
        "macc": vreg[vd][i] = vreg[vd][i] + b * a;
        default: ;
      endcase
    end
    vlen[vd] = vl;
    case (op)
      "add":  begin f6 = 6'b000000; f3 = 3'b000; end
      "sub":  begin f6 = 6'b000010; f3 = 3'b000; end
      "xor":  begin f6 = 6'b001011; f3 = 3'b000; end
      "max":  begin f6 = 6'b000111; f3 = 3'b000; end
      "mul":  begin f6 = 6'b100101; f3 = 3'b010; end
      default: begin f6 = 6'b101101; f3 = 3'b010; end
    endcase
    issue(op_v(f6, f3, vd, vs2, vs1), '0, vl, 3);
  endtask

  task automatic vmv(int vd, int vs1, int vl);
    int n;
    n = (vl < vlen[vs1]) ? vl : vlen[vs1];
    for (int i = 0; i < MVL; i++) vreg[vd][i] = vreg[vs1][i];
    vlen[vd] = n;
    issue(op_v(6'b010111, 3'b000, vd, 0, vs1), '0, vl, 3);
  endtask

  task automatic vslide(bit up, int vd, int vs2, int off, int vl);
    logic [63:0] t [MVL];
    for (int i = 0; i < MVL; i++) t[i] = vreg[vd][i];
    for (int i = 0; i < vl; i++) begin
      if (up) begin if (i >= off) t[i] = vreg[vs2][i - off]; end
      else    t[i] = (i + off < vl) ? vreg[vs2][i + off] : '0;
    end
    for (int i = 0; i < MVL; i++) vreg[vd][i] = t[i];
    vlen[vd] = vl;
    issue(op_v(up ? 6'b001110 : 6'b001111, 3'b100, vd, vs2, 1), 64'(off), vl, 3);
  endtask

  task automatic vred(string op, int vd, int vs2, int vs1, int vl);
    logic [63:0] r;
    r = vreg[vs1][0];
    for (int i = 0; i < vl; i++) begin
      logic [63:0] b;
      b = vreg[vs2][i];
      case (op)
        "sum": r = r + b;
        "max": r = ($signed(b) > $signed(r)) ? b : r;
        default: r = ($signed(b) < $signed(r)) ? b : r;
      endcase
    end
    vreg[vd][0] = r;
    vlen[vd] = 1;
    issue(op_v(op == "sum" ? 6'b000000 : op == "max" ? 6'b000111 : 6'b000101, 3'b010, vd, vs2, vs1),
          '0, vl, 3);
  endtask

  // SEW 8 add of a scalar (vadd.vx): 8 bytes per 64-bit word
  task automatic vadd8_vx(int vd, int vs2, logic [7:0] s, int vl8);
    for (int w = 0; w < (vl8 + 7) / 8; w++)
      for (int j = 0; j < 8; j++)
        if (w * 8 + j < vl8) vreg[vd][w][j*8 +: 8] = vreg[vs2][w][j*8 +: 8] + s;
    vlen[vd] = (vl8 + 7) / 8;
    issue(op_v(6'b000000, 3'b100, vd, vs2, 1), 64'(s), vl8, 0);
  endtask

  task automatic wait_idle();
    int t;
    t = 0;
    while ((exp_sb.size() != 0 || mq.size() != 0 || started.size() != 0) && t < 100000) begin
      @(negedge clk); t++;
    end
    check(exp_sb.size() == 0, "all instructions completed");
    if (exp_sb.size() != 0)
      $display("  waiting: %0d to complete (next sb %0d), %0d memory ops not started, %0d in service, %0d completed so far",
               exp_sb.size(), exp_sb[0], mq.size(), started.size(), ncompleted);
    if (exp_sb.size() != 0)
      $display("  lmu act=%b end=%b cnt1=%0d vl1=%0d", dut.u_lmu.act, dut.u_lmu.end_seen, dut.u_lmu.t_cnt[1], dut.u_lmu.t_vl[1]);
  endtask

  // compare register vr (via a store to scratch memory) with the model
  int SCR = 12288;
  task automatic check_reg(int vr, string what);
    int bad;
    bad = 0;
    vstore(vr, SCR, vlen[vr]);
    wait_idle();
    for (int i = 0; i < vlen[vr]; i++) begin
      checks++;
      if (mem[SCR + i] !== vreg[vr][i]) begin
        failures++; bad++;
        if (bad <= 3) $display("FAIL %s: v%0d[%0d] = %h, expected %h", what, vr, i, mem[SCR + i], vreg[vr][i]);
      end
    end
  endtask

  // ---- watchdog ----------------------------------------------------------------
  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- program --------------------------------------------------------------------
  initial begin
    int t0, t1;
    issue_valid = 1'b0; issue_inst = '0; issue_scalar_opnd = '0; issue_sb_id = '0; issue_v_csr = '0;
    credits = 4; last_dir = 1'b1;
    for (int i = 0; i < MEMW; i++) mem[i] = {$urandom, $urandom};
    for (int i = 0; i < 256; i++) mem[8192 + i] = 64'($urandom_range(0, 1023));   // indices
    for (int r = 0; r < 32; r++) begin
      vlen[r] = 0;
      for (int i = 0; i < MVL; i++) vreg[r][i] = '0;
    end
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);

    // loads (misaligned, shuffled lines) then dependent arithmetic chained on them
    vload(1, 3, 256);
    vload(2, 1000, 256);
    varith("add", 3, 1, 2, 256);
    varith("mul", 4, 1, 2, 256);
    varith("macc", 4, 3, 1, 256);
    vmv(5, 3, 256);                       // fast move
    varith("sub", 6, 5, 2, 200);          // reads the moved register
    wait_idle();

    // slides in both directions, several offsets, and reductions; the
    // slide-up destinations are written first (their low elements are kept)
    varith("xor", 7, 1, 2, 256);
    varith("xor", 10, 2, 1, 256);
    varith("sub", 11, 1, 2, 256);
    vslide(1, 7, 3, 3, 256);              // cw
    vslide(0, 8, 3, 5, 256);              // cw (5 on a slide-down)
    vslide(0, 9, 3, 2, 256);              // ccw
    vslide(1, 10, 3, 6, 256);             // ccw
    vslide(1, 11, 3, 4, 100);             // default
    vred("sum", 12, 3, 1, 256);
    vred("max", 13, 4, 2, 77);
    wait_idle();

    // strided and indexed loads, SEW 8 arithmetic, an illegal instruction
    vload_s(14, 2000, 3, 128);
    vload(15, 8192, 256);                 // index vector
    vload_x(16, 4000, 15, 256);
    vadd8_vx(17, 1, 8'h5a, 2048);
    varith("xor", 18, 16, 14, 128);
    issue(op_v(6'b000000, 3'b000, 19, 1, 2, 0), '0, 256, 3, 1);   // masked: illegal
    wait_idle();

    // overlap timing: two dependent 256-element instructions
    t0 = cyc;
    varith("add", 20, 3, 4, 256);
    varith("max", 21, 20, 1, 256);
    wait_idle();
    t1 = cyc;
    $display("dependent add+max, 256 elements: %0d cycles", t1 - t0);
    check(t1 - t0 <= 2 * 6 * 7 + 120, "add+max within the overlapped bound");

    // results
    check_reg(3, "vadd");
    check_reg(4, "vmacc");
    check_reg(5, "fast move");
    check_reg(6, "vsub after move");
    check_reg(7, "slideup 3");
    check_reg(8, "slidedown 5");
    check_reg(9, "slidedown 2");
    check_reg(10, "slideup 6");
    check_reg(11, "slideup 4");
    check_reg(12, "redsum");
    check_reg(13, "redmax");
    check_reg(14, "strided load");
    check_reg(16, "indexed load");
    check_reg(17, "sew8 add");
    check_reg(18, "vxor");
    check_reg(20, "vadd timed");
    check_reg(21, "vmax timed");
    check(ncompleted == n_issued, $sformatf("%0d completions for %0d instructions", ncompleted, n_issued));

    $display("events: ooo=%0d overlap=%0d chain_wait=%0d fast_move=%0d cw=%0d ccw=%0d red_tree=%0d st_stall=%0d slide_pkt=%0d load=%0d dir_switch=%0d",
             ev_cnt[0], ev_cnt[1], ev_cnt[2], ev_cnt[3], ev_cnt[4], ev_cnt[5], ev_cnt[6], ev_cnt[7],
             ev_cnt[8], ev_cnt[9], ev_cnt[10]);
    check(ev_cnt[0] > 0, "out-of-order group read happened");
    check(ev_cnt[1] > 0, "overlap happened");
    check(ev_cnt[2] > 0, "chaining wait happened");
    check(ev_cnt[3] > 0, "fast move happened");
    check(ev_cnt[4] > 0, "clockwise ring use happened");
    check(ev_cnt[5] > 0, "counter-clockwise ring use happened");
    check(ev_cnt[6] > 0, "reduction tree traffic happened");
    check(ev_cnt[7] > 0, "store credit stall happened");
    check(ev_cnt[8] > 0, "slide traffic happened");
    check(ev_cnt[9] > 0, "load delivery happened");
    check(ev_cnt[10] > 0, "ring direction switch happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
