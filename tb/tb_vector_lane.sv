// tb_vector_lane: self-checking test of vector_lane.
//
// Eight lanes are joined by a lane_ring, as in the full unit, and driven
// directly: registers are filled through the load ports (words sent in
// descending order, so groups complete out of order), instructions are
// broadcast on the command port, and results are read back in element order
// through the memory-read ports and compared with a model kept here.
// Covered: add/sub/multiply-add with SEW 64, SIMD add with SEW 8, scalar
// operand, slide-up and slide-down by several offsets in both ring
// directions, unordered sum / max reductions, an add issued before its load
// data (out-of-order chaining) and back-to-back adds (overlapping, with a
// cycle count against the non-overlapped bound).
module tb_vector_lane;
  import vpu_pkg::*;

  localparam int NL = NUM_LANES;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = !clk;

  int checks = 0, failures = 0;

  logic      cmd_valid;
  lane_cmd_t cmd;
  logic      cmd_ready [NL];
  logic      done [NL];
  logic      clr_valid, fill_valid;
  preg_t     clr_preg, fill_preg;
  logic      ld_valid [NL];
  preg_t     ld_preg;
  logic [K_W-1:0] ld_k [NL];
  elem_t     ld_data [NL];
  logic      ld_ready [NL];
  logic      mrd_start;
  preg_t     mrd_preg;
  vl_t       mrd_nwords;
  logic      mrd_busy [NL], mrd_valid [NL], mrd_ready [NL];
  elem_t     mrd_data [NL];
  logic      inj_valid [NL], inj_ready [NL], ej_valid [NL], ej_ready [NL];
  ring_pkt_t inj_pkt [NL], ej_pkt [NL];
  logic      ev_ooo [NL], ev_ovl [NL], ev_wait [NL];
  logic      dir_cw;

  for (genvar i = 0; i < NL; i++) begin : g_lane
    vector_lane #(.LANE_ID(i)) dut (
      .clk, .rst_n, .cmd_valid, .cmd, .cmd_ready(cmd_ready[i]), .done(done[i]),
      .clr_valid, .clr_preg, .fill_valid, .fill_preg,
      .ld_valid(ld_valid[i]), .ld_preg, .ld_k(ld_k[i]), .ld_data(ld_data[i]), .ld_ready(ld_ready[i]),
      .mrd_start, .mrd_preg, .mrd_nwords, .mrd_busy(mrd_busy[i]), .mrd_valid(mrd_valid[i]),
      .mrd_data(mrd_data[i]), .mrd_ready(mrd_ready[i]),
      .inj_valid(inj_valid[i]), .inj_pkt(inj_pkt[i]), .inj_ready(inj_ready[i]),
      .ej_valid(ej_valid[i]), .ej_pkt(ej_pkt[i]), .ej_ready(ej_ready[i]),
      .ev_ooo_group(ev_ooo[i]), .ev_overlap(ev_ovl[i]), .ev_chain_wait(ev_wait[i]));
  end

  lane_ring u_ring (.clk, .rst_n, .dir_cw, .inj_valid, .inj_pkt, .inj_ready,
                    .ej_valid, .ej_pkt, .ej_ready);

  // model of the register file
  elem_t model [NUM_PREGS][MVL];
  int    n_ooo = 0, n_ovl = 0, n_wait = 0;
  int    ndone [NL];
  always @(posedge clk) begin
    for (int i = 0; i < NL; i++) begin
      if (ev_ooo[i]) n_ooo++;
      if (ev_ovl[i]) n_ovl++;
      if (ev_wait[i]) n_wait++;
      if (done[i]) ndone[i]++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic alloc(preg_t p);
    @(negedge clk); clr_valid = 1'b1; clr_preg = p;
    @(negedge clk); clr_valid = 1'b0;
  endtask

  // load nw words of register p, highest element first
  task automatic load_reg(preg_t p, int nw);
    int left [NL];
    for (int l = 0; l < NL; l++) left[l] = (nw > l) ? (nw - l + NL - 1) / NL : 0;
    @(negedge clk); ld_preg = p;
    while (1) begin
      int any = 0;
      for (int l = 0; l < NL; l++) begin
        ld_valid[l] = (left[l] > 0);
        if (left[l] > 0) begin
          ld_k[l] = K_W'(left[l] - 1);
          ld_data[l] = model[p][(left[l] - 1) * NL + l];
          any = 1;
        end
      end
      if (!any) break;
      @(posedge clk); #0;
      for (int l = 0; l < NL; l++) if (ld_valid[l] && ld_ready[l]) left[l]--;
      @(negedge clk);
    end
    for (int l = 0; l < NL; l++) ld_valid[l] = 1'b0;
  endtask

  task automatic fill_reg(preg_t p);
    @(negedge clk); fill_valid = 1'b1; fill_preg = p;
    @(negedge clk); fill_valid = 1'b0;
  endtask

  // broadcast a command once every lane is ready
  task automatic issue(lane_cmd_t c);
    bit all;
    @(negedge clk);
    do begin
      all = 1;
      for (int l = 0; l < NL; l++) if (!cmd_ready[l]) all = 0;
      if (!all) @(negedge clk);
    end while (!all);
    cmd = c; cmd_valid = 1'b1;
    dir_cw = (c.op == OP_SLIDEUP || c.op == OP_SLIDEDOWN) ?
             ring_dir_cw(c.op == OP_SLIDEUP, c.scalar) : 1'b0;
    @(negedge clk); cmd_valid = 1'b0;
  endtask

  task automatic wait_done(int target);
    bit all;
    do begin
      @(negedge clk);
      all = 1;
      for (int l = 0; l < NL; l++) if (ndone[l] < target) all = 0;
    end while (!all);
  endtask

  int issued = 0;

  task automatic check_reg(preg_t p, int nw, string what);
    int got = 0;
    int idx [NL];
    int bad = 0;
    for (int l = 0; l < NL; l++) idx[l] = 0;
    @(negedge clk); mrd_start = 1'b1; mrd_preg = p; mrd_nwords = vl_t'(nw);
    @(negedge clk); mrd_start = 1'b0;
    while (got < nw) begin
      int l;
      l = got % NL;
      for (int m = 0; m < NL; m++) mrd_ready[m] = (m == l);
      @(posedge clk); #0;
      if (mrd_valid[l]) begin
        checks++;
        if (mrd_data[l] !== model[p][got]) begin
          failures++; bad++;
          if (bad < 5) $display("FAIL %s: p%0d[%0d] got %h exp %h", what, p, got, mrd_data[l], model[p][got]);
        end
        got++;
      end
      @(negedge clk);
    end
    for (int m = 0; m < NL; m++) mrd_ready[m] = 1'b0;
  endtask

  function automatic lane_cmd_t mk(vop_e op, preg_t pa, preg_t pb, preg_t pc, preg_t pd,
                                   int vl, sew_e sew = SEW64, bit sc = 0, elem_t s = '0);
    lane_cmd_t c;
    c = '0;
    c.op = op; c.sew = sew; c.use_scalar = sc; c.scalar = s;
    c.pa = pa; c.pb = pb; c.pc = pc; c.pd = pd;
    c.reads_a = !sc && !(op inside {OP_SLIDEUP, OP_SLIDEDOWN});
    c.reads_b = 1'b1;
    c.reads_c = (op == OP_MACC || op == OP_SLIDEUP);
    c.vl = vl_t'(vl);
    c.nwords = words_of(vl_t'(vl), sew);
    return c;
  endfunction

  task automatic run(lane_cmd_t c);
    alloc(c.pd);
    issue(c);
    issued++;
    wait_done(issued);
  endtask

  initial begin
    int t0, t1;
    cmd_valid = 0; cmd = '0; clr_valid = 0; fill_valid = 0; clr_preg = '0; fill_preg = '0;
    ld_preg = '0; mrd_start = 0; mrd_preg = '0; mrd_nwords = '0; dir_cw = 1'b1;
    for (int l = 0; l < NL; l++) begin
      ld_valid[l] = 0; ld_k[l] = '0; ld_data[l] = '0; mrd_ready[l] = 0; ndone[l] = 0;
    end
    repeat (4) @(negedge clk);
    rst_n = 1'b1;

    // sources p1, p2, p3
    for (int p = 1; p <= 3; p++) begin
      for (int e = 0; e < MVL; e++) model[p][e] = {$urandom, $urandom};
      alloc(preg_t'(p));
      load_reg(preg_t'(p), MVL);
    end
    check_reg(1, MVL, "load");

    // vadd p32 = p1 + p2, full length
    for (int e = 0; e < MVL; e++) model[32][e] = model[2][e] + model[1][e];
    run(mk(OP_ADD, 1, 2, 0, 32, MVL));
    check_reg(32, MVL, "vadd");

    // vsub p33 = p2 - p1, vl = 37
    for (int e = 0; e < 37; e++) model[33][e] = model[2][e] - model[1][e];
    run(mk(OP_SUB, 1, 2, 0, 33, 37));
    check_reg(33, 37, "vsub");

    // vmacc p34 = p3 + p1 * p2
    for (int e = 0; e < MVL; e++) model[34][e] = model[3][e] + model[1][e] * model[2][e];
    run(mk(OP_MACC, 1, 2, 3, 34, MVL));
    check_reg(34, MVL, "vmacc");

    // SIMD: SEW 8, vl = 200 bytes -> 25 words, scalar operand 0x05
    for (int e = 0; e < 25; e++)
      for (int b = 0; b < 8; b++) model[35][e][b*8 +: 8] = model[2][e][b*8 +: 8] + 8'h05;
    run(mk(OP_ADD, 0, 2, 0, 35, 200, SEW8, 1, 64'h5));
    check_reg(35, 25, "vadd.vx sew8");

    // chaining: issue p37 = p36 + p1 before p36 has been loaded
    for (int e = 0; e < MVL; e++) model[36][e] = {$urandom, $urandom};
    for (int e = 0; e < MVL; e++) model[37][e] = model[36][e] + model[1][e];
    begin
      int ooo0;
      ooo0 = n_ooo;
      alloc(36);
      alloc(37);
      issue(mk(OP_ADD, 1, 36, 0, 37, MVL));
      issued++;
      load_reg(36, MVL);
      wait_done(issued);
      check_reg(37, MVL, "chained vadd");
      checks++;
      if (n_ooo == ooo0) begin failures++; $display("FAIL: no out-of-order group"); end
    end

    // slides
    begin
      int offs [6] = '{1, 3, 4, 5, 7, 9};
      for (int t = 0; t < 6; t++) begin
        int o, vl;
        o = offs[t];
        vl = (t == 5) ? 100 : MVL;
        // slide-up: vd[i] = i < o ? old vd[i] : vs2[i-o]
        for (int e = 0; e < vl; e++) model[38][e] = (e < o) ? model[3][e] : model[2][e - o];
        run(mk(OP_SLIDEUP, 0, 2, 3, 38, vl, SEW64, 1, elem_t'(o)));
        check_reg(38, vl, $sformatf("vslideup %0d", o));
        // slide-down: vd[i] = i + o < vl ? vs2[i+o] : 0
        for (int e = 0; e < vl; e++) model[39][e] = (e + o < vl) ? model[2][e + o] : '0;
        run(mk(OP_SLIDEDOWN, 0, 2, 0, 39, vl, SEW64, 1, elem_t'(o)));
        check_reg(39, vl, $sformatf("vslidedown %0d", o));
      end
    end

    // reductions: vd[0] = vs1[0] op vs2[0..vl-1]
    begin
      int vls [4] = '{256, 16, 5, 77};
      for (int t = 0; t < 4; t++) begin
        elem_t acc;
        vop_e  op;
        op  = (t == 1) ? OP_REDMAX : OP_REDSUM;
        acc = model[1][0];
        for (int e = 0; e < vls[t]; e++) acc = alu_op(op, SEW64, acc, model[2][e], '0);
        model[33][0] = acc;
        run(mk(op, 1, 2, 0, 33, vls[t]));
        check_reg(33, 1, $sformatf("reduction vl=%0d", vls[t]));
      end
    end

    // overlapping: four back-to-back full-length adds
    begin
      for (int e = 0; e < MVL; e++) model[32][e] = model[3][e] + model[1][e];
      for (int e = 0; e < MVL; e++) model[34][e] = model[3][e] ^ model[2][e];
      for (int e = 0; e < MVL; e++) model[36][e] = model[2][e] + model[1][e];
      for (int e = 0; e < MVL; e++) model[39][e] = model[1][e] & model[2][e];
      alloc(32); alloc(34); alloc(36); alloc(39);
      t0 = $time;
      issue(mk(OP_ADD, 1, 3, 0, 32, MVL));
      issue(mk(OP_XOR, 2, 3, 0, 34, MVL));
      issue(mk(OP_ADD, 1, 2, 0, 36, MVL));
      issue(mk(OP_AND, 1, 2, 0, 39, MVL));
      issued += 4;
      wait_done(issued);
      t1 = $time;
      check_reg(32, MVL, "ovl0");
      check_reg(34, MVL, "ovl1");
      check_reg(36, MVL, "ovl2");
      check_reg(39, MVL, "ovl3");
      $display("4 x vadd (vl=256): %0d cycles, overlaps %0d", (t1 - t0) / 2, n_ovl);
      // 32 words per lane at one word per cycle: 128 cycles of work; allow startup
      checks++;
      if ((t1 - t0) / 2 > 4 * 32 + 40) begin
        failures++; $display("FAIL: overlapped sequence too slow");
      end
      checks++;
      if (n_ovl == 0) begin failures++; $display("FAIL: no overlap seen"); end
    end

    $display("events: ooo=%0d overlap=%0d chain_wait=%0d", n_ooo, n_ovl, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
