// tb_unpacker: decodes a table of hand-encoded instructions (every supported
// operation in .vv/.vx/.vi form where it exists, the three load kinds, the
// store, vmv.v.v as a fast move) and a set of illegal ones (masked, unknown
// funct6, ring operation below 64-bit elements, indexed store, vill, LMUL 2,
// narrow memory element), and checks class, operation, operand flags,
// registers, scalar/immediate and the clipped vector length.  The unit is
// combinational: results are checked after a settling delay.
`timescale 1ns/1ps
module tb_unpacker;
  import vpu_pkg::*;
  logic [31:0] inst;
  elem_t scalar;
  sbid_t sb_id;
  logic [39:0] v_csr;
  dec_inst_t dec;
  unpacker dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  function automatic logic [31:0] op_v(logic [5:0] f6, logic [2:0] f3, int vd, int vs2, int vs1, bit vm = 1);
    return {f6, vm, 5'(vs2), 5'(vs1), f3, 5'(vd), 7'b1010111};
  endfunction
  function automatic logic [39:0] csr(int vl, int sew, int lmul = 0, bit vill = 0);
    logic [39:0] c;
    c = '0; c[0] = vill; c[3:1] = 3'(sew); c[5:4] = 2'(lmul); c[25:11] = 15'(vl);
    return c;
  endfunction
  task automatic t(string name, logic [31:0] i, logic [39:0] c, iclass_e cls, vop_e op = OP_ADD,
                   int r1 = -1, int r2 = -1, int rd = -1, int wd = -1, int us = -1, int vl = -1,
                   longint sc = -1);
    inst = i; v_csr = c; scalar = 64'h1234_5678_9abc_def0; sb_id = sbid_t'($urandom);
    #1;
    check(dec.cls == cls, $sformatf("%s: class %s expected %s", name, dec.cls.name(), cls.name()));
    check(dec.sb_id == sb_id, {name, ": sb_id"});
    if (cls inside {CLS_ARITH}) check(dec.op == op, $sformatf("%s: op %s expected %s", name, dec.op.name(), op.name()));
    if (r1 >= 0) check(dec.reads_vs1 == r1, {name, ": reads_vs1"});
    if (r2 >= 0) check(dec.reads_vs2 == r2, {name, ": reads_vs2"});
    if (rd >= 0) check(dec.reads_vd == rd, {name, ": reads_vd"});
    if (wd >= 0) check(dec.writes_vd == wd, {name, ": writes_vd"});
    if (us >= 0) check(dec.use_scalar == us, {name, ": use_scalar"});
    if (vl >= 0) check(int'(dec.vl) == vl, $sformatf("%s: vl %0d expected %0d", name, dec.vl, vl));
    if (sc != -1) check(dec.scalar == 64'(sc), $sformatf("%s: scalar %h", name, dec.scalar));
    if (cls != CLS_ILLEGAL) check(dec.vd == i[11:7] && dec.vs1 == i[19:15] && dec.vs2 == i[24:20], {name, ": registers"});
  endtask
  initial begin
    logic [39:0] c64;
    c64 = csr(256, 3);
    t("vadd.vv",  op_v(6'b000000, 3'b000, 3, 1, 2), c64, CLS_ARITH, OP_ADD, 1, 1, 0, 1, 0, 256);
    t("vadd.vx",  op_v(6'b000000, 3'b100, 3, 1, 2), c64, CLS_ARITH, OP_ADD, 0, 1, 0, 1, 1, 256, 64'h1234_5678_9abc_def0);
    t("vadd.vi",  op_v(6'b000000, 3'b011, 3, 1, 5'b11110), c64, CLS_ARITH, OP_ADD, 0, 1, 0, 1, 1, 256, -2);
    t("vsub.vv",  op_v(6'b000010, 3'b000, 3, 1, 2), c64, CLS_ARITH, OP_SUB, 1, 1, 0, 1, 0);
    t("vmin.vv",  op_v(6'b000101, 3'b000, 3, 1, 2), c64, CLS_ARITH, OP_MIN);
    t("vmax.vx",  op_v(6'b000111, 3'b100, 3, 1, 2), c64, CLS_ARITH, OP_MAX);
    t("vand.vv",  op_v(6'b001001, 3'b000, 3, 1, 2), c64, CLS_ARITH, OP_AND);
    t("vor.vi",   op_v(6'b001010, 3'b011, 3, 1, 2), c64, CLS_ARITH, OP_OR);
    t("vxor.vv",  op_v(6'b001011, 3'b000, 3, 1, 2), c64, CLS_ARITH, OP_XOR);
    t("vmul.vv",  op_v(6'b100101, 3'b010, 3, 1, 2), c64, CLS_ARITH, OP_MUL, 1, 1, 0, 1, 0);
    t("vmacc.vv", op_v(6'b101101, 3'b010, 3, 1, 2), c64, CLS_ARITH, OP_MACC, 1, 1, 1, 1, 0);
    t("vmacc.vx", op_v(6'b101101, 3'b110, 3, 1, 2), c64, CLS_ARITH, OP_MACC, 0, 1, 1, 1, 1);
    t("vslideup.vx", op_v(6'b001110, 3'b100, 3, 1, 2), c64, CLS_ARITH, OP_SLIDEUP, 0, 1, 1, 1, 1);
    t("vslideup.vi", op_v(6'b001110, 3'b011, 3, 1, 5'd20), c64, CLS_ARITH, OP_SLIDEUP, 0, 1, 1, 1, 1, 256, 20);
    t("vslidedown.vx", op_v(6'b001111, 3'b100, 3, 1, 2), c64, CLS_ARITH, OP_SLIDEDOWN, 0, 1, 0, 1, 1);
    t("vredsum", op_v(6'b000000, 3'b010, 3, 1, 2), c64, CLS_ARITH, OP_REDSUM, 1, 1, 0, 1, 0);
    t("vredmax", op_v(6'b000111, 3'b010, 3, 1, 2), c64, CLS_ARITH, OP_REDMAX);
    t("vredmin", op_v(6'b000101, 3'b010, 3, 1, 2), c64, CLS_ARITH, OP_REDMIN);
    t("vmv.v.x", op_v(6'b010111, 3'b100, 3, 0, 2), c64, CLS_ARITH, OP_MV, 0, 0, 0, 1, 1);
    t("vmv.v.v", op_v(6'b010111, 3'b000, 3, 0, 2), c64, CLS_FMOVE);
    t("vadd sew8 vl clip", op_v(6'b000000, 3'b000, 3, 1, 2), csr(4000, 0), CLS_ARITH, OP_ADD, 1, 1, 0, 1, 0, 2048);
    t("vadd sew32", op_v(6'b000000, 3'b000, 3, 1, 2), csr(300, 2), CLS_ARITH, OP_ADD, 1, 1, 0, 1, 0, 300);
    t("vadd vl clip 64", op_v(6'b000000, 3'b000, 3, 1, 2), csr(999, 3), CLS_ARITH, OP_ADD, -1, -1, -1, -1, -1, 256);
    t("vle",  {3'b000, 3'b000, 1'b1, 5'd0, 5'd10, 3'b111, 5'd4, 7'b0000111}, c64, CLS_LOAD, OP_ADD, 0, 0, 0, 1);
    t("vlse", {3'b000, 3'b010, 1'b1, 5'd11, 5'd10, 3'b111, 5'd4, 7'b0000111}, c64, CLS_LOAD, OP_ADD, 0, 0, 0, 1);
    t("vlxe", {3'b000, 3'b011, 1'b1, 5'd7, 5'd10, 3'b111, 5'd4, 7'b0000111}, c64, CLS_LOAD, OP_ADD, 0, 1, 0, 1);
    check(dec.mop == MOP_INDEXED, "vlxe: mop");
    t("vse",  {3'b000, 3'b000, 1'b1, 5'd0, 5'd10, 3'b111, 5'd4, 7'b0100111}, c64, CLS_STORE, OP_ADD, 0, 0, 1, 0);
    t("vsse", {3'b000, 3'b010, 1'b1, 5'd3, 5'd10, 3'b111, 5'd4, 7'b0100111}, c64, CLS_STORE);
    check(dec.mop == MOP_STRIDED, "vsse: mop");
    // illegal
    t("masked vadd", op_v(6'b000000, 3'b000, 3, 1, 2, 0), c64, CLS_ILLEGAL, OP_ADD, 0, 0, 0, 0);
    t("unknown f6", op_v(6'b111111, 3'b000, 3, 1, 2), c64, CLS_ILLEGAL);
    t("slide sew32", op_v(6'b001110, 3'b100, 3, 1, 2), csr(16, 2), CLS_ILLEGAL);
    t("slide .vv", op_v(6'b001110, 3'b000, 3, 1, 2), c64, CLS_ILLEGAL);
    t("redsum .vx", op_v(6'b000000, 3'b110, 3, 1, 2), c64, CLS_ILLEGAL);
    t("vsxe", {3'b000, 3'b011, 1'b1, 5'd7, 5'd10, 3'b111, 5'd4, 7'b0100111}, c64, CLS_ILLEGAL);
    t("vle sew32", {3'b000, 3'b000, 1'b1, 5'd0, 5'd10, 3'b111, 5'd4, 7'b0000111}, csr(16, 2), CLS_ILLEGAL);
    t("vle width", {3'b000, 3'b000, 1'b1, 5'd0, 5'd10, 3'b110, 5'd4, 7'b0000111}, c64, CLS_ILLEGAL);
    t("vill", op_v(6'b000000, 3'b000, 3, 1, 2), csr(16, 3, 0, 1), CLS_ILLEGAL);
    t("lmul 2", op_v(6'b000000, 3'b000, 3, 1, 2), csr(16, 3, 1), CLS_ILLEGAL);
    t("scalar opcode", 32'h00000013, c64, CLS_ILLEGAL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
