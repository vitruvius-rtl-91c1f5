// tb_lane_alu: random operations at every element width through the
// pipelined ALU, one per cycle; each result must come out exactly LAT
// cycles later with its tag and match an independent model of the
// operation on every sub-word.
`timescale 1ns/1ps
module tb_lane_alu;
  import vpu_pkg::*;
  localparam int LAT = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  vop_e op; sew_e sew;
  elem_t a, b, c, out_data;
  logic [10:0] in_tag, out_tag;
  lane_alu #(.LAT(LAT)) dut (.*);
  int checks = 0, failures = 0;

  function automatic elem_t model(vop_e o, sew_e s, elem_t x, elem_t y, elem_t z);
    elem_t r;
    int w;
    w = 8 << s;
    r = '0;
    for (int i = 0; i < 64 / w; i++) begin
      longint unsigned xa, ya, za, res, msk;
      longint sa, sb;
      msk = (w == 64) ? '1 : ((64'd1 << w) - 1);
      xa = (x >> (i * w)) & msk; ya = (y >> (i * w)) & msk; za = (z >> (i * w)) & msk;
      sa = (w == 64) ? longint'(xa) : ((xa >> (w - 1)) ? longint'(xa) - (longint'(1) << w) : longint'(xa));
      sb = (w == 64) ? longint'(ya) : ((ya >> (w - 1)) ? longint'(ya) - (longint'(1) << w) : longint'(ya));
      case (o)
        OP_ADD: res = ya + xa;
        OP_SUB: res = ya - xa;
        OP_AND: res = ya & xa;
        OP_OR:  res = ya | xa;
        OP_XOR: res = ya ^ xa;
        OP_MIN: res = (sa < sb) ? xa : ya;
        OP_MAX: res = (sa < sb) ? ya : xa;
        OP_MUL: res = ya * xa;
        OP_MACC: res = za + ya * xa;
        OP_MV:  res = xa;
        default: res = 0;
      endcase
      r |= (elem_t'(res) & msk) << (i * w);
    end
    return r;
  endfunction

  elem_t exp_q [$];
  logic [10:0] tag_q [$];
  int sent_t [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL: unexpected output"); end
    else begin
      elem_t e; logic [10:0] tg; int t0;
      e = exp_q.pop_front(); tg = tag_q.pop_front(); t0 = sent_t.pop_front();
      if (out_data !== e || out_tag !== tg || cyc - t0 != LAT) begin
        failures++;
        if (failures < 5) $display("FAIL: got %h tag %0d after %0d, expected %h tag %0d after %0d",
                                   out_data, out_tag, cyc - t0, e, tg, LAT);
      end
    end
  end
  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    vop_e ops [10] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_MIN, OP_MAX, OP_MUL, OP_MACC, OP_MV};
    in_valid = 0; op = OP_ADD; sew = SEW64; a = '0; b = '0; c = '0; in_tag = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      op = ops[$urandom_range(0, 9)];
      sew = sew_e'($urandom_range(0, 3));
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; c = {$urandom, $urandom};
      if ($urandom_range(0, 3) == 0) a = b;             // equal operands for min/max
      in_tag = 11'($urandom);
      if (in_valid) begin
        exp_q.push_back(model(op, sew, a, b, c)); tag_q.push_back(in_tag); sent_t.push_back(cyc);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
