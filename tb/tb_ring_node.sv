// tb_ring_node: one router with both neighbours driven by the testbench.
// Random packets arrive from the upstream side selected by dir_cw (the
// other side carries noise that must be ignored) while the lane injects and
// sometimes refuses ejection.  Checks: a packet addressed to this lane is
// ejected when the lane is ready, otherwise it is passed on; passing traffic
// appears on the output exactly one cycle later; an injection is accepted
// only when no packet is passed on; a self-addressed injection is ejected at
// once; nothing is lost or duplicated.
`timescale 1ns/1ps
module tb_ring_node;
  import vpu_pkg::*;
  localparam int ID = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic dir_cw, in_cw_valid, in_ccw_valid, out_valid, inj_valid, inj_ready, ej_valid, ej_ready;
  ring_pkt_t in_cw, in_ccw, out_pkt, inj_pkt, ej_pkt;
  ring_node #(.ID(ID)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 6) $display("FAIL: %s", what); end
  endtask
  function automatic ring_pkt_t rnd_pkt();
    ring_pkt_t p;
    p.red = $urandom_range(0, 1); p.dst = LANE_W'($urandom_range(0, 7));
    if ($urandom_range(0, 2) == 0) p.dst = LANE_W'(ID);
    p.k = K_W'($urandom); p.data = {$urandom, $urandom};
    return p;
  endfunction
  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic exp_out_v;
    ring_pkt_t exp_out;
    dir_cw = 1; in_cw_valid = 0; in_ccw_valid = 0; inj_valid = 0; ej_ready = 1;
    in_cw = '0; in_ccw = '0; inj_pkt = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    exp_out_v = 0; exp_out = '0;
    for (int t = 0; t < 5000; t++) begin
      logic up_v; ring_pkt_t up;
      bit ej_in, fwd, inj_ok, self;
      if (t % 500 == 0) dir_cw = $urandom_range(0, 1);
      in_cw_valid = $urandom_range(0, 1); in_cw = rnd_pkt();
      in_ccw_valid = $urandom_range(0, 1); in_ccw = rnd_pkt();
      inj_valid = $urandom_range(0, 1); inj_pkt = rnd_pkt();
      ej_ready = ($urandom_range(0, 3) != 0);
      #1;
      up_v = dir_cw ? in_cw_valid : in_ccw_valid;
      up   = dir_cw ? in_cw : in_ccw;
      ej_in = up_v && up.dst == LANE_W'(ID) && ej_ready;
      fwd   = up_v && !ej_in;
      self  = inj_pkt.dst == LANE_W'(ID);
      inj_ok = self ? (!ej_in && ej_ready) : !fwd;
      check(inj_ready == inj_ok, "inj_ready");
      check(ej_valid == (ej_in || (inj_valid && inj_ok && self)), "ej_valid");
      if (ej_valid) check(ej_pkt == (ej_in ? up : inj_pkt), "ej_pkt");
      // output of the previous cycle's decision
      check(out_valid == exp_out_v && (!exp_out_v || out_pkt == exp_out), "pass-on after one cycle");
      @(negedge clk);
      exp_out_v = fwd || (inj_valid && inj_ok && !self);
      exp_out   = fwd ? up : inj_pkt;
      #1;
      check(out_valid == exp_out_v && (!exp_out_v || out_pkt == exp_out), "out link");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
