// tb_lane_ring: eight routers joined in a ring.
// 1. Single packets from every lane to every lane in both directions: each
//    arrives only at its destination, after (d - s) mod 8 hops clockwise or
//    (s - d) mod 8 counter-clockwise, one cycle per hop.
// 2. Shift traffic (every lane sends to its neighbour in the ring direction,
//    as a slide by one does): 8 elements per cycle are delivered.
// 3. Random all-to-all traffic with random ejection refusals: every packet is
//    delivered exactly once.
`timescale 1ns/1ps
module tb_lane_ring;
  import vpu_pkg::*;
  localparam int NL = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic dir_cw;
  logic inj_valid [NL], inj_ready [NL], ej_valid [NL], ej_ready [NL];
  ring_pkt_t inj_pkt [NL], ej_pkt [NL];
  lane_ring #(.NL(NL)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 6) $display("FAIL: %s", what); end
  endtask
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  // received packets: data -> count, and receive time
  int rx_cnt [longint unsigned];
  int rx_t   [longint unsigned];
  int rx_total = 0;
  always @(posedge clk) if (rst_n)
    for (int l = 0; l < NL; l++) if (ej_valid[l] && ej_ready[l]) begin
      check(ej_pkt[l].dst == LANE_W'(l), $sformatf("lane %0d got a packet for %0d", l, ej_pkt[l].dst));
      if (rx_cnt.exists(ej_pkt[l].data)) rx_cnt[ej_pkt[l].data]++; else rx_cnt[ej_pkt[l].data] = 1;
      rx_t[ej_pkt[l].data] = cyc;
      rx_total++;
    end
  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic idle();
    for (int l = 0; l < NL; l++) begin inj_valid[l] = 0; ej_ready[l] = 1; end
  endtask
  initial begin
    longint unsigned tag;
    dir_cw = 1; idle();
    for (int l = 0; l < NL; l++) inj_pkt[l] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    tag = 1;
    // 1. latency
    for (int d = 0; d < 2; d++) begin
      dir_cw = d;
      for (int s = 0; s < NL; s++) for (int t = 0; t < NL; t++) if (s != t) begin
        int t0, hops;
        @(negedge clk);
        inj_valid[s] = 1; inj_pkt[s] = '{red: 0, dst: LANE_W'(t), k: '0, data: tag};
        t0 = cyc;
        @(negedge clk); inj_valid[s] = 0;
        repeat (NL + 2) @(negedge clk);
        hops = dir_cw ? (t - s + NL) % NL : (s - t + NL) % NL;
        check(rx_cnt.exists(tag) && rx_cnt[tag] == 1, "single packet delivered once");
        if (rx_cnt.exists(tag))
          check(rx_t[tag] - t0 == hops - 1 + 1, $sformatf("%0d -> %0d dir %0d: %0d cycles for %0d hops",
                                                      s, t, dir_cw, rx_t[tag] - t0, hops));
        tag++;
      end
    end
    // 2. shift by one: NL packets per cycle
    for (int d = 0; d < 2; d++) begin
      int r0, c0;
      dir_cw = d;
      @(negedge clk);
      r0 = rx_total; c0 = cyc;
      for (int i = 0; i < 32; i++) begin
        for (int l = 0; l < NL; l++) begin
          inj_valid[l] = 1;
          inj_pkt[l] = '{red: 0, dst: LANE_W'(dir_cw ? (l + 1) % NL : (l + NL - 1) % NL), k: '0, data: tag};
          tag++;
        end
        #1;
        for (int l = 0; l < NL; l++) check(inj_ready[l], "shift traffic never blocked");
        @(negedge clk);
      end
      idle();
      repeat (3) @(negedge clk);
      check(rx_total - r0 == 32 * NL, "all shift packets delivered");
      check(cyc - c0 <= 32 + 4, $sformatf("shift of 256 elements took %0d cycles", cyc - c0));
    end
    // 3. random traffic
    begin
      longint unsigned first;
      int pend [NL];
      bit acc [NL];
      bit first_round;
      first_round = 1;
      for (int l = 0; l < NL; l++) acc[l] = 0;
      first = tag;
      for (int l = 0; l < NL; l++) pend[l] = 40;
      dir_cw = $urandom_range(0, 1);
      while (1) begin
        bit any;
        any = 0;
        #1;
        for (int l = 0; l < NL; l++) acc[l] = inj_valid[l] && inj_ready[l];
        @(negedge clk);
        for (int l = 0; l < NL; l++) if (acc[l]) begin pend[l]--; tag++; end
        for (int l = 0; l < NL; l++) begin
          ej_ready[l] = ($urandom_range(0, 3) != 0);
          inj_valid[l] = pend[l] > 0;
          if (pend[l] > 0) any = 1;
          // new contents for a lane whose packet was taken
          if (acc[l] || first_round)
            inj_pkt[l] = '{red: 0, dst: LANE_W'($urandom_range(0, NL - 1)), k: '0, data: tag * 8 + l};
        end
        first_round = 0;
        if (!any) break;
      end
      idle();
      repeat (40) @(negedge clk);
      for (longint unsigned t = first * 8; t < tag * 8; t++)
        if (rx_cnt.exists(t)) check(rx_cnt[t] == 1, $sformatf("random packet %0d delivered %0d times", t, rx_cnt[t]));
      check(rx_total == 2 * NL * (NL - 1) + 2 * 32 * NL + NL * 40, $sformatf("%0d packets received", rx_total));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
