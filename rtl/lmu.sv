// lmu: Load Management Unit.
//
// The scalar core performs the memory accesses of a vector load and returns
// the data as whole 512-bit cache lines on the OVI LOAD bus, each with a
// seq_id saying which load (sb_id), which elements (el_id, el_count) and
// where in the line they start (el_off, byte offset).  The LMU keeps, per
// sb_id, the destination physical register, the vector length and how many
// elements have arrived.  Lines wait in an input queue (the bus has no back
// pressure); the head line is split into its 64-bit elements and element e is
// sent to lane e % 8 as lane-local word e / 8, at most one element per lane
// per cycle.  A stride-1 line therefore feeds all eight lanes in one cycle.
// Several loads may be in flight (up to MAX_LD) and their lines may arrive in
// any order.  A load is complete when the core has signalled sync_end for it
// and all vl elements have been delivered: the LMU then reports it (cpl_*)
// and marks the whole destination register written in the lanes (fill_*).
// The behaviour follows the document's description of OVI loads; the seq_id
// layout, the queue depth and MAX_LD are this design's choices.  Masked loads
// (mask, mask_valid) and the faulting-element report are not handled.
module lmu
  import vpu_pkg::*;
#(
  parameter int unsigned NL     = NUM_LANES,
  parameter int unsigned QD     = 8,
  parameter int unsigned MAX_LD = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  // a load instruction starts
  input  logic       start_valid,
  input  sbid_t      start_sb_id,
  input  preg_t      start_preg,
  input  vl_t        start_vl,
  output logic       start_ready,
  // OVI LOAD
  input  logic       load_valid,
  input  logic [LINE_W-1:0] load_data,
  input  seq_id_t    load_seq_id,
  // OVI MEMOP sync_end
  input  logic       sync_end,
  input  sbid_t      sync_end_sb_id,
  // to the lanes
  output logic       ld_valid [NL],
  output preg_t      ld_preg  [NL],
  output logic [K_W-1:0] ld_k [NL],
  output elem_t      ld_data  [NL],
  input  logic       ld_ready [NL],
  // completion
  output logic       cpl_valid,
  output sbid_t      cpl_sb_id,
  output logic       fill_valid,
  output preg_t      fill_preg
);
  localparam int unsigned NSB = 1 << SB_ID_W;
  localparam int unsigned EPL_LINE = LINE_W / ELEM_W;   // 8

  typedef struct packed {
    logic [LINE_W-1:0] data;
    seq_id_t           sid;
  } line_t;

  logic [NSB-1:0] act, end_seen;
  preg_t          t_preg [NSB];
  vl_t            t_vl   [NSB];
  vl_t            t_cnt  [NSB];
  logic [$clog2(MAX_LD+1)-1:0] n_act;

  assign start_ready = !act[start_sb_id] && n_act < MAX_LD;

  // input queue
  line_t head;
  logic  q_empty, q_full, q_pop;
  logic [$clog2(QD+1)-1:0] q_cnt;
  sync_fifo #(.T(line_t), .DEPTH(QD)) u_q (
    .clk, .rst_n, .push(load_valid), .wdata('{data: load_data, sid: load_seq_id}),
    .pop(q_pop), .rdata(head), .full(q_full), .empty(q_empty), .count(q_cnt));

  // elements of the head line still to send
  logic [EPL_LINE-1:0] pend;      // 1 = already sent
  logic [EPL_LINE-1:0] send_now, pick;
  always_comb begin
    logic [NL-1:0] lane_used;
    automatic int unsigned e, slot, ln;
    lane_used = '0;
    pick      = '0;
    for (int l = 0; l < NL; l++) begin
      ld_valid[l] = 1'b0; ld_preg[l] = t_preg[head.sid.sb_id]; ld_k[l] = '0; ld_data[l] = '0;
    end
    for (int n = 0; n < EPL_LINE; n++) begin
      e    = int'(head.sid.el_id) + n;
      slot = int'(head.sid.el_off >> 3) + n;
      ln   = e & (NL - 1);
      if (!q_empty && n < int'(head.sid.el_count) && !pend[n] && slot < EPL_LINE
          && !lane_used[ln]) begin
        lane_used[ln] = 1'b1;
        ld_valid[ln]  = 1'b1;
        ld_k[ln]      = K_W'(e >> LANE_W);
        ld_data[ln]   = head.data[slot*ELEM_W +: ELEM_W];
        pick[n]       = 1'b1;
      end
    end
  end

  always_comb begin
    automatic int unsigned ln;
    for (int n = 0; n < EPL_LINE; n++) begin
      ln = (int'(head.sid.el_id) + n) & (NL - 1);
      send_now[n] = pick[n] && ld_ready[ln];
    end
  end

  logic [EPL_LINE-1:0] sent_all;
  always_comb begin
    for (int n = 0; n < EPL_LINE; n++)
      sent_all[n] = pend[n] || send_now[n] || n >= int'(head.sid.el_count);
  end
  assign q_pop = !q_empty && (&sent_all);

  // one completion per cycle
  logic  fin;
  sbid_t fin_sb;
  always_comb begin
    fin = 1'b0; fin_sb = '0;
    for (int i = NSB - 1; i >= 0; i--)
      if (act[i] && end_seen[i] && t_cnt[i] == t_vl[i]) begin fin = 1'b1; fin_sb = sbid_t'(i); end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      act <= '0; end_seen <= '0; n_act <= '0; pend <= '0;
      cpl_valid <= 1'b0; cpl_sb_id <= '0; fill_valid <= 1'b0; fill_preg <= '0;
      for (int i = 0; i < NSB; i++) begin t_preg[i] <= '0; t_vl[i] <= '0; t_cnt[i] <= '0; end
    end else begin
      cpl_valid  <= 1'b0;
      fill_valid <= 1'b0;
      pend <= q_pop ? '0 : (pend | send_now);
      if (q_pop) t_cnt[head.sid.sb_id] <= t_cnt[head.sid.sb_id] + vl_t'(head.sid.el_count);
      if (sync_end && act[sync_end_sb_id]) end_seen[sync_end_sb_id] <= 1'b1;
      if (fin) begin
        act[fin_sb]      <= 1'b0;
        end_seen[fin_sb] <= 1'b0;
        cpl_valid  <= 1'b1;
        cpl_sb_id  <= fin_sb;
        fill_valid <= 1'b1;
        fill_preg  <= t_preg[fin_sb];
      end
      if (start_valid && start_ready) begin
        act[start_sb_id]    <= 1'b1;
        t_preg[start_sb_id] <= start_preg;
        t_vl[start_sb_id]   <= start_vl;
        t_cnt[start_sb_id]  <= '0;
      end
      n_act <= n_act + ((start_valid && start_ready) ? 1'b1 : 1'b0) - (fin ? 1'b1 : 1'b0);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(load_valid && q_full && !q_pop))
    else $error("lmu: load line lost, input queue full");
endmodule
