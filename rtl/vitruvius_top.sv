// vitruvius_top: the decoupled vector processing unit.
//
// The unit sits next to a scalar RISC-V core and talks to it only through
// the Open Vector Interface (OVI), whose buses appear here as plain ports:
//   ISSUE     core -> unit: instruction, scalar operand, sb_id, vector CSRs;
//             the unit returns one issue_credit per instruction it has taken
//             out of its pre-issue queue.
//   DISPATCH  core -> unit: next_senior marks instruction sb_id as no longer
//             speculative; kill is not supported and must stay low.
//   COMPLETED unit -> core: one instruction per cycle, in program order.
//   MEMOP     sync_start (unit -> core) when a memory instruction starts;
//             sync_end with sb_id (core -> unit) when the core has finished
//             all its memory accesses.
//   LOAD      core -> unit: 512-bit lines of load data tagged with seq_id.
//   STORE     unit -> core: 512-bit lines of store data, sent under credits.
//   MASK_IDX  unit -> core: indices of an indexed load, under credits.
// Inside, instructions flow pre_issue_queue -> unpacker (decode) ->
// renaming_unit (with the reorder buffer) -> issue_stage (arithmetic and
// memory queues) -> vector_control_unit -> eight vector_lanes joined by the
// lane_ring, with the lmu, smu and imu on the memory buses.
// `events` pulses for one cycle when a mechanism is used, for performance
// counting: [0] a lane read a register group out of order, [1] a lane
// overlapped two instructions, [2] a lane waited for a producer (chaining
// stall), [3] fast move, [4] ring op sent clockwise, [5] ring op sent
// counter-clockwise, [6] reduction partial result passed on the ring,
// [7] store line waiting for a credit, [8] slide element passed on the ring,
// [9] load line delivered to the lanes.
// Masked operations (mask register file), floating point and the DISPATCH
// kill are not implemented; fflags, vxsat, dest_reg and vstart of COMPLETED
// always read 0, and the LOAD mask and MEMOP vstart_vlfof inputs are unused.
module vitruvius_top
  import vpu_pkg::*;
#(
  parameter int unsigned NL        = NUM_LANES,
  parameter bit          OVERLAP   = 1'b1,
  parameter int unsigned PIQ_DEPTH = 4,
  parameter int unsigned ROB_DEPTH = 16,
  parameter int unsigned ST_CREDITS  = 4,
  parameter int unsigned IDX_CREDITS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // ISSUE
  input  logic              issue_valid,
  input  logic [31:0]       issue_inst,
  input  logic [63:0]       issue_scalar_opnd,
  input  logic [4:0]        issue_sb_id,
  input  logic [39:0]       issue_v_csr,
  output logic              issue_credit,
  // DISPATCH
  input  logic              dispatch_next_senior,
  input  logic              dispatch_kill,
  input  logic [4:0]        dispatch_sb_id,
  // COMPLETED
  output logic              completed_valid,
  output logic [4:0]        completed_sb_id,
  output logic [4:0]        completed_fflags,
  output logic              completed_vxsat,
  output logic [63:0]       completed_dest_reg,
  output logic [13:0]       completed_vstart,
  output logic              completed_illegal,
  // MEMOP
  output logic              memop_sync_start,
  input  logic              memop_sync_end,
  input  logic [4:0]        memop_sb_id,
  input  logic [14:0]       memop_vstart_vlfof,
  // LOAD
  input  logic              load_valid,
  input  logic [511:0]      load_data,
  input  logic [33:0]       load_seq_id,
  input  logic [63:0]       load_mask,
  input  logic              load_mask_valid,
  // STORE
  output logic              store_valid,
  output logic [511:0]      store_data,
  input  logic              store_credit,
  // MASK_IDX
  output logic              mask_idx_valid,
  output logic [64:0]       mask_idx_item,
  output logic              mask_idx_last_idx,
  input  logic              mask_idx_credit,
  // performance events
  output logic [9:0]        events
);
  // ---- front end -------------------------------------------------------------
  logic        piq_valid, piq_ready;
  logic [31:0] piq_inst;
  elem_t       piq_scalar;
  sbid_t       piq_sb_id;
  logic [39:0] piq_csr;

  pre_issue_queue #(.DEPTH(PIQ_DEPTH)) u_piq (
    .clk, .rst_n, .issue_valid, .issue_inst, .issue_scalar_opnd, .issue_sb_id, .issue_v_csr,
    .issue_credit, .out_valid(piq_valid), .out_inst(piq_inst), .out_scalar(piq_scalar),
    .out_sb_id(piq_sb_id), .out_v_csr(piq_csr), .out_ready(piq_ready));

  dec_inst_t dec;
  unpacker u_unpack (.inst(piq_inst), .scalar(piq_scalar), .sb_id(piq_sb_id), .v_csr(piq_csr), .dec);

  logic      ren_valid, ren_ready;
  ren_inst_t ren;
  logic      rob_alloc, rob_has_old, rob_ready;
  sbid_t     rob_sb_id;
  preg_t     rob_pold;
  logic      rcpl_valid, rcpl_illegal;
  sbid_t     rcpl_sb_id;
  logic      clr_valid;
  preg_t     clr_preg;
  logic      rel_valid;
  preg_t     rel_preg;
  logic      ev_fast_move;
  vl_t       et_elems;

  renaming_unit u_ren (
    .clk, .rst_n, .in_valid(piq_valid), .in(dec), .in_ready(piq_ready),
    .out_valid(ren_valid), .out(ren), .out_ready(ren_ready),
    .rob_alloc, .rob_sb_id, .rob_has_old, .rob_pold, .rob_ready,
    .cpl_valid(rcpl_valid), .cpl_sb_id(rcpl_sb_id), .cpl_illegal(rcpl_illegal),
    .clr_valid, .clr_preg, .rel_valid, .rel_preg, .ev_fast_move,
    .et_lreg('0), .et_elems);

  logic      a_valid, a_ready, m_valid, m_ready;
  ren_inst_t a_inst, m_inst;
  issue_stage u_issue (
    .clk, .rst_n, .in_valid(ren_valid), .in(ren), .in_ready(ren_ready),
    .arith_valid(a_valid), .arith_inst(a_inst), .arith_ready(a_ready),
    .mem_valid(m_valid), .mem_inst(m_inst), .mem_ready(m_ready));

  // ---- control -----------------------------------------------------------------
  logic      cmd_valid, dir_cw;
  lane_cmd_t cmd;
  logic      cmd_ready [NL], lane_done [NL];
  logic      acpl_valid;
  sbid_t     acpl_sb_id;
  logic      ld_start, idx_start, st_start, lmu_ready, smu_busy, imu_busy;
  sbid_t     ms_sb_id;
  preg_t     ms_preg, ms_idx_preg;
  vl_t       ms_vl;
  logic      ev_cw, ev_ccw;

  vector_control_unit #(.NL(NL)) u_vcu (
    .clk, .rst_n, .arith_valid(a_valid), .arith_inst(a_inst), .arith_ready(a_ready),
    .mem_valid(m_valid), .mem_inst(m_inst), .mem_ready(m_ready),
    .cmd_valid, .cmd, .cmd_ready, .lane_done, .dir_cw,
    .cpl_valid(acpl_valid), .cpl_sb_id(acpl_sb_id),
    .ld_start, .idx_start, .st_start, .m_sb_id(ms_sb_id), .m_preg(ms_preg),
    .m_idx_preg(ms_idx_preg), .m_vl(ms_vl), .lmu_ready, .smu_busy, .imu_busy,
    .sync_start(memop_sync_start), .ev_dir_cw(ev_cw), .ev_dir_ccw(ev_ccw));

  logic  lcpl_valid, scpl_valid, fill_valid;
  sbid_t lcpl_sb_id, scpl_sb_id;
  preg_t fill_preg;

  reorder_buffer #(.DEPTH(ROB_DEPTH)) u_rob (
    .clk, .rst_n, .alloc(rob_alloc), .alloc_sb_id(rob_sb_id), .alloc_has_old(rob_has_old),
    .alloc_pold(rob_pold), .alloc_ready(rob_ready),
    .cpl_a_valid(acpl_valid), .cpl_a_sb_id(acpl_sb_id),
    .cpl_m_valid(lcpl_valid), .cpl_m_sb_id(lcpl_sb_id),
    .cpl_s_valid(scpl_valid), .cpl_s_sb_id(scpl_sb_id),
    .cpl_r_valid(rcpl_valid), .cpl_r_sb_id(rcpl_sb_id), .cpl_r_illegal(rcpl_illegal),
    .senior_valid(dispatch_next_senior), .senior_sb_id(dispatch_sb_id),
    .completed_valid, .completed_sb_id, .completed_illegal, .rel_valid, .rel_preg);

  assign completed_fflags   = '0;
  assign completed_vxsat    = 1'b0;
  assign completed_dest_reg = '0;
  assign completed_vstart   = '0;

  // ---- lanes and ring -------------------------------------------------------------
  logic      ld_valid [NL], ld_ready [NL];
  preg_t     ld_preg [NL];
  logic [K_W-1:0] ld_k [NL];
  elem_t     ld_data [NL];
  logic      mrd_start;
  preg_t     mrd_preg;
  vl_t       mrd_nwords;
  logic      mrd_busy [NL], mrd_valid [NL], mrd_ready [NL];
  logic      s_mrd_ready [NL], i_mrd_ready [NL];
  elem_t     mrd_data [NL];
  logic      inj_valid [NL], inj_ready [NL], ej_valid [NL], ej_ready [NL];
  ring_pkt_t inj_pkt [NL], ej_pkt [NL];
  logic      ev_ooo [NL], ev_ovl [NL], ev_wait [NL];

  for (genvar i = 0; i < NL; i++) begin : g_lane
    vector_lane #(.LANE_ID(i), .OVERLAP(OVERLAP)) u_lane (
      .clk, .rst_n, .cmd_valid, .cmd, .cmd_ready(cmd_ready[i]), .done(lane_done[i]),
      .clr_valid, .clr_preg, .fill_valid, .fill_preg,
      .ld_valid(ld_valid[i]), .ld_preg(ld_preg[i]), .ld_k(ld_k[i]), .ld_data(ld_data[i]),
      .ld_ready(ld_ready[i]),
      .mrd_start, .mrd_preg, .mrd_nwords, .mrd_busy(mrd_busy[i]), .mrd_valid(mrd_valid[i]),
      .mrd_data(mrd_data[i]), .mrd_ready(mrd_ready[i]),
      .inj_valid(inj_valid[i]), .inj_pkt(inj_pkt[i]), .inj_ready(inj_ready[i]),
      .ej_valid(ej_valid[i]), .ej_pkt(ej_pkt[i]), .ej_ready(ej_ready[i]),
      .ev_ooo_group(ev_ooo[i]), .ev_overlap(ev_ovl[i]), .ev_chain_wait(ev_wait[i]));
  end

  lane_ring #(.NL(NL)) u_ring (
    .clk, .rst_n, .dir_cw, .inj_valid, .inj_pkt, .inj_ready, .ej_valid, .ej_pkt, .ej_ready);

  // ---- memory units --------------------------------------------------------------
  sbid_t sync_end_sb;
  assign sync_end_sb = memop_sb_id;

  lmu #(.NL(NL)) u_lmu (
    .clk, .rst_n, .start_valid(ld_start), .start_sb_id(ms_sb_id), .start_preg(ms_preg),
    .start_vl(ms_vl), .start_ready(lmu_ready),
    .load_valid, .load_data, .load_seq_id(seq_id_t'(load_seq_id)),
    .sync_end(memop_sync_end), .sync_end_sb_id(sync_end_sb),
    .ld_valid, .ld_preg, .ld_k, .ld_data, .ld_ready,
    .cpl_valid(lcpl_valid), .cpl_sb_id(lcpl_sb_id), .fill_valid, .fill_preg);

  logic  s_mrd_start, i_mrd_start, ev_stall;
  preg_t s_mrd_preg, i_mrd_preg;
  vl_t   s_mrd_nw, i_mrd_nw;

  smu #(.NL(NL), .CREDITS(ST_CREDITS)) u_smu (
    .clk, .rst_n, .start_valid(st_start), .start_sb_id(ms_sb_id), .start_preg(ms_preg),
    .start_vl(ms_vl), .busy(smu_busy),
    .mrd_start(s_mrd_start), .mrd_preg(s_mrd_preg), .mrd_nwords(s_mrd_nw),
    .mrd_valid, .mrd_data, .mrd_ready(s_mrd_ready),
    .store_valid, .store_data, .store_credit,
    .sync_end(memop_sync_end), .sync_end_sb_id(sync_end_sb),
    .cpl_valid(scpl_valid), .cpl_sb_id(scpl_sb_id), .ev_credit_stall(ev_stall));

  imu #(.NL(NL), .CREDITS(IDX_CREDITS)) u_imu (
    .clk, .rst_n, .start_valid(idx_start), .start_preg(ms_idx_preg), .start_vl(ms_vl),
    .busy(imu_busy),
    .mrd_start(i_mrd_start), .mrd_preg(i_mrd_preg), .mrd_nwords(i_mrd_nw),
    .mrd_valid, .mrd_data, .mrd_ready(i_mrd_ready),
    .item_valid(mask_idx_valid), .item(mask_idx_item), .last_idx(mask_idx_last_idx),
    .mask_idx_credit);

  // the SMU and the IMU are never busy together, so the lanes' read port is
  // simply shared
  assign mrd_start  = s_mrd_start || i_mrd_start;
  assign mrd_preg   = s_mrd_start ? s_mrd_preg : i_mrd_preg;
  assign mrd_nwords = s_mrd_start ? s_mrd_nw   : i_mrd_nw;
  always_comb
    for (int l = 0; l < NL; l++) mrd_ready[l] = s_mrd_ready[l] || i_mrd_ready[l];

  // ---- events -----------------------------------------------------------------
  always_comb begin
    events = '0;
    for (int l = 0; l < NL; l++) begin
      if (ev_ooo[l])  events[0] = 1'b1;
      if (ev_ovl[l])  events[1] = 1'b1;
      if (ev_wait[l]) events[2] = 1'b1;
      if (ej_valid[l] && ej_ready[l] && ej_pkt[l].red)  events[6] = 1'b1;
      if (ej_valid[l] && ej_ready[l] && !ej_pkt[l].red) events[8] = 1'b1;
      if (ld_valid[l] && ld_ready[l]) events[9] = 1'b1;
    end
    events[3] = ev_fast_move;
    events[4] = ev_cw;
    events[5] = ev_ccw;
    events[7] = ev_stall;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !dispatch_kill)
    else $error("vitruvius_top: DISPATCH kill is not supported");
  assert property (@(posedge clk) disable iff (!rst_n) !(smu_busy && imu_busy))
    else $error("vitruvius_top: store and indexed load share the lane read port");
endmodule
