// vector_control_unit: sends renamed instructions to the lanes and to the
// memory units and tracks their completion.
//
// Arithmetic side: a renamed instruction becomes one lane command (operation,
// element width, source physical registers vs1 -> A, vs2 -> B, old vd -> C,
// new vd -> D, scalar operand, number of 64-bit register words and vl) that
// is broadcast to all eight lanes in the same cycle, once every lane can take
// it.  For a ring operation (slide, reduction) the ring direction register is
// set at the same time: slides use the shortest direction rule
// (ring_dir_cw), reductions use counter-clockwise.  The lanes signal done in
// command order; the sb_id of each command waits in a FIFO and the
// instruction is reported complete to the ROB when all eight lanes have
// signalled done for it.  Per-lane done counters allow the lanes to finish a
// given instruction in different cycles.
//
// Memory side: loads start in the LMU (an indexed load also starts the IMU,
// which streams the index register to the core); stores start in the SMU.
// A store or an indexed load waits until neither the SMU nor the IMU is busy
// (they share the lanes' read port); a unit-stride or strided load only needs
// room in the LMU.  Each memory instruction raises OVI MEMOP sync_start for
// one cycle when it starts.
// The split into arithmetic and memory paths and the completion at the ROB
// follow the document; the command format, the FIFO depth and the done
// counters are this design's.
module vector_control_unit
  import vpu_pkg::*;
#(
  parameter int unsigned NL = NUM_LANES,
  parameter int unsigned IFD = 4            // arithmetic instructions in flight
) (
  input  logic      clk,
  input  logic      rst_n,
  // from the issue stage
  input  logic      arith_valid,
  input  ren_inst_t arith_inst,
  output logic      arith_ready,
  input  logic      mem_valid,
  input  ren_inst_t mem_inst,
  output logic      mem_ready,
  // lanes
  output logic      cmd_valid,
  output lane_cmd_t cmd,
  input  logic      cmd_ready [NL],
  input  logic      lane_done [NL],
  output logic      dir_cw,
  // arithmetic completion
  output logic      cpl_valid,
  output sbid_t     cpl_sb_id,
  // memory units
  output logic      ld_start,
  output logic      idx_start,
  output logic      st_start,
  output sbid_t     m_sb_id,
  output preg_t     m_preg,        // load destination / store source
  output preg_t     m_idx_preg,    // index register of an indexed load
  output vl_t       m_vl,
  input  logic      lmu_ready,
  input  logic      smu_busy,
  input  logic      imu_busy,
  output logic      sync_start,
  output logic      ev_dir_cw,     // ring op sent clockwise
  output logic      ev_dir_ccw     // ring op sent counter-clockwise
);
  localparam int unsigned CW = $clog2(IFD + 1);

  // ---- arithmetic ----------------------------------------------------------
  logic all_ready;
  always_comb begin
    all_ready = 1'b1;
    for (int l = 0; l < NL; l++) if (!cmd_ready[l]) all_ready = 1'b0;
  end

  logic  f_full, f_empty, f_pop;
  sbid_t f_head;
  logic [$clog2(IFD+1)-1:0] f_cnt;

  assign cmd_valid   = arith_valid && all_ready && !f_full;
  assign arith_ready = cmd_valid;

  always_comb begin
    ren_inst_t r;
    r = arith_inst;
    cmd.op         = r.d.op;
    cmd.sew        = r.d.sew;
    cmd.use_scalar = r.d.use_scalar;
    cmd.reads_a    = r.d.reads_vs1;
    cmd.reads_b    = r.d.reads_vs2;
    cmd.reads_c    = r.d.reads_vd;
    cmd.pa         = r.pvs1;
    cmd.pb         = r.pvs2;
    cmd.pc         = r.pold;
    cmd.pd         = r.pvd;
    cmd.scalar     = r.d.scalar;
    cmd.nwords     = words_of(r.d.vl, r.d.sew);
    cmd.vl         = r.d.vl;
  end

  sync_fifo #(.T(sbid_t), .DEPTH(IFD)) u_ifl (
    .clk, .rst_n, .push(cmd_valid), .wdata(arith_inst.d.sb_id),
    .pop(f_pop), .rdata(f_head), .full(f_full), .empty(f_empty), .count(f_cnt));

  logic [CW-1:0] dcnt [NL];
  logic all_done;
  always_comb begin
    all_done = !f_empty;
    for (int l = 0; l < NL; l++) if (dcnt[l] == 0 && !lane_done[l]) all_done = 1'b0;
  end
  assign f_pop = all_done;

  logic ring_cmd;
  assign ring_cmd = cmd_valid && is_ring_op(cmd.op);
  logic dir_next;
  assign dir_next = is_red_op(cmd.op) ? 1'b0 : ring_dir_cw(cmd.op == OP_SLIDEUP, cmd.scalar);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int l = 0; l < NL; l++) dcnt[l] <= '0;
      cpl_valid <= 1'b0; cpl_sb_id <= '0; dir_cw <= 1'b1;
      ev_dir_cw <= 1'b0; ev_dir_ccw <= 1'b0;
    end else begin
      cpl_valid  <= all_done;
      cpl_sb_id  <= f_head;
      ev_dir_cw  <= ring_cmd && dir_next;
      ev_dir_ccw <= ring_cmd && !dir_next;
      for (int l = 0; l < NL; l++)
        dcnt[l] <= dcnt[l] + (lane_done[l] ? 1'b1 : 1'b0) - (all_done ? 1'b1 : 1'b0);
      if (ring_cmd) dir_cw <= dir_next;
    end
  end

  // ---- memory --------------------------------------------------------------
  logic is_ld, is_idx, m_ok;
  assign is_ld  = mem_inst.d.cls == CLS_LOAD;
  assign is_idx = is_ld && mem_inst.d.mop == MOP_INDEXED;
  always_comb begin
    if (!is_ld)      m_ok = !smu_busy && !imu_busy;
    else if (is_idx) m_ok = lmu_ready && !smu_busy && !imu_busy;
    else             m_ok = lmu_ready;
  end
  assign mem_ready  = mem_valid && m_ok;
  assign ld_start   = mem_ready && is_ld;
  assign idx_start  = mem_ready && is_idx;
  assign st_start   = mem_ready && !is_ld;
  assign m_sb_id    = mem_inst.d.sb_id;
  assign m_preg     = mem_inst.pvd;
  assign m_idx_preg = mem_inst.pvs2;
  assign m_vl       = mem_inst.d.vl;
  assign sync_start = mem_ready;
endmodule
