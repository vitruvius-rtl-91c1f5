// reorder_buffer: keeps the commit order of vector instructions.
//
// An entry is opened, in program order, for every instruction leaving the
// renaming unit; it records the sb_id and the physical register the
// instruction's destination used to map to.  Instructions finish out of order
// (arithmetic from the vector control unit, loads and stores from the LMU and
// SMU, fast moves and illegal ones from the renaming unit); completion is
// matched by sb_id.  The scalar core marks an instruction non-speculative on the OVI
// DISPATCH bus (next_senior with its sb_id).  The oldest entry commits when it
// is finished and senior: at most one per cycle, reported on the OVI
// COMPLETED bus (valid, sb_id, illegal; no floating-point flags, saturation,
// scalar result or vstart are produced by this design's operations, so they
// read 0), and its old physical register is released to the renaming unit.
// A next_senior that arrives before its instruction reached the ROB is kept
// in a per-sb_id pending bit.  DISPATCH kill (roll-back) is not handled.
// Commit order, one completion per cycle and the release follow the document;
// depth and matching by sb_id are this design's.
module reorder_buffer
  import vpu_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  alloc,
  input  sbid_t alloc_sb_id,
  input  logic  alloc_has_old,
  input  preg_t alloc_pold,
  output logic  alloc_ready,
  input  logic  cpl_a_valid,   // arithmetic
  input  sbid_t cpl_a_sb_id,
  input  logic  cpl_m_valid,   // loads
  input  sbid_t cpl_m_sb_id,
  input  logic  cpl_s_valid,   // stores
  input  sbid_t cpl_s_sb_id,
  input  logic  cpl_r_valid,   // renaming unit
  input  sbid_t cpl_r_sb_id,
  input  logic  cpl_r_illegal,
  input  logic  senior_valid,  // OVI DISPATCH next_senior
  input  sbid_t senior_sb_id,
  output logic  completed_valid,
  output sbid_t completed_sb_id,
  output logic  completed_illegal,
  output logic  rel_valid,
  output preg_t rel_preg
);
  localparam int unsigned PW = $clog2(DEPTH);

  typedef struct packed {
    logic  valid;
    sbid_t sb_id;
    logic  has_old;
    preg_t pold;
    logic  done;
    logic  illegal;
    logic  senior;
  } rob_ent_t;

  rob_ent_t      rob [DEPTH];
  // next_senior may come before the instruction has reached the ROB
  logic [(1 << SB_ID_W)-1:0] senior_pend;
  logic                      hit;
  always_comb begin
    hit = 1'b0;
    for (int i = 0; i < DEPTH; i++) if (rob[i].valid && rob[i].sb_id == senior_sb_id) hit = 1'b1;
  end
  logic [PW-1:0] head, tail;
  logic [PW:0]   cnt;

  assign alloc_ready = cnt < (PW+1)'(DEPTH);

  logic commit;
  assign commit = rob[head].valid && rob[head].done && rob[head].senior;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head <= '0; tail <= '0; cnt <= '0; senior_pend <= '0;
      for (int i = 0; i < DEPTH; i++) rob[i] <= '0;
      completed_valid <= 1'b0; completed_sb_id <= '0; completed_illegal <= 1'b0;
      rel_valid <= 1'b0; rel_preg <= '0;
    end else begin
      completed_valid <= 1'b0;
      rel_valid       <= 1'b0;
      for (int i = 0; i < DEPTH; i++) begin
        if (rob[i].valid) begin
          if (cpl_a_valid && rob[i].sb_id == cpl_a_sb_id) rob[i].done <= 1'b1;
          if (cpl_m_valid && rob[i].sb_id == cpl_m_sb_id) rob[i].done <= 1'b1;
          if (cpl_s_valid && rob[i].sb_id == cpl_s_sb_id) rob[i].done <= 1'b1;
          if (cpl_r_valid && rob[i].sb_id == cpl_r_sb_id) begin
            rob[i].done <= 1'b1; rob[i].illegal <= cpl_r_illegal;
          end
          if (senior_valid && rob[i].sb_id == senior_sb_id) rob[i].senior <= 1'b1;
        end
      end
      if (senior_valid && !hit && !(alloc && alloc_ready && alloc_sb_id == senior_sb_id))
        senior_pend[senior_sb_id] <= 1'b1;
      if (commit) begin
        rob[head].valid   <= 1'b0;
        completed_valid   <= 1'b1;
        completed_sb_id   <= rob[head].sb_id;
        completed_illegal <= rob[head].illegal;
        rel_valid         <= rob[head].has_old;
        rel_preg          <= rob[head].pold;
        head              <= head + 1'b1;
      end
      if (alloc && alloc_ready) begin
        rob[tail] <= '{valid: 1'b1, sb_id: alloc_sb_id, has_old: alloc_has_old, pold: alloc_pold,
                       done: 1'b0, illegal: 1'b0,
                       senior: (senior_valid && senior_sb_id == alloc_sb_id) || senior_pend[alloc_sb_id]};
        senior_pend[alloc_sb_id] <= 1'b0;
        tail <= tail + 1'b1;
      end
      cnt <= cnt + ((alloc && alloc_ready) ? 1'b1 : 1'b0) - (commit ? 1'b1 : 1'b0);
    end
  end

  // sb_ids of in-flight instructions are unique
  assert property (@(posedge clk) disable iff (!rst_n) !(alloc && !alloc_ready))
    else $error("reorder_buffer: allocation while full");
endmodule
