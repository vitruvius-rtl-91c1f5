// issue_stage: queue demultiplexer, the two issue queues and the issue logic.
//
// Renamed instructions are split by type: loads and stores go to the memory
// queue, everything else to the arithmetic queue (QD entries each).  The two
// streams then proceed independently, which lets a load start while earlier
// arithmetic instructions are still waiting, and the other way round.  Each
// queue head is offered downstream (arith_* to the vector control unit,
// mem_* to the memory units) and leaves when that side can take it: the
// lanes' readiness already includes the overlapping rule (a new instruction
// may become inbound as soon as the previous one is outbound) and the ring
// rule (one ring instruction at a time).  An incoming instruction is accepted
// only if its queue has room; the two queues never block each other.
// Structure from the document; the depth and handshakes are this design's.
module issue_stage
  import vpu_pkg::*;
#(
  parameter int unsigned QD = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  ren_inst_t in,
  output logic      in_ready,
  output logic      arith_valid,
  output ren_inst_t arith_inst,
  input  logic      arith_ready,
  output logic      mem_valid,
  output ren_inst_t mem_inst,
  input  logic      mem_ready
);
  logic to_mem;
  assign to_mem = in.d.cls inside {CLS_LOAD, CLS_STORE};

  logic a_full, a_empty, m_full, m_empty;
  logic [$clog2(QD+1)-1:0] a_cnt, m_cnt;

  assign in_ready = to_mem ? !m_full : !a_full;

  sync_fifo #(.T(ren_inst_t), .DEPTH(QD)) u_arith_q (
    .clk, .rst_n, .push(in_valid && !to_mem && !a_full), .wdata(in),
    .pop(arith_valid && arith_ready), .rdata(arith_inst),
    .full(a_full), .empty(a_empty), .count(a_cnt));

  sync_fifo #(.T(ren_inst_t), .DEPTH(QD)) u_mem_q (
    .clk, .rst_n, .push(in_valid && to_mem && !m_full), .wdata(in),
    .pop(mem_valid && mem_ready), .rdata(mem_inst),
    .full(m_full), .empty(m_empty), .count(m_cnt));

  assign arith_valid = !a_empty;
  assign mem_valid   = !m_empty;
endmodule
