// pre_issue_queue: entry point of instructions from the scalar core (OVI ISSUE).
//
// The scalar core may send an instruction (32-bit encoding, 64-bit scalar
// operand, 5-bit sb_id, 40-bit v_csr) only while it holds a credit; it starts
// with DEPTH credits.  Every instruction is stored here; when the front end
// takes one (out_valid && out_ready) its slot is freed and a one-cycle credit
// pulse goes back to the core.  The credit scheme is OVI's; the depth is this
// design's choice (the block diagram draws a few entries, with no number).
module pre_issue_queue
  import vpu_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        issue_valid,
  input  logic [31:0] issue_inst,
  input  elem_t       issue_scalar_opnd,
  input  sbid_t       issue_sb_id,
  input  logic [39:0] issue_v_csr,
  output logic        issue_credit,
  output logic        out_valid,
  output logic [31:0] out_inst,
  output elem_t       out_scalar,
  output sbid_t       out_sb_id,
  output logic [39:0] out_v_csr,
  input  logic        out_ready
);
  typedef struct packed {
    logic [31:0] inst;
    elem_t       scalar;
    sbid_t       sb_id;
    logic [39:0] v_csr;
  } entry_t;

  entry_t head;
  logic   empty, full, pop;
  logic [$clog2(DEPTH+1)-1:0] cnt;

  sync_fifo #(.T(entry_t), .DEPTH(DEPTH)) u_q (
    .clk, .rst_n, .push(issue_valid),
    .wdata('{inst: issue_inst, scalar: issue_scalar_opnd, sb_id: issue_sb_id, v_csr: issue_v_csr}),
    .pop, .rdata(head), .full, .empty, .count(cnt));

  assign out_valid  = !empty;
  assign pop        = out_valid && out_ready;
  assign out_inst   = head.inst;
  assign out_scalar = head.scalar;
  assign out_sb_id  = head.sb_id;
  assign out_v_csr  = head.v_csr;

  always_ff @(posedge clk) begin
    if (!rst_n) issue_credit <= 1'b0;
    else        issue_credit <= pop;
  end

  // The core must not send without a credit.
  assert property (@(posedge clk) disable iff (!rst_n) issue_valid |-> !full)
    else $error("pre_issue_queue: instruction sent without credit");
endmodule
