// lane_fsm: the lane's VRF access schedule.
//
// Five active states repeat while the lane has work: READ_OP_A, READ_OP_B and
// READ_OP_C read the three source operands of a multiply-add (one word from
// each of the five banks per read, i.e. a group of five words), WB writes
// arithmetic results back, and MEM serves the memory side (load-buffer writes
// or reads for stores and indices).  Five results are produced per five
// cycles, which is why five single-port banks suffice.  With nothing to do
// the FSM rests in IDLE, and leaves it when `busy` is raised (a start from
// the local control or a memory operation in progress); it returns to IDLE
// only at the end of a full round (after MEM).  States and order follow the
// document's lane diagram; the encoding is this design's.
module lane_fsm
  import vpu_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic busy,
  output lane_state_e state,
  output logic       round_end  // high in MEM: a new round begins next cycle
);
  lane_state_e st, st_n;

  always_comb begin
    unique case (st)
      S_IDLE:      st_n = busy ? S_READ_OP_A : S_IDLE;
      S_READ_OP_A: st_n = S_READ_OP_B;
      S_READ_OP_B: st_n = S_READ_OP_C;
      S_READ_OP_C: st_n = S_WB;
      S_WB:        st_n = S_MEM;
      S_MEM:       st_n = busy ? S_READ_OP_A : S_IDLE;
      default:     st_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) st <= S_IDLE;
    else        st <= st_n;
  end

  assign state     = st;
  assign round_end = (st == S_MEM);
endmodule
