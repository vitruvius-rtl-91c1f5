// ready_bits: availability table behind out-of-order memory-to-arithmetic
// chaining.
//
// For every physical register the lane keeps one bit per lane-local word
// saying it has been written since the register was last allocated.  The
// document's table holds one ready bit per group of five words (one VRF row
// read); here the group bit is derived as the AND of the word bits of the
// group that lie below the instruction's word count, which lets a group be
// complete even when the register is only partly used.  Words arrive in any
// order from the load buffer (one per bank per cycle), from arithmetic
// write-back and from the ring, so a consumer can start on whichever group is
// complete first.
//
// fill marks a whole register written when the instruction producing it has
// finished, so that words past its vector length (left unchanged) do not hold
// back a later consumer with a longer vector length.
// clr clears a whole register (allocation by the renaming unit, one cycle
// before any write to it can happen); set_* mark up to NSET words per cycle.
// Queries are combinational: q_ready[i] is the readiness of group q_grp[i] of
// register q_preg[i] for a register of q_nw words in this lane.  After reset
// every register counts as written (the architectural registers hold values).
module ready_bits
  import vpu_pkg::*;
#(
  parameter int unsigned NSET = 6,
  parameter int unsigned NQ   = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  preg_t                clr_preg,
  input  logic                 fill,
  input  preg_t                fill_preg,
  input  logic [NSET-1:0]      set,
  input  preg_t                set_preg [NSET],
  input  logic [K_W-1:0]       set_k    [NSET],
  input  preg_t                q_preg   [NQ],
  input  logic [GRP_W-1:0]     q_grp    [NQ],
  input  vl_t                  q_nw     [NQ],
  output logic [NQ-1:0]        q_ready
);
  logic [EPL-1:0] bits [NUM_PREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_PREGS; p++) bits[p] <= '1;
    end else begin
      if (clr) bits[clr_preg] <= '0;
      if (fill) bits[fill_preg] <= '1;
      for (int i = 0; i < NSET; i++)
        if (set[i]) bits[set_preg[i]][set_k[i]] <= 1'b1;
    end
  end

  always_comb begin
    for (int q = 0; q < NQ; q++) begin
      q_ready[q] = 1'b1;
      for (int j = 0; j < NUM_BANKS; j++) begin
        int unsigned k;
        k = int'(q_grp[q]) * NUM_BANKS + j;
        if (k < EPL && k < int'(q_nw[q]) && int'(q_preg[q]) < NUM_PREGS)
          if (!bits[q_preg[q]][k]) q_ready[q] = 1'b0;
      end
    end
  end
endmodule
