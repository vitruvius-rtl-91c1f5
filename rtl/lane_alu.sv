// lane_alu: the lane's pipelined integer / fixed-point arithmetic unit.
//
// Takes one 64-bit operand word per cycle and returns its result LAT cycles
// later, so a lane produces one 64-bit result per cycle once the pipeline is
// full.  Elements narrower than 64 bits are handled in SIMD fashion: the word
// is split into 8/16/32-bit sub-words by sew and each is computed on its own
// (vpu_pkg::alu_op).  Operations: add, sub (vs2 - vs1), and, or, xor,
// signed min/max, multiply (low half), multiply-add (vd + vs1 * vs2) and
// moves.  A tag (destination register and word) travels with the operands.
// The document gives the unit's class of operations and its 64-bit/cycle
// throughput; the latency and the operation subset are this design's choice.
// No stall: the caller only issues when the result has a place to go.
module lane_alu
  import vpu_pkg::*;
#(
  parameter int unsigned LAT = 3,
  parameter type         TAG_T = logic [10:0]
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  vop_e  op,
  input  sew_e  sew,
  input  elem_t a,
  input  elem_t b,
  input  elem_t c,
  input  TAG_T  in_tag,
  output logic  out_valid,
  output elem_t out_data,
  output TAG_T  out_tag
);
  logic  v   [LAT];
  elem_t d   [LAT];
  TAG_T  tg  [LAT];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) v[i] <= 1'b0;
    end else begin
      v[0] <= in_valid;
      for (int i = 1; i < LAT; i++) v[i] <= v[i-1];
    end
  end

  always_ff @(posedge clk) begin
    d[0]  <= alu_op(op, sew, a, b, c);
    tg[0] <= in_tag;
    for (int i = 1; i < LAT; i++) begin
      d[i]  <= d[i-1];
      tg[i] <= tg[i-1];
    end
  end

  assign out_valid = v[LAT-1];
  assign out_data  = d[LAT-1];
  assign out_tag   = tg[LAT-1];
endmodule
