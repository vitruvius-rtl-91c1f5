// reduction_handler: intra-lane phase of an unordered vector reduction.
//
// The lane's share of the source vector (vsrc[0], vsrc[1], ...) streams in one
// word per cycle.  N accumulators are used in round-robin order: an empty
// accumulator takes the element as it is, a filled one is sent with the
// element through a pipelined functional unit of latency LAT and receives the
// result when it comes out.  Because consecutive elements go to different
// accumulators, a new pair enters the pipeline every cycle as long as
// N >= LAT; otherwise the input stalls (in_ready low) until the selected
// accumulator's result is back.  Lane 0 starts with accumulator 0 holding the
// scalar vs1[0] (has_init), so its first pair is vs1[0] + vsrc[0].  After the
// element flagged last, and once the pipeline is empty, the filled
// accumulators are combined into one partial result, presented for one cycle
// on out_valid; out_empty says the lane had no element at all.
// Elements are 64-bit (sum, signed max, signed min).
// Mechanism from the document; N, LAT and the one-cycle final combine are this
// design's choices.
module reduction_handler
  import vpu_pkg::*;
#(
  parameter int unsigned N   = 4,
  parameter int unsigned LAT = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  vop_e  op,
  input  logic  has_init,
  input  elem_t init,
  input  logic  in_valid,
  input  logic  in_last,
  input  elem_t in_data,
  output logic  in_ready,
  output logic  out_valid,
  output logic  out_empty,
  output elem_t out_data
);
  localparam int unsigned NW = (N > 1) ? $clog2(N) : 1;

  elem_t         acc     [N];
  logic [N-1:0]  acc_v, busy;
  logic [NW-1:0] ptr;
  logic          active, draining;
  vop_e          op_q;

  // functional-unit pipeline
  logic          pv   [LAT];
  elem_t         pd   [LAT];
  logic [NW-1:0] pi   [LAT];

  logic accept, to_fu;
  assign in_ready = active && !draining && !(acc_v[ptr] && busy[ptr]);
  assign accept   = in_valid && in_ready;
  assign to_fu    = accept && acc_v[ptr];

  elem_t combined;
  logic  any;
  always_comb begin
    combined = '0;
    any      = 1'b0;
    for (int i = 0; i < N; i++) begin
      if (acc_v[i]) begin
        combined = any ? red_op(op_q, acc[i], combined) : acc[i];
        any      = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active <= 1'b0; draining <= 1'b0; acc_v <= '0; busy <= '0; ptr <= '0;
      out_valid <= 1'b0; out_empty <= 1'b0; out_data <= '0;
      op_q <= OP_REDSUM;
      for (int i = 0; i < LAT; i++) pv[i] <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      // pipeline advance
      pv[0] <= to_fu;
      pd[0] <= red_op(op_q, acc[ptr], in_data);
      pi[0] <= ptr;
      for (int i = 1; i < LAT; i++) begin
        pv[i] <= pv[i-1]; pd[i] <= pd[i-1]; pi[i] <= pi[i-1];
      end
      if (pv[LAT-1]) begin
        acc[pi[LAT-1]]  <= pd[LAT-1];
        busy[pi[LAT-1]] <= 1'b0;
      end
      if (start) begin
        active   <= 1'b1;
        draining <= 1'b0;
        op_q     <= op;
        ptr      <= '0;
        busy     <= '0;
        acc_v    <= has_init ? N'(1) : '0;
        acc[0]   <= init;
      end else if (accept) begin
        if (!acc_v[ptr]) begin
          acc[ptr]   <= in_data;
          acc_v[ptr] <= 1'b1;
        end else begin
          busy[ptr]  <= 1'b1;
        end
        ptr <= (ptr == NW'(N - 1)) ? '0 : ptr + 1'b1;
        if (in_last) draining <= 1'b1;
      end else if (active && draining && busy == '0 && !pv[LAT-1]) begin
        active    <= 1'b0;
        draining  <= 1'b0;
        out_valid <= 1'b1;
        out_empty <= !any;
        out_data  <= combined;
      end
    end
  end
endmodule
