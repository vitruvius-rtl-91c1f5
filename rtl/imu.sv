// imu: Index Management Unit.
//
// For an indexed (gather) load the scalar core needs the index of every
// element before it can fetch the data.  The IMU reads the index register out
// of the lanes (the same lane read port the SMU uses), in element order, and
// sends one 65-bit item per element on the OVI MASK_IDX bus: bit 64 is the
// mask bit (always 1, masking is not supported) and bits 63:0 the index.
// Items are sent under credits: the IMU starts with CREDITS and gets one back
// on every mask_idx_credit pulse.  last_idx marks the final item.  The data
// then come back on the LOAD bus and are handled by the LMU like any load.
// The bus and credits follow the document; the item layout and CREDITS are
// this design's choices.
module imu
  import vpu_pkg::*;
#(
  parameter int unsigned NL      = NUM_LANES,
  parameter int unsigned CREDITS = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start_valid,
  input  preg_t      start_preg,
  input  vl_t        start_vl,
  output logic       busy,
  output logic       mrd_start,
  output preg_t      mrd_preg,
  output vl_t        mrd_nwords,
  input  logic       mrd_valid [NL],
  input  elem_t      mrd_data  [NL],
  output logic       mrd_ready [NL],
  // OVI MASK_IDX
  output logic       item_valid,
  output logic [ELEM_W:0] item,
  output logic       last_idx,
  input  logic       mask_idx_credit
);
  vl_t  vl, e_cnt;
  logic [$clog2(CREDITS+1)-1:0] credits;

  wire [LANE_W-1:0] src = LANE_W'(e_cnt);
  wire take = busy && e_cnt < vl && credits != 0 && mrd_valid[src];

  always_comb
    for (int l = 0; l < NL; l++) mrd_ready[l] = take && src == LANE_W'(l);

  assign mrd_start  = start_valid && !busy;
  assign mrd_preg   = start_preg;
  assign mrd_nwords = start_vl;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0; vl <= '0; e_cnt <= '0;
      credits <= CREDITS[$clog2(CREDITS+1)-1:0];
      item_valid <= 1'b0; item <= '0; last_idx <= 1'b0;
    end else begin
      item_valid <= 1'b0;
      last_idx   <= 1'b0;
      credits <= credits + (mask_idx_credit ? 1'b1 : 1'b0) - (take ? 1'b1 : 1'b0);
      if (start_valid && !busy) begin
        busy <= start_vl != 0; vl <= start_vl; e_cnt <= '0;
      end
      if (take) begin
        item_valid <= 1'b1;
        item       <= {1'b1, mrd_data[src]};
        last_idx   <= e_cnt + 1 == vl;
        e_cnt      <= e_cnt + 1'b1;
        if (e_cnt + 1 == vl) busy <= 1'b0;
      end
    end
  end
endmodule
