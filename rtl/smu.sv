// smu: Store Management Unit.
//
// Handles one vector store at a time.  On start it asks the lanes to read the
// source register out in lane-local order (mrd_start), collects the 64-bit
// elements in element order (element e comes from lane e % 8), packs eight of
// them into a 512-bit line and sends the line to the scalar core on the OVI
// STORE bus.  A line may only be sent while the SMU holds a store credit; it
// starts with CREDITS credits and gets one back on every store_credit pulse,
// so a core that is slow to accept lines stalls the store.  The last line of
// a store with vl not a multiple of 8 is sent partially filled (the core
// knows vl).  The store is complete when all lines are sent and the core
// reports sync_end for its sb_id; the SMU then reports it on cpl_*.
// The OVI STORE bus and credit scheme follow the document; CREDITS and the
// packing of a partial last line are this design's choices.
module smu
  import vpu_pkg::*;
#(
  parameter int unsigned NL      = NUM_LANES,
  parameter int unsigned CREDITS = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start_valid,
  input  sbid_t      start_sb_id,
  input  preg_t      start_preg,
  input  vl_t        start_vl,
  output logic       busy,
  // lanes' memory read port
  output logic       mrd_start,
  output preg_t      mrd_preg,
  output vl_t        mrd_nwords,
  input  logic       mrd_valid [NL],
  input  elem_t      mrd_data  [NL],
  output logic       mrd_ready [NL],
  // OVI STORE
  output logic       store_valid,
  output logic [LINE_W-1:0] store_data,
  input  logic       store_credit,
  // OVI MEMOP sync_end
  input  logic       sync_end,
  input  sbid_t      sync_end_sb_id,
  output logic       cpl_valid,
  output sbid_t      cpl_sb_id,
  output logic       ev_credit_stall   // a full line waits for a credit
);
  localparam int unsigned EPL_LINE = LINE_W / ELEM_W;

  sbid_t sb;
  vl_t   vl, e_cnt, sent;
  logic  end_seen;
  logic [$clog2(CREDITS+1)-1:0] credits;
  logic [LINE_W-1:0] line;
  logic [$clog2(EPL_LINE+1)-1:0] fill;
  logic  line_full;

  // line is full when eight elements were collected or the register ran out
  assign line_full = busy && fill != 0 &&
                     (fill == EPL_LINE || e_cnt == vl);
  wire send = line_full && credits != 0;
  assign ev_credit_stall = line_full && credits == 0;

  wire [LANE_W-1:0] src = LANE_W'(e_cnt);
  wire take = busy && e_cnt < vl && !line_full && mrd_valid[src];

  always_comb
    for (int l = 0; l < NL; l++) mrd_ready[l] = take && src == LANE_W'(l);

  assign mrd_start  = start_valid && !busy;
  assign mrd_preg   = start_preg;
  assign mrd_nwords = start_vl;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0; sb <= '0; vl <= '0; e_cnt <= '0; sent <= '0; end_seen <= 1'b0;
      credits <= CREDITS[$clog2(CREDITS+1)-1:0]; line <= '0; fill <= '0;
      store_valid <= 1'b0; store_data <= '0; cpl_valid <= 1'b0; cpl_sb_id <= '0;
    end else begin
      store_valid <= 1'b0;
      cpl_valid   <= 1'b0;
      credits <= credits + (store_credit ? 1'b1 : 1'b0) - (send ? 1'b1 : 1'b0);
      if (start_valid && !busy) begin
        busy <= 1'b1; sb <= start_sb_id; vl <= start_vl;
        e_cnt <= '0; sent <= '0; end_seen <= 1'b0; fill <= '0; line <= '0;
      end
      if (busy) begin
        if (sync_end && sync_end_sb_id == sb) end_seen <= 1'b1;
        if (take) begin
          line[fill*ELEM_W +: ELEM_W] <= mrd_data[src];
          fill  <= fill + 1'b1;
          e_cnt <= e_cnt + 1'b1;
        end
        if (send) begin
          store_valid <= 1'b1;
          store_data  <= line;
          fill <= '0;
          line <= '0;
          sent <= sent + vl_t'(fill);
        end
        if (sent == vl && (end_seen || (sync_end && sync_end_sb_id == sb))) begin
          busy <= 1'b0;
          cpl_valid <= 1'b1;
          cpl_sb_id <= sb;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(store_credit && credits == CREDITS && !send))
    else $error("smu: more store credits returned than given");
endmodule
