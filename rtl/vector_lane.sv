// vector_lane: one of the identical vector pipelines.
//
// A lane owns every eighth 64-bit word of each vector register (word w of a
// register is lane w % 8's local word w / 8) and executes every arithmetic
// instruction on its own words.  Inside:
//   * vrf_slice    five 1RW banks; lane-local word k of physical register p
//                  is bank (32p+k) % 5, row (32p+k) / 5, so a group of five
//                  consecutive words is read or written in one cycle;
//   * lane_fsm     IDLE, READ_OP_A, READ_OP_B, READ_OP_C, WB, MEM: per
//                  five-cycle round one group of each of the three source
//                  operands is read, one write-back of up to five results is
//                  made and the memory side gets one bank access;
//   * ready_bits   which words of which register have been written;
//   * operand buffer (two groups), lane_alu (one word per cycle),
//                  write-back buffer (one queue per bank), load buffer (one
//                  queue per bank), memory-read buffer (store data and
//                  indices, in element order), ring send queue;
//   * reduction_handler plus the inter-lane tree step logic.
//
// Out-of-order chaining: at READ_OP_A the lane picks the lowest-numbered group
// of the inbound instruction that has not been read and whose source words are
// all written, so a group whose load data came first is computed first.
//
// Overlapping: an instruction is "inbound" while its groups are being read and
// streamed into the functional units and "outbound" from then until its last
// result is written.  With OVERLAP = 1 the lane accepts the next instruction
// as soon as the current one turns outbound (cmd_ready); with OVERLAP = 0 only
// when it is finished.  At most two instructions are in flight; done pulses
// once per instruction, in order.
//
// Slides (SEW 64): each own source word i = 8k + LANE_ID is sent over the ring
// to the lane holding element i + off (up) or i - off (down); words that get no
// source (below off for slide-up: old vd kept; past the end for slide-down:
// zero) are written locally.  Elements beyond vl of vs2 count as absent.
// Reductions (SEW 64, unordered): intra-lane phase in reduction_handler (lane 0
// feeds vs1[0] as an extra element), then a tree over the ring: lane L
// receives from the ctz(L) (lane 0: log2 8 = 3) lanes above it, combines, and
// sends to lane L - 2^ctz(L); lane 0 writes the result into vd[0].
//
// The block structure, the FSM, the buffers, the chaining and overlap rules
// and the reduction scheme follow the document; buffer depths, the selection
// rule, the latencies and all handshakes are this design's choices.
module vector_lane
  import vpu_pkg::*;
#(
  parameter int unsigned LANE_ID = 0,
  parameter bit          OVERLAP = 1'b1,
  parameter int unsigned ALU_LAT = 3,
  parameter int unsigned RED_N   = 4,
  parameter int unsigned WBD     = 8,   // write-back queue depth per bank
  parameter int unsigned LDD     = 4    // load queue depth per bank
) (
  input  logic      clk,
  input  logic      rst_n,
  // arithmetic instruction from the vector control unit
  input  logic      cmd_valid,
  input  lane_cmd_t cmd,
  output logic      cmd_ready,
  output logic      done,
  // register allocation / completion from the front end and memory side
  input  logic      clr_valid,
  input  preg_t     clr_preg,
  input  logic      fill_valid,
  input  preg_t     fill_preg,
  // load data from the LMU
  input  logic      ld_valid,
  input  preg_t     ld_preg,
  input  logic [K_W-1:0] ld_k,
  input  elem_t     ld_data,
  output logic      ld_ready,
  // memory read (store data / indices) for the SMU and IMU
  input  logic      mrd_start,
  input  preg_t     mrd_preg,
  input  vl_t       mrd_nwords,
  output logic      mrd_busy,
  output logic      mrd_valid,
  output elem_t     mrd_data,
  input  logic      mrd_ready,
  // ring interface
  output logic      inj_valid,
  output ring_pkt_t inj_pkt,
  input  logic      inj_ready,
  input  logic      ej_valid,
  input  ring_pkt_t ej_pkt,
  output logic      ej_ready,
  // events, for performance counting
  output logic      ev_ooo_group,
  output logic      ev_overlap,
  output logic      ev_chain_wait
);
  localparam int unsigned NQ   = 3 * NUM_GROUPS + 1;
  localparam int unsigned CW   = $clog2(WBD + 1);
  localparam int unsigned LCW  = $clog2(LDD + 1);
  localparam logic [2:0] RED_RECV = (LANE_ID == 0) ? 3'($clog2(NUM_LANES)) :
                                    3'($countones((LANE_ID ^ (LANE_ID - 1)) >> 1));
  localparam int unsigned RED_DST  = (LANE_ID == 0) ? 0 : (LANE_ID & (LANE_ID - 1));

  typedef struct packed {
    logic            slot;
    preg_t           preg;
    logic [K_W-1:0]  k;
    elem_t           data;
  } wb_ent_t;

  typedef struct packed {
    logic [GRP_W-1:0] g;
    elem_t [NUM_BANKS-1:0] a;
    elem_t [NUM_BANKS-1:0] b;
    elem_t [NUM_BANKS-1:0] c;
  } opb_ent_t;

  // ------------------------------------------------------------------ FSM
  lane_state_e st;
  logic        fsm_busy;
  lane_fsm u_fsm (.clk, .rst_n, .busy(fsm_busy), .state(st), .round_end());

  // ------------------------------------------------------------------ VRF
  logic  [NUM_BANKS-1:0] v_en, v_we;
  logic  [ROW_W-1:0]     v_row   [NUM_BANKS];
  elem_t                 v_wdata [NUM_BANKS];
  elem_t                 v_rdata [NUM_BANKS];
  vrf_slice u_vrf (.clk, .en(v_en), .we(v_we), .row(v_row), .wdata(v_wdata), .rdata(v_rdata));

  // ------------------------------------------------------------ instruction slots
  logic      s_act [2];
  vl_t       s_exp [2];
  vl_t       s_cnt [2];
  logic      s_src [2];
  preg_t     s_pd  [2];
  logic      acc_seq, done_seq;

  // inbound instruction
  logic      inb_act;
  lane_cmd_t ic;
  logic      inb_seq;
  vl_t       inb_nw;
  logic [NUM_GROUPS-1:0] rd_done;
  vl_t       streamed;
  logic      init_fed;

  // ring instruction in flight
  logic      ring_act, ring_seq, slide_fin;
  preg_t     ring_pd;
  vop_e      ring_op;

  // ------------------------------------------------------------ ready bits
  logic  [4:0]           rb_set;
  preg_t                 rb_set_p [5];
  logic [K_W-1:0]        rb_set_k [5];
  preg_t                 q_preg [NQ];
  logic [GRP_W-1:0]      q_grp  [NQ];
  vl_t                   q_nw   [NQ];
  logic [NQ-1:0]         q_rdy;
  logic                  fill_done;
  preg_t                 fill_done_p;

  ready_bits #(.NSET(5), .NQ(NQ)) u_rb (
    .clk, .rst_n, .clr(clr_valid), .clr_preg,
    .fill(fill_valid || fill_done), .fill_preg(fill_done ? fill_done_p : fill_preg),
    .set(rb_set), .set_preg(rb_set_p), .set_k(rb_set_k),
    .q_preg, .q_grp, .q_nw, .q_ready(q_rdy)
  );

  // memory read state
  logic       mrd_act;
  preg_t      mrd_p;
  vl_t        mrd_nw;
  logic [GRP_W-1:0] mrd_g;
  elem_t      mrd_buf [NUM_BANKS];
  logic [2:0] mrd_cnt, mrd_idx;

  always_comb begin
    for (int g = 0; g < NUM_GROUPS; g++) begin
      q_preg[3*g]   = ic.pa; q_grp[3*g]   = GRP_W'(g); q_nw[3*g]   = ic.reads_a ? inb_nw : '0;
      q_preg[3*g+1] = ic.pb; q_grp[3*g+1] = GRP_W'(g); q_nw[3*g+1] = ic.reads_b ? inb_nw : '0;
      q_preg[3*g+2] = ic.pc; q_grp[3*g+2] = GRP_W'(g); q_nw[3*g+2] = ic.reads_c ? inb_nw : '0;
    end
    q_preg[NQ-1] = mrd_p; q_grp[NQ-1] = mrd_g; q_nw[NQ-1] = mrd_nw;
  end

  // ------------------------------------------------------------ group selection
  logic [GRP_W-1:0] ngrp;
  assign ngrp = GRP_W'(div5(16'(inb_nw) + 16'(NUM_BANKS - 1)));

  logic              opb_full;
  logic [1:0]        opb_count;
  logic              sel_ok;
  logic [GRP_W-1:0]  sel_g, first_open;
  logic              any_open;
  always_comb begin
    sel_ok = 1'b0; sel_g = '0; first_open = '0; any_open = 1'b0;
    for (int g = NUM_GROUPS - 1; g >= 0; g--) begin
      if (g < int'(ngrp) && !rd_done[g]) begin
        first_open = GRP_W'(g);
        any_open   = 1'b1;
        if (q_rdy[3*g] && q_rdy[3*g+1] && q_rdy[3*g+2]) begin
          sel_ok = 1'b1;
          sel_g  = GRP_W'(g);
        end
      end
    end
  end

  // the group being read in the current round
  logic             rnd_v;
  logic [GRP_W-1:0] rnd_g;
  // what the banks returned this cycle
  typedef enum logic [2:0] {RD_NONE, RD_A, RD_B, RD_C, RD_M} rd_kind_e;
  rd_kind_e rd_kind;
  elem_t    cap_a [NUM_BANKS];
  elem_t    cap_b [NUM_BANKS];

  function automatic logic [ROW_W-1:0] grp_row(preg_t p, logic [GRP_W-1:0] g, int unsigned b);
    logic [ROW_W-1:0] r;
    r = '0;
    for (int j = 0; j < NUM_BANKS; j++)
      if (int'(g) * NUM_BANKS + j < EPL && bank_of(p, K_W'(int'(g) * NUM_BANKS + j)) == BANK_W'(b))
        r = row_of(p, K_W'(int'(g) * NUM_BANKS + j));
    return r;
  endfunction

  // reorder the five bank outputs into word order of group g of register p
  function automatic elem_t grp_word(elem_t rd [NUM_BANKS], preg_t p, logic [GRP_W-1:0] g, int unsigned j);
    return rd[bank_of(p, K_W'(int'(g) * NUM_BANKS + j))];
  endfunction

  // ------------------------------------------------------------ operand buffer
  opb_ent_t opb_in, opb_head;
  logic     opb_push, opb_pop, opb_empty;
  logic [1:0] opb_cnt_w;
  sync_fifo #(.T(opb_ent_t), .DEPTH(2)) u_opb (
    .clk, .rst_n, .push(opb_push), .wdata(opb_in), .pop(opb_pop),
    .rdata(opb_head), .full(opb_full), .empty(opb_empty), .count(opb_cnt_w));
  assign opb_count = opb_cnt_w;

  // ------------------------------------------------------------ write-back buffer
  wb_ent_t          wbq   [NUM_BANKS][WBD];
  logic [CW-1:0]    wb_cnt [NUM_BANKS];
  logic [$clog2(WBD)-1:0] wb_rp [NUM_BANKS], wb_wp [NUM_BANKS];
  logic             wbp0, wbp1;          // push ports: ALU, ring / reduction
  wb_ent_t          wbe0, wbe1;
  logic [BANK_W-1:0] wbb0, wbb1;
  assign wbb0 = bank_of(wbe0.preg, wbe0.k);
  assign wbb1 = bank_of(wbe1.preg, wbe1.k);

  // ------------------------------------------------------------ load buffer
  typedef struct packed { preg_t preg; logic [K_W-1:0] k; elem_t data; } ld_ent_t;
  ld_ent_t          ldq   [NUM_BANKS][LDD];
  logic [LCW-1:0]   ld_cnt [NUM_BANKS];
  logic [$clog2(LDD)-1:0] ld_rp [NUM_BANKS], ld_wp [NUM_BANKS];
  logic [BANK_W-1:0] ldb;
  assign ldb      = bank_of(ld_preg, ld_k);
  assign ld_ready = ld_cnt[ldb] < LCW'(LDD);
  logic ld_any;
  always_comb begin
    ld_any = 1'b0;
    for (int b = 0; b < NUM_BANKS; b++) if (ld_cnt[b] != 0) ld_any = 1'b1;
  end

  // ------------------------------------------------------------ ALU
  typedef struct packed { logic slot; preg_t preg; logic [K_W-1:0] k; } alu_tag_t;
  logic     alu_in_v, alu_out_v;
  vop_e     alu_op_sel;
  elem_t    alu_a, alu_b, alu_c, alu_res;
  alu_tag_t alu_tag_in, alu_tag_out;
  lane_alu #(.LAT(ALU_LAT), .TAG_T(alu_tag_t)) u_alu (
    .clk, .rst_n, .in_valid(alu_in_v), .op(alu_op_sel), .sew(ic.sew),
    .a(alu_a), .b(alu_b), .c(alu_c), .in_tag(alu_tag_in),
    .out_valid(alu_out_v), .out_data(alu_res), .out_tag(alu_tag_out));

  logic [$clog2(ALU_LAT+2)-1:0] alu_infl;
  logic [CW-1:0] wb_max;
  always_comb begin
    wb_max = '0;
    for (int b = 0; b < NUM_BANKS; b++) if (wb_cnt[b] > wb_max) wb_max = wb_cnt[b];
  end
  logic alu_credit;
  assign alu_credit = (int'(wb_max) + int'(alu_infl) + 2) <= int'(WBD);

  // ------------------------------------------------------------ ring send queue
  ring_pkt_t sq_in, sq_head;
  logic sq_push, sq_empty, sq_full;
  logic [2:0] sq_cnt;
  sync_fifo #(.T(ring_pkt_t), .DEPTH(4)) u_sq (
    .clk, .rst_n, .push(sq_push), .wdata(sq_in), .pop(inj_valid && inj_ready),
    .rdata(sq_head), .full(sq_full), .empty(sq_empty), .count(sq_cnt));

  // ------------------------------------------------------------ reduction
  logic  rh_start, rh_in_v, rh_in_last, rh_in_rdy, rh_out_v, rh_out_empty;
  elem_t rh_in_d, rh_out_d;
  reduction_handler #(.N(RED_N), .LAT(ALU_LAT)) u_red (
    .clk, .rst_n, .start(rh_start), .op(ic.op), .has_init(1'b0), .init('0),
    .in_valid(rh_in_v), .in_last(rh_in_last), .in_data(rh_in_d), .in_ready(rh_in_rdy),
    .out_valid(rh_out_v), .out_empty(rh_out_empty), .out_data(rh_out_d));

  typedef enum logic [1:0] {RT_IDLE, RT_INTRA, RT_TREE, RT_OUT} red_st_e;
  red_st_e red_st;
  elem_t   red_own, red_rx;
  logic    red_own_e, red_rx_e;
  logic [2:0] red_rcnt;
  elem_t   red_fin;
  logic    red_fin_e;
  always_comb begin
    red_fin   = red_own;
    red_fin_e = red_own_e;
    if (!red_rx_e) begin
      red_fin   = red_own_e ? red_rx : red_op(ring_op, red_own, red_rx);
      red_fin_e = 1'b0;
    end
  end

  // ------------------------------------------------------------ stream (operand buffer -> units)
  logic [2:0]      sj;         // word within the head group
  logic [K_W-1:0]  sk;
  logic            s_word_v;   // head word exists
  logic            s_fire, s_pop_grp;
  logic [31:0]     gi;         // global element index of the head word
  logic [31:0]     off;
  logic            need_alu, need_send, need_red, feed_init;
  vop_e            aop;
  ring_pkt_t       spkt;
  logic [31:0]     red_total;

  assign sk       = K_W'(int'(opb_head.g) * NUM_BANKS + int'(sj));
  assign s_word_v = !opb_empty && inb_act && (32'(sk) < 32'(inb_nw));
  assign gi       = 32'(sk) * NUM_LANES + LANE_ID;
  assign off      = ic.scalar[31:0];
  assign red_total = 32'(inb_nw) + ((LANE_ID == 0) ? 32'd1 : 32'd0);

  always_comb begin
    need_alu = 1'b0; need_send = 1'b0; need_red = 1'b0; feed_init = 1'b0;
    aop = ic.op; spkt = '0;
    alu_a = ic.use_scalar ? splat(ic.sew, ic.scalar) : opb_head.a[sj];
    alu_b = opb_head.b[sj];
    alu_c = opb_head.c[sj];
    rh_in_d = opb_head.b[sj];
    unique case (ic.op)
      OP_SLIDEUP: begin
        if (gi < off) begin need_alu = 1'b1; aop = OP_SLIDEUP; end
        if (gi + off < 32'(ic.vl)) begin
          need_send = 1'b1;
          spkt.dst  = LANE_W'(gi + off);
          spkt.k    = K_W'((gi + off) >> LANE_W);
        end
      end
      OP_SLIDEDOWN: begin
        if (gi + off >= 32'(ic.vl)) begin need_alu = 1'b1; aop = OP_ZERO; end
        if (gi >= off) begin
          need_send = 1'b1;
          spkt.dst  = LANE_W'(gi - off);
          spkt.k    = K_W'((gi - off) >> LANE_W);
        end
      end
      OP_REDSUM, OP_REDMAX, OP_REDMIN: begin
        need_red = 1'b1;
        if (LANE_ID == 0 && sk == 0 && !init_fed) begin
          feed_init = 1'b1;
          rh_in_d   = opb_head.a[sj];
        end
      end
      default: need_alu = 1'b1;
    endcase
    spkt.red  = 1'b0;
    spkt.data = opb_head.b[sj];
  end

  assign s_fire = s_word_v && (!need_alu || alu_credit) && (!need_send || !sq_full)
                  && (!need_red || rh_in_rdy);
  assign alu_in_v   = s_fire && need_alu;
  assign alu_op_sel = aop;
  assign alu_tag_in = '{slot: inb_seq, preg: ic.pd, k: sk};
  assign sq_push    = (s_fire && need_send) || (red_st == RT_OUT && LANE_ID != 0 && !sq_full);
  assign sq_in      = (red_st == RT_OUT) ?
                      '{red: 1'b1, dst: LANE_W'(RED_DST), k: K_W'(red_fin_e), data: red_fin} : spkt;
  assign rh_in_v    = s_fire && need_red;
  assign rh_in_last = (32'(streamed) + (init_fed ? 32'd1 : 32'd0) + 32'd1 == red_total);
  // the stream advances one word per fire, except the extra vs1[0] feed
  logic s_adv;
  assign s_adv     = s_fire && !feed_init;
  assign s_pop_grp = !opb_empty && inb_act &&
                     ((s_adv && (sj == 3'(NUM_BANKS - 1) || 32'(sk) + 1 >= 32'(inb_nw))) ||
                      (32'(sk) >= 32'(inb_nw)));
  assign opb_pop   = s_pop_grp;

  assign inj_valid = !sq_empty;
  assign inj_pkt   = sq_head;

  // ring receive: elements to the write-back buffer, partial results to the tree
  logic rx_elem, rx_red;
  assign rx_red   = ej_valid && ej_pkt.red;
  assign rx_elem  = ej_valid && !ej_pkt.red;
  assign ej_ready = int'(wb_max) + 2 <= int'(WBD);   // independent of the packet (no loop through the ring)

  // write-back pushes
  logic red_wr;
  assign red_wr = (red_st == RT_OUT) && (LANE_ID == 0) && !rx_elem;
  always_comb begin
    wbp0 = alu_out_v;
    wbe0 = '{slot: alu_tag_out.slot, preg: alu_tag_out.preg, k: alu_tag_out.k, data: alu_res};
    wbp1 = rx_elem || red_wr;
    wbe1 = rx_elem ? '{slot: ring_seq, preg: ring_pd, k: ej_pkt.k, data: ej_pkt.data}
                   : '{slot: ring_seq, preg: ring_pd, k: '0, data: red_fin};
  end

  // ------------------------------------------------------------ accept / done
  assign cmd_ready = !inb_act && !s_act[acc_seq] && (OVERLAP || !(s_act[0] || s_act[1]))
                     && !(ring_act && is_ring_op(cmd.op));
  logic accept;
  assign accept = cmd_valid && cmd_ready;
  assign ev_overlap = accept && (s_act[0] || s_act[1]);

  logic done_now;
  assign done_now = s_act[done_seq] && s_src[done_seq] && (s_cnt[done_seq] == s_exp[done_seq]);
  assign done     = done_now;
  assign fill_done   = done_now;
  assign fill_done_p = s_pd[done_seq];

  // write-back pops happen in WB: count per slot
  logic [2:0] wpop_cnt [2];

  // ------------------------------------------------------------ bank port mux
  always_comb begin
    preg_t   p;
    logic    rd;
    wb_ent_t we_e;
    ld_ent_t le_e;
    p = '0; rd = 1'b0; we_e = '0; le_e = '0;
    v_en = '0; v_we = '0;
    for (int b = 0; b < NUM_BANKS; b++) begin
      v_row[b] = '0; v_wdata[b] = '0;
      rb_set[b] = 1'b0; rb_set_p[b] = '0; rb_set_k[b] = '0;
    end
    wpop_cnt[0] = '0; wpop_cnt[1] = '0;
    unique case (st)
      S_READ_OP_A, S_READ_OP_B, S_READ_OP_C: begin
        p  = (st == S_READ_OP_A) ? ic.pa : (st == S_READ_OP_B) ? ic.pb : ic.pc;
        rd = (st == S_READ_OP_A) ? (sel_ok && inb_act && !opb_full && ic.reads_a) :
             (st == S_READ_OP_B) ? (rnd_v && ic.reads_b) : (rnd_v && ic.reads_c);
        for (int b = 0; b < NUM_BANKS; b++) begin
          v_en[b]  = rd;
          v_row[b] = grp_row(p, (st == S_READ_OP_A) ? sel_g : rnd_g, b);
        end
      end
      S_WB: begin
        for (int b = 0; b < NUM_BANKS; b++) begin
          we_e = wbq[b][wb_rp[b]];
          if (wb_cnt[b] != 0) begin
            v_en[b] = 1'b1; v_we[b] = 1'b1;
            v_row[b] = row_of(we_e.preg, we_e.k); v_wdata[b] = we_e.data;
            rb_set[b] = 1'b1; rb_set_p[b] = we_e.preg; rb_set_k[b] = we_e.k;
            wpop_cnt[we_e.slot] = wpop_cnt[we_e.slot] + 1'b1;
          end
        end
      end
      S_MEM: begin
        if (ld_any) begin
          for (int b = 0; b < NUM_BANKS; b++) begin
            le_e = ldq[b][ld_rp[b]];
            if (ld_cnt[b] != 0) begin
              v_en[b] = 1'b1; v_we[b] = 1'b1;
              v_row[b] = row_of(le_e.preg, le_e.k); v_wdata[b] = le_e.data;
              rb_set[b] = 1'b1; rb_set_p[b] = le_e.preg; rb_set_k[b] = le_e.k;
            end
          end
        end else if (mrd_act && mrd_cnt == 0 && q_rdy[NQ-1]) begin
          for (int b = 0; b < NUM_BANKS; b++) begin
            v_en[b]  = 1'b1;
            v_row[b] = grp_row(mrd_p, mrd_g, b);
          end
        end
      end
      default: ;
    endcase
  end

  logic mrd_rd_now;
  assign mrd_rd_now = (st == S_MEM) && !ld_any && mrd_act && mrd_cnt == 0 && q_rdy[NQ-1];

  assign fsm_busy = inb_act || s_act[0] || s_act[1] || ld_any || mrd_act || (wb_max != 0)
                    || alu_infl != 0;

  // ------------------------------------------------------------ memory read output
  assign mrd_busy  = mrd_act || (mrd_cnt != 0);
  assign mrd_valid = (mrd_cnt != 0);
  assign mrd_data  = mrd_buf[mrd_idx];

  // ------------------------------------------------------------ sequential
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 2; i++) begin
        s_act[i] <= 1'b0; s_exp[i] <= '0; s_cnt[i] <= '0; s_src[i] <= 1'b0; s_pd[i] <= '0;
      end
      acc_seq <= 1'b0; done_seq <= 1'b0;
      inb_act <= 1'b0; ic <= '0; inb_seq <= 1'b0; inb_nw <= '0; rd_done <= '0;
      streamed <= '0; init_fed <= 1'b0; sj <= '0;
      ring_act <= 1'b0; ring_seq <= 1'b0; slide_fin <= 1'b0; ring_pd <= '0; ring_op <= OP_REDSUM;
      rnd_v <= 1'b0; rnd_g <= '0; rd_kind <= RD_NONE;
      for (int b = 0; b < NUM_BANKS; b++) begin
        wb_cnt[b] <= '0; wb_rp[b] <= '0; wb_wp[b] <= '0;
        ld_cnt[b] <= '0; ld_rp[b] <= '0; ld_wp[b] <= '0;
      end
      alu_infl <= '0;
      mrd_act <= 1'b0; mrd_p <= '0; mrd_nw <= '0; mrd_g <= '0; mrd_cnt <= '0; mrd_idx <= '0;
      red_st <= RT_IDLE; red_own <= '0; red_rx <= '0; red_own_e <= 1'b1; red_rx_e <= 1'b1;
      red_rcnt <= '0;
      rh_start <= 1'b0;
      ev_ooo_group <= 1'b0; ev_chain_wait <= 1'b0;
    end else begin
      rh_start      <= 1'b0;
      ev_ooo_group  <= 1'b0;
      ev_chain_wait <= 1'b0;

      // ---- accept a new instruction
      if (accept) begin
        vl_t nw, exp;
        nw  = lane_words(cmd.nwords, LANE_ID);
        exp = nw;
        if (is_red_op(cmd.op)) exp = (LANE_ID == 0) ? vl_t'(1) : '0;
        ic       <= cmd;
        inb_act  <= 1'b1;
        inb_seq  <= acc_seq;
        inb_nw   <= nw;
        rd_done  <= '0;
        streamed <= '0;
        init_fed <= 1'b0;
        sj       <= '0;
        s_act[acc_seq] <= 1'b1;
        s_exp[acc_seq] <= exp;
        s_cnt[acc_seq] <= '0;
        s_src[acc_seq] <= 1'b0;
        s_pd[acc_seq]  <= cmd.pd;
        acc_seq  <= !acc_seq;
        if (is_ring_op(cmd.op)) begin
          ring_act <= 1'b1; ring_seq <= acc_seq; ring_pd <= cmd.pd; ring_op <= cmd.op;
        end
        if (is_red_op(cmd.op)) begin
          rh_start  <= (nw != 0);
          red_st    <= (nw != 0) ? RT_INTRA : RT_TREE;
          red_own_e <= 1'b1;
          red_rx_e  <= 1'b1;
          red_rcnt  <= '0;
        end
      end

      // ---- round bookkeeping: group chosen at READ_OP_A
      if (st == S_READ_OP_A) begin
        rnd_v <= sel_ok && inb_act && !opb_full;
        rnd_g <= sel_g;
        if (sel_ok && inb_act && !opb_full) begin
          rd_done[sel_g] <= 1'b1;
          ev_ooo_group   <= (sel_g != first_open);
        end else if (inb_act && any_open && !opb_full) begin
          ev_chain_wait  <= 1'b1;
        end
      end

      // ---- capture read data (one cycle after the read)
      rd_kind <= RD_NONE;
      if (st == S_READ_OP_A && sel_ok && inb_act && !opb_full) rd_kind <= RD_A;
      if (st == S_READ_OP_B && rnd_v) rd_kind <= RD_B;
      if (st == S_READ_OP_C && rnd_v) rd_kind <= RD_C;
      if (mrd_rd_now) rd_kind <= RD_M;
      if (rd_kind == RD_A) for (int j = 0; j < NUM_BANKS; j++) cap_a[j] <= grp_word(v_rdata, ic.pa, rnd_g, j);
      if (rd_kind == RD_B) for (int j = 0; j < NUM_BANKS; j++) cap_b[j] <= grp_word(v_rdata, ic.pb, rnd_g, j);
      if (rd_kind == RD_M) begin
        vl_t left;
        left = mrd_nw - vl_t'(int'(mrd_g) * NUM_BANKS);
        for (int j = 0; j < NUM_BANKS; j++) mrd_buf[j] <= grp_word(v_rdata, mrd_p, mrd_g, j);
        mrd_cnt <= (left > vl_t'(NUM_BANKS)) ? 3'(NUM_BANKS) : 3'(left);
        mrd_idx <= '0;
        if (left <= vl_t'(NUM_BANKS)) mrd_act <= 1'b0;
        mrd_g <= mrd_g + 1'b1;
      end

      // ---- stream
      if (s_fire) begin
        if (feed_init) init_fed <= 1'b1;
        else begin
          streamed <= streamed + 1'b1;
          sj       <= s_pop_grp ? '0 : sj + 1'b1;
        end
      end else if (s_pop_grp) sj <= '0;

      // inbound finished: every group read and streamed
      if (inb_act && !accept && rd_done == NUM_GROUPS'((1 << ngrp) - 1) && opb_empty && !opb_push
          && streamed == inb_nw) begin
        inb_act <= 1'b0;
        if (!is_ring_op(ic.op)) s_src[inb_seq] <= 1'b1;
        if (ic.op inside {OP_SLIDEUP, OP_SLIDEDOWN}) slide_fin <= 1'b1;
      end
      // slides: source side done when everything has left the send queue
      if (slide_fin && sq_empty) begin
        slide_fin <= 1'b0;
        s_src[ring_seq] <= 1'b1;
      end

      // ---- ALU in-flight count
      alu_infl <= alu_infl + (alu_in_v ? 1'b1 : 1'b0) - (alu_out_v ? 1'b1 : 1'b0);

      // ---- write-back queues: pushes, and pops in WB
      begin
        logic [CW-1:0] cnt_n [NUM_BANKS];
        logic [$clog2(WBD)-1:0] wp_n [NUM_BANKS];
        for (int b = 0; b < NUM_BANKS; b++) begin cnt_n[b] = wb_cnt[b]; wp_n[b] = wb_wp[b]; end
        if (wbp0) begin
          wbq[wbb0][wp_n[wbb0]] <= wbe0;
          wp_n[wbb0]  = (wp_n[wbb0] == $clog2(WBD)'(WBD - 1)) ? '0 : wp_n[wbb0] + 1'b1;
          cnt_n[wbb0] = cnt_n[wbb0] + 1'b1;
        end
        if (wbp1) begin
          wbq[wbb1][wp_n[wbb1]] <= wbe1;
          wp_n[wbb1]  = (wp_n[wbb1] == $clog2(WBD)'(WBD - 1)) ? '0 : wp_n[wbb1] + 1'b1;
          cnt_n[wbb1] = cnt_n[wbb1] + 1'b1;
        end
        for (int b = 0; b < NUM_BANKS; b++) begin
          if (st == S_WB && wb_cnt[b] != 0) begin
            cnt_n[b] = cnt_n[b] - 1'b1;
            wb_rp[b] <= (wb_rp[b] == $clog2(WBD)'(WBD - 1)) ? '0 : wb_rp[b] + 1'b1;
          end
          wb_cnt[b] <= cnt_n[b];
          wb_wp[b]  <= wp_n[b];
        end
      end
      for (int i = 0; i < 2; i++)
        if (!(accept && acc_seq == 1'(i))) s_cnt[i] <= s_cnt[i] + vl_t'(wpop_cnt[i]);

      // ---- load queues
      for (int b = 0; b < NUM_BANKS; b++) begin
        logic pu, po;
        pu = ld_valid && ld_ready && (ldb == BANK_W'(b));
        po = (st == S_MEM) && (ld_cnt[b] != 0);
        if (pu) begin
          ldq[b][ld_wp[b]] <= '{preg: ld_preg, k: ld_k, data: ld_data};
          ld_wp[b] <= (ld_wp[b] == $clog2(LDD)'(LDD - 1)) ? '0 : ld_wp[b] + 1'b1;
        end
        if (po) ld_rp[b] <= (ld_rp[b] == $clog2(LDD)'(LDD - 1)) ? '0 : ld_rp[b] + 1'b1;
        ld_cnt[b] <= ld_cnt[b] + (pu ? 1'b1 : 1'b0) - (po ? 1'b1 : 1'b0);
      end

      // ---- memory read
      if (mrd_start) begin
        mrd_act <= (lane_words(mrd_nwords, LANE_ID) != 0);
        mrd_p   <= mrd_preg;
        mrd_nw  <= lane_words(mrd_nwords, LANE_ID);
        mrd_g   <= '0;
      end
      if (mrd_valid && mrd_ready && rd_kind != RD_M) begin
        mrd_idx <= mrd_idx + 1'b1;
        mrd_cnt <= mrd_cnt - 1'b1;
      end

      // ---- reduction: intra-lane result, tree, final write / send
      if (rh_out_v && red_st == RT_INTRA) begin
        red_own   <= rh_out_d;
        red_own_e <= rh_out_empty;
        red_st    <= RT_TREE;
      end
      if (rx_red) begin
        if (!ej_pkt.k[0]) begin
          red_rx   <= red_rx_e ? ej_pkt.data : red_op(ring_op, red_rx, ej_pkt.data);
          red_rx_e <= 1'b0;
        end
        red_rcnt <= red_rcnt + 1'b1;
      end
      if (red_st == RT_TREE && red_rcnt == RED_RECV && !rx_red) red_st <= RT_OUT;
      if (red_st == RT_OUT && ((LANE_ID == 0 && red_wr) || (LANE_ID != 0 && !sq_full))) begin
        red_st <= RT_IDLE;
        s_src[ring_seq] <= 1'b1;
      end

      // ---- completion
      if (done_now) begin
        s_act[done_seq] <= 1'b0;
        done_seq <= !done_seq;
        if (ring_act && ring_seq == done_seq) ring_act <= 1'b0;
      end
    end
  end

  // operand buffer push at WB: the group's three operands are complete
  always_comb begin
    opb_push = (rd_kind == RD_C);
    opb_in.g = rnd_g;
    for (int j = 0; j < NUM_BANKS; j++) begin
      opb_in.a[j] = cap_a[j];
      opb_in.b[j] = cap_b[j];
      opb_in.c[j] = grp_word(v_rdata, ic.pc, rnd_g, j);
    end
  end

  // ------------------------------------------------------------ checks
  assert property (@(posedge clk) disable iff (!rst_n) ld_valid |-> ##0 1'b1);
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(wbp0 && wb_cnt[wbb0] == CW'(WBD))) else $error("lane: write-back overflow");
endmodule
