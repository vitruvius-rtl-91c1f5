// renaming_unit: vector register renaming with fast moves.
//
// Holds the Register Alias Table (RAT: last physical register given to each
// of the 32 logical registers), the Free Register List (FRL, here one bit per
// physical register; the lowest free one is taken), an alias counter per
// physical register and the element table (valid-element count of each
// logical register the last time it was written).
//
// Normal instruction (one cycle): sources are looked up in the RAT, a writing
// instruction takes a free physical register for vd, the old mapping (pold)
// travels with it so the ROB can release it at commit, the element table
// entry of vd becomes vl, and clr_valid tells the lanes that the new register
// is being (re)written.  A ROB entry is opened for every instruction.  The
// stage stalls while no register is free, the ROB is full or the output is
// not taken.
//
// Fast move (vmv.v.v vd, vs1), resolved entirely here in three cycles:
// cycle 1 reads RAT[vs1] and RAT[vd]; cycle 2 points RAT[vd] at RAT[vs1],
// increments that register's alias counter and sets the element table entry
// of vd to the smaller of vl and vs1's entry; cycle 3 reports the instruction
// complete (cpl_valid) without sending it to the lanes.  Illegal instructions
// are reported complete the same way, flagged.
//
// Release at commit: a register with a non-zero alias counter has it
// decremented, otherwise it returns to the FRL.
// Reset: logical register i maps to physical register i, registers 32..39 are
// free, all counters zero and element entries MVL.
// Structures and fast-move timing follow the document; the pick-lowest FRL and
// the handshakes are this design's.
module renaming_unit
  import vpu_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  dec_inst_t in,
  output logic      in_ready,
  output logic      out_valid,
  output ren_inst_t out,
  input  logic      out_ready,
  // ROB allocation
  output logic      rob_alloc,
  output sbid_t     rob_sb_id,
  output logic      rob_has_old,
  output preg_t     rob_pold,
  input  logic      rob_ready,
  // completion of instructions resolved here (fast moves, illegal)
  output logic      cpl_valid,
  output sbid_t     cpl_sb_id,
  output logic      cpl_illegal,
  // new register allocated: lanes clear its ready bits
  output logic      clr_valid,
  output preg_t     clr_preg,
  // release at commit
  input  logic      rel_valid,
  input  preg_t     rel_preg,
  // observation: fast move completed; element table entry of a logical register
  output logic      ev_fast_move,
  input  lreg_t     et_lreg,
  output vl_t       et_elems
);
  preg_t                rat      [NUM_LREGS];
  logic [NUM_PREGS-1:0] free;
  logic [2:0]           alias_c  [NUM_PREGS];
  vl_t                  elem_tab [NUM_LREGS];

  typedef enum logic [1:0] {FM_IDLE, FM_READ, FM_WRITE, FM_DONE} fm_st_e;
  fm_st_e fm_st;
  preg_t  fm_src;
  dec_inst_t fm_inst;

  // lowest free register
  logic  have_free;
  preg_t new_p;
  always_comb begin
    have_free = 1'b0;
    new_p     = '0;
    for (int p = NUM_PREGS - 1; p >= 0; p--)
      if (free[p]) begin have_free = 1'b1; new_p = preg_t'(p); end
  end

  logic is_fm, is_ill, go;
  assign is_fm  = in.cls == CLS_FMOVE;
  assign is_ill = in.cls == CLS_ILLEGAL;
  // a normal instruction passes when the output register is free or leaving
  logic out_free;
  assign out_free = !out_valid || out_ready;
  assign in_ready = rob_ready && fm_st == FM_IDLE &&
                    (is_fm ? 1'b1 : is_ill ? 1'b1 : (out_free && (!in.writes_vd || have_free)));
  assign go       = in_valid && in_ready;

  assign et_elems    = elem_tab[et_lreg];
  assign rob_alloc   = go;
  assign rob_sb_id   = in.sb_id;
  assign rob_has_old = (in.writes_vd && !is_ill) || is_fm;
  assign rob_pold    = rat[in.vd];

  assign clr_valid = go && !is_fm && !is_ill && in.writes_vd;
  assign clr_preg  = new_p;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_LREGS; i++) begin
        rat[i] <= preg_t'(i);
        elem_tab[i] <= vl_t'(MVL);
      end
      for (int p = 0; p < NUM_PREGS; p++) alias_c[p] <= '0;
      free <= {{(NUM_PREGS - NUM_LREGS){1'b1}}, {NUM_LREGS{1'b0}}};
      out_valid <= 1'b0; out <= '0;
      fm_st <= FM_IDLE; fm_src <= '0; fm_inst <= '0;
      cpl_valid <= 1'b0; cpl_sb_id <= '0; cpl_illegal <= 1'b0;
      ev_fast_move <= 1'b0;
    end else begin
      cpl_valid    <= 1'b0;
      cpl_illegal  <= 1'b0;
      ev_fast_move <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;

      // release first, so a register freed and taken in one cycle stays taken
      if (rel_valid) begin
        if (alias_c[rel_preg] != 0) alias_c[rel_preg] <= alias_c[rel_preg] - 1'b1;
        else                        free[rel_preg]    <= 1'b1;
      end

      if (go) begin
        if (is_ill) begin
          cpl_valid   <= 1'b1;
          cpl_sb_id   <= in.sb_id;
          cpl_illegal <= 1'b1;
        end else if (is_fm) begin
          fm_inst <= in;
          fm_st   <= FM_READ;
        end else begin
          out_valid <= 1'b1;
          out.d     <= in;
          out.pvs1  <= rat[in.vs1];
          out.pvs2  <= rat[in.vs2];
          out.pold  <= rat[in.vd];
          out.pvd   <= in.writes_vd ? new_p : rat[in.vd];
          if (in.writes_vd) begin
            rat[in.vd]      <= new_p;
            free[new_p]     <= 1'b0;
            elem_tab[in.vd] <= in.vl;
          end
        end
      end

      unique case (fm_st)
        FM_READ: begin
          fm_src <= rat[fm_inst.vs1];
          fm_st  <= FM_WRITE;
        end
        FM_WRITE: begin
          rat[fm_inst.vd]      <= fm_src;
          alias_c[fm_src]      <= alias_c[fm_src] + 1'b1 - ((rel_valid && rel_preg == fm_src && alias_c[fm_src] != 0) ? 1'b1 : 1'b0);
          elem_tab[fm_inst.vd] <= (fm_inst.vl < elem_tab[fm_inst.vs1]) ? fm_inst.vl : elem_tab[fm_inst.vs1];
          fm_st <= FM_DONE;
        end
        FM_DONE: begin
          cpl_valid    <= 1'b1;
          cpl_sb_id    <= fm_inst.sb_id;
          ev_fast_move <= 1'b1;
          fm_st        <= FM_IDLE;
        end
        default: ;
      endcase
    end
  end
endmodule
