// unpacker: classifies and decodes a vector instruction for the rest of the
// unit (combinational).
//
// Input: the 32-bit RVV 0.7.1 encoding with its scalar operand, sb_id and the
// v_csr snapshot sent by the scalar core.  Output: a dec_inst_t with the class
// (arithmetic, load, store, fast move, illegal), the lane operation, element
// width, memory addressing mode, register numbers, which operands are read and
// the vector length (vl from v_csr, clipped to the register size for the SEW).
// Supported here: OP-V integer vadd/vsub/vand/vor/vxor/vmin/vmax (.vv/.vx/.vi),
// vmul, vmacc, vmv.v.v/.v.x/.v.i, vslideup/vslidedown (.vx/.vi), vredsum,
// vredmax, vredmin; vle/vlse/vlxe and vse/vsse with 64-bit elements.
// vmv.v.v becomes a fast move resolved in the renaming unit.  Anything else,
// a masked instruction (the mask register file is not part of this design),
// vill set or LMUL other than 1 is flagged illegal.  The field layout is the
// RISC-V vector specification's; the subset and the control-bit format are
// this design's.
module unpacker
  import vpu_pkg::*;
(
  input  logic [31:0] inst,
  input  elem_t       scalar,
  input  sbid_t       sb_id,
  input  logic [39:0] v_csr,
  output dec_inst_t   dec
);
  localparam logic [6:0] OPC_V   = 7'b1010111;
  localparam logic [6:0] OPC_LD  = 7'b0000111;
  localparam logic [6:0] OPC_ST  = 7'b0100111;

  logic [5:0] f6;
  logic [2:0] f3;
  logic       vm;
  logic [2:0] mop;
  logic [14:0] vl_csr;
  sew_e       sew;
  vl_t        vlmax;

  always_comb begin
    f6     = inst[31:26];
    vm     = inst[25];
    f3     = inst[14:12];
    mop    = inst[28:26];
    vl_csr = v_csr[CSR_VL_LSB +: CSR_VL_W];
    sew    = sew_e'(v_csr[CSR_SEW_LSB +: 2]);
    vlmax  = vl_t'((MVL * 8) >> sew);

    dec            = '0;
    dec.sb_id      = sb_id;
    dec.cls        = CLS_ILLEGAL;
    dec.op         = OP_ADD;
    dec.sew        = sew;
    dec.mop        = MOP_UNIT;
    dec.vd         = inst[11:7];
    dec.vs1        = inst[19:15];
    dec.vs2        = inst[24:20];
    dec.vl         = (vl_csr > 15'(vlmax)) ? vlmax : vl_t'(vl_csr);
    // .vi: sign-extended 5-bit immediate; slides use it unsigned
    dec.scalar     = (f3 == 3'b011) ?
                     ((f6 inside {6'b001110, 6'b001111}) ? 64'(inst[19:15]) : {{59{inst[19]}}, inst[19:15]})
                     : scalar;

    unique case (inst[6:0])
      OPC_V: begin
        dec.cls        = CLS_ARITH;
        dec.writes_vd  = 1'b1;
        dec.reads_vs2  = 1'b1;
        dec.use_scalar = f3 inside {3'b011, 3'b100, 3'b110};
        dec.reads_vs1  = f3 inside {3'b000, 3'b010};
        unique case (f3)
          3'b000, 3'b011, 3'b100: begin            // OPIVV / OPIVI / OPIVX
            unique case (f6)
              6'b000000: dec.op = OP_ADD;
              6'b000010: dec.op = OP_SUB;
              6'b000101: dec.op = OP_MIN;
              6'b000111: dec.op = OP_MAX;
              6'b001001: dec.op = OP_AND;
              6'b001010: dec.op = OP_OR;
              6'b001011: dec.op = OP_XOR;
              6'b001110: begin
                dec.op = OP_SLIDEUP; dec.reads_vd = 1'b1; dec.reads_vs1 = 1'b0;
                if (f3 == 3'b000) dec.cls = CLS_ILLEGAL;
              end
              6'b001111: begin
                dec.op = OP_SLIDEDOWN; dec.reads_vs1 = 1'b0;
                if (f3 == 3'b000) dec.cls = CLS_ILLEGAL;
              end
              6'b010111: begin                      // vmv.v.*
                dec.op = OP_MV; dec.reads_vs2 = 1'b0;
                if (!vm) dec.cls = CLS_ILLEGAL;
                else if (f3 == 3'b000) dec.cls = CLS_FMOVE;
              end
              default: dec.cls = CLS_ILLEGAL;
            endcase
          end
          3'b010, 3'b110: begin                     // OPMVV / OPMVX
            unique case (f6)
              6'b000000: begin dec.op = OP_REDSUM; if (f3 != 3'b010) dec.cls = CLS_ILLEGAL; end
              6'b000111: begin dec.op = OP_REDMAX; if (f3 != 3'b010) dec.cls = CLS_ILLEGAL; end
              6'b000101: begin dec.op = OP_REDMIN; if (f3 != 3'b010) dec.cls = CLS_ILLEGAL; end
              6'b100101: dec.op = OP_MUL;
              6'b101101: begin dec.op = OP_MACC; dec.reads_vd = 1'b1; end
              default:   dec.cls = CLS_ILLEGAL;
            endcase
          end
          default: dec.cls = CLS_ILLEGAL;
        endcase
        if (is_ring_op(dec.op) && sew != SEW64) dec.cls = CLS_ILLEGAL;
      end
      OPC_LD, OPC_ST: begin
        dec.cls       = (inst[6:0] == OPC_LD) ? CLS_LOAD : CLS_STORE;
        dec.mop       = mop_e'(mop[1:0]);
        dec.writes_vd = (inst[6:0] == OPC_LD);
        dec.reads_vd  = (inst[6:0] == OPC_ST);   // store data register (vs3)
        dec.reads_vs2 = (mop[1:0] == 2'b11);     // index register
        if (f3 != 3'b111 || mop[2] || mop[1:0] == 2'b01 || inst[31:29] != 3'b000)
          dec.cls = CLS_ILLEGAL;
        if (inst[6:0] == OPC_ST && mop[1:0] == 2'b11) dec.cls = CLS_ILLEGAL;
        if (sew != SEW64) dec.cls = CLS_ILLEGAL;   // memory data in 64-bit elements only
      end
      default: dec.cls = CLS_ILLEGAL;
    endcase

    if (!vm && dec.cls != CLS_ILLEGAL) dec.cls = CLS_ILLEGAL;   // masking not supported
    if (v_csr[0] || v_csr[5:4] != 2'b00) dec.cls = CLS_ILLEGAL; // vill, LMUL != 1
    if (dec.cls == CLS_ILLEGAL) begin
      dec.writes_vd = 1'b0; dec.reads_vd = 1'b0; dec.reads_vs1 = 1'b0; dec.reads_vs2 = 1'b0;
    end
  end
endmodule
