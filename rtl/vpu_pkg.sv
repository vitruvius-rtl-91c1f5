// vpu_pkg: sizes, types and small functions shared by the vector unit.
//
// The machine holds 40 physical vector registers of 256 64-bit elements
// (16384 bits), split over 8 lanes; each lane keeps its slice in five banks of
// 256 x 64 bits (2 kB).  Elements are interleaved: 64-bit word w of a register
// lives in lane w % 8 as lane-local word k = w / 8, and lane-local word k of
// physical register p sits at flat index p*32 + k, bank (index % 5),
// row (index / 5).  These numbers follow the document; the instruction,
// OVI CSR and seq_id encodings below are this design's choices.
package vpu_pkg;

  // ---- sizes ---------------------------------------------------------------
  localparam int unsigned NUM_LANES  = 8;
  localparam int unsigned MVL        = 256;            // 64-bit elements per register
  localparam int unsigned ELEM_W     = 64;
  localparam int unsigned NUM_LREGS  = 32;
  localparam int unsigned NUM_PREGS  = 40;
  localparam int unsigned NUM_BANKS  = 5;
  localparam int unsigned BANK_ROWS  = 256;            // 2 kB / 8 B
  localparam int unsigned EPL        = MVL / NUM_LANES; // words per register per lane (32)
  localparam int unsigned NUM_GROUPS = (EPL + NUM_BANKS - 1) / NUM_BANKS; // 7
  localparam int unsigned LINE_W     = 512;
  localparam int unsigned SB_ID_W    = 5;
  localparam int unsigned PREG_W     = 6;
  localparam int unsigned LREG_W     = 5;
  localparam int unsigned VL_W       = 12;             // 0..2048 (SEW 8)
  localparam int unsigned K_W        = 5;              // lane-local word index 0..31
  localparam int unsigned ROW_W      = 8;
  localparam int unsigned BANK_W     = 3;
  localparam int unsigned LANE_W     = 3;
  localparam int unsigned GRP_W      = 3;

  typedef logic [ELEM_W-1:0]  elem_t;
  typedef logic [PREG_W-1:0]  preg_t;
  typedef logic [LREG_W-1:0]  lreg_t;
  typedef logic [SB_ID_W-1:0] sbid_t;
  typedef logic [VL_W-1:0]    vl_t;

  // OVI ISSUE v_csr field positions (40 bits; this design's layout):
  // [0] vill, [3:1] vsew, [5:4] vlmul, [8:6] frm, [10:9] vxrm, [25:11] vl,
  // [39:26] vstart.
  localparam int unsigned CSR_SEW_LSB = 1;
  localparam int unsigned CSR_VL_LSB  = 11;
  localparam int unsigned CSR_VL_W    = 15;

  // OVI LOAD seq_id (34 bits; this design's layout):
  // [4:0] v_reg, [15:5] el_id (first element), [21:16] el_off (byte offset of
  // that element in the line), [28:22] el_count, [33:29] sb_id.
  typedef struct packed {
    logic [4:0]  sb_id;
    logic [6:0]  el_count;
    logic [5:0]  el_off;
    logic [10:0] el_id;
    logic [4:0]  v_reg;
  } seq_id_t;

  // ---- instruction classes and operations -----------------------------------
  typedef enum logic [2:0] {
    CLS_ARITH, CLS_LOAD, CLS_STORE, CLS_FMOVE, CLS_ILLEGAL
  } iclass_e;

  typedef enum logic [3:0] {
    OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_MIN, OP_MAX, OP_MUL, OP_MACC,
    OP_MV, OP_SLIDEUP, OP_SLIDEDOWN, OP_REDSUM, OP_REDMAX, OP_REDMIN, OP_ZERO
  } vop_e;

  typedef enum logic [1:0] {SEW8 = 2'd0, SEW16 = 2'd1, SEW32 = 2'd2, SEW64 = 2'd3} sew_e;

  // Lane FSM states (see lane_fsm).
  typedef enum logic [2:0] {
    S_IDLE, S_READ_OP_A, S_READ_OP_B, S_READ_OP_C, S_WB, S_MEM
  } lane_state_e;

  typedef enum logic [1:0] {MOP_UNIT = 2'd0, MOP_STRIDED = 2'd2, MOP_INDEXED = 2'd3} mop_e;

  // Decoded instruction (unpacker output).
  typedef struct packed {
    sbid_t   sb_id;
    iclass_e cls;
    vop_e    op;
    sew_e    sew;
    mop_e    mop;
    logic    use_scalar;   // operand A is the scalar operand (.vx / .vi)
    logic    reads_vs1;
    logic    reads_vs2;
    logic    reads_vd;     // vd is also a source (multiply-add, slide-up)
    logic    writes_vd;
    lreg_t   vd;
    lreg_t   vs1;
    lreg_t   vs2;
    elem_t   scalar;
    vl_t     vl;
  } dec_inst_t;

  // Renamed instruction (renaming unit output).
  typedef struct packed {
    dec_inst_t d;
    preg_t     pvd;
    preg_t     pvs1;
    preg_t     pvs2;
    preg_t     pold;       // previous mapping of vd (read as operand C)
  } ren_inst_t;

  // Command broadcast to every lane by the vector control unit.
  typedef struct packed {
    vop_e  op;
    sew_e  sew;
    logic  use_scalar;
    logic  reads_a;
    logic  reads_b;
    logic  reads_c;
    preg_t pa;             // vs1
    preg_t pb;             // vs2
    preg_t pc;             // old vd
    preg_t pd;             // new vd
    elem_t scalar;
    vl_t   nwords;         // 64-bit words of the register touched (all lanes)
    vl_t   vl;             // element count (slides, reductions: SEW = 64)
  } lane_cmd_t;

  // Ring packet (one 64-bit element plus where it goes).
  typedef struct packed {
    logic               red;   // reduction partial result, not an element
    logic [LANE_W-1:0]  dst;   // destination lane
    logic [K_W-1:0]     k;     // lane-local word index in the destination
    elem_t              data;
  } ring_pkt_t;

  // ---- helpers --------------------------------------------------------------
  function automatic logic is_ring_op(vop_e op);
    return op inside {OP_SLIDEUP, OP_SLIDEDOWN, OP_REDSUM, OP_REDMAX, OP_REDMIN};
  endfunction

  function automatic logic is_red_op(vop_e op);
    return op inside {OP_REDSUM, OP_REDMAX, OP_REDMIN};
  endfunction

  // x / 5 for x < 2^16 without a divider: x * 0xCCCD >> 18, written as a sum
  // of shifted copies of x.
  function automatic logic [15:0] div5(logic [15:0] x);
    logic [33:0] y, p;
    y = 34'(x);
    p = (y << 15) + (y << 14) + (y << 11) + (y << 10) + (y << 7) + (y << 6) + (y << 3) + (y << 2) + y;
    return 16'(p >> 18);
  endfunction

  function automatic logic [2:0] mod5(logic [15:0] x);
    logic [15:0] q;
    q = div5(x);
    return 3'(x - (q << 2) - q);
  endfunction

  // Number of lane-local words lane `lane` holds out of `nwords` register words.
  function automatic vl_t lane_words(vl_t nwords, int unsigned lane);
    if (nwords > vl_t'(lane)) return vl_t'((nwords - vl_t'(lane) + vl_t'(NUM_LANES - 1)) >> LANE_W);
    return '0;
  endfunction

  // 64-bit words a register of vl elements of width sew occupies.
  function automatic vl_t words_of(vl_t vl, sew_e sew);
    logic [VL_W+3:0] bytes;
    bytes = {4'b0, vl} << sew;
    return vl_t'((bytes + 7) >> 3);
  endfunction

  // Flat lane-local index -> bank and row.
  function automatic logic [BANK_W-1:0] bank_of(preg_t p, logic [K_W-1:0] k);
    return mod5({5'b0, p, k});          // p * 32 + k
  endfunction

  function automatic logic [ROW_W-1:0] row_of(preg_t p, logic [K_W-1:0] k);
    return ROW_W'(div5({5'b0, p, k}));
  endfunction

  // Ring direction for a slide: 1 = clockwise (lane i -> lane i+1).
  // offset mod 8 in 1..3: clockwise for slide-up, counter-clockwise for
  // slide-down; 5..7 the opposite; 4 (and 0) the operation's default.
  function automatic logic ring_dir_cw(logic slide_up, logic [63:0] offset);
    logic [LANE_W-1:0] m;
    m = offset[LANE_W-1:0];
    if (m != 0 && m < LANE_W'(NUM_LANES / 2)) return slide_up;
    if (m > LANE_W'(NUM_LANES / 2))            return !slide_up;
    return slide_up;
  endfunction

  // One integer operation on one sub-word of width w (operands in the low w
  // bits, zero-extended).  sub computes b - a (vs2 - vs1); macc c + a * b.
  function automatic logic [63:0] sub_op(vop_e op, int unsigned w,
                                         logic [63:0] x, logic [63:0] y, logic [63:0] z);
    logic signed [64:0] sx, sy;
    sx = signed'({1'b0, x}) - ((x[w-1]) ? (65'sd1 <<< w) : 65'sd0);
    sy = signed'({1'b0, y}) - ((y[w-1]) ? (65'sd1 <<< w) : 65'sd0);
    unique case (op)
      OP_ADD, OP_REDSUM: return y + x;
      OP_SUB:            return y - x;
      OP_AND:            return y & x;
      OP_OR:             return y | x;
      OP_XOR:            return y ^ x;
      OP_MIN, OP_REDMIN: return (sx < sy) ? x : y;
      OP_MAX, OP_REDMAX: return (sx < sy) ? y : x;
      OP_MUL:            return y * x;
      OP_MACC:           return z + y * x;
      OP_MV:             return x;
      OP_SLIDEUP:        return z;
      default:           return '0;
    endcase
  endfunction

  // One SIMD integer operation on a 64-bit word: 8 x 8, 4 x 16, 2 x 32 or
  // 1 x 64 bits depending on sew.
  function automatic elem_t alu_op(vop_e op, sew_e sew, elem_t a, elem_t b, elem_t c);
    elem_t r;
    r = '0;
    unique case (sew)
      SEW8:  for (int i = 0; i < 8; i++)
               r[i*8 +: 8]   = 8'(sub_op(op, 8, 64'(a[i*8 +: 8]), 64'(b[i*8 +: 8]), 64'(c[i*8 +: 8])));
      SEW16: for (int i = 0; i < 4; i++)
               r[i*16 +: 16] = 16'(sub_op(op, 16, 64'(a[i*16 +: 16]), 64'(b[i*16 +: 16]), 64'(c[i*16 +: 16])));
      SEW32: for (int i = 0; i < 2; i++)
               r[i*32 +: 32] = 32'(sub_op(op, 32, 64'(a[i*32 +: 32]), 64'(b[i*32 +: 32]), 64'(c[i*32 +: 32])));
      default: r = sub_op(op, 64, a, b, c);
    endcase
    return r;
  endfunction

  // Reduction step on 64-bit elements (sum, signed max, signed min).
  function automatic elem_t red_op(vop_e op, elem_t a, elem_t b);
    unique case (op)
      OP_REDMAX: return (signed'(a) < signed'(b)) ? b : a;
      OP_REDMIN: return (signed'(a) < signed'(b)) ? a : b;
      default:   return a + b;
    endcase
  endfunction

  // Replicate a scalar over the SIMD sub-words.
  function automatic elem_t splat(sew_e sew, elem_t s);
    unique case (sew)
      SEW8:    return {8{s[7:0]}};
      SEW16:   return {4{s[15:0]}};
      SEW32:   return {2{s[31:0]}};
      default: return s;
    endcase
  endfunction

endpackage
