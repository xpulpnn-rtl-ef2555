// tb_ref_pkg: reference models used by the execute-stage testbenches.
//
// Integer-level models of the SIMD ALU operations, the (sum-of-)dot products
// and the staircase quantization, written independently of the RTL: lanes are
// extracted with shifts and masks, arithmetic is done on 32-bit integers, and
// quantization counts the thresholds that are <= the activation instead of
// walking a tree. Also the address rule of the heap-ordered threshold trees.
package tb_ref_pkg;
  import xpulpnn_pkg::*;

  function automatic int field(logic [31:0] v, int w, int i, bit sgnd);
    int x;
    x = int'((v >> (i * w)) & ((32'd1 << w) - 1));
    if (sgnd && x >= (1 << (w - 1))) x -= (1 << w);
    return x;
  endfunction

  function automatic logic [31:0] ref_alu(alu_op_e rop, vwidth_e rvw, logic [31:0] ra,
                                          logic [31:0] rb);
    int w, n, xs, ys, xu, yu, r, sh;
    logic [31:0] out;
    w = int'(lane_bits(rvw));
    n = 32 / w;
    out = 0;
    for (int i = 0; i < n; i++) begin
      xs = field(ra, w, i, 1); ys = field(rb, w, i, 1);
      xu = field(ra, w, i, 0); yu = field(rb, w, i, 0);
      sh = yu % w;
      case (rop)
        ALU_ADD:  r = xu + yu;
        ALU_SUB:  r = xu - yu;
        ALU_AVG:  r = (xs + ys) >>> 1;
        ALU_AVGU: r = (xu + yu) >> 1;
        ALU_MAX:  r = (xs > ys) ? xs : ys;
        ALU_MAXU: r = (xu > yu) ? xu : yu;
        ALU_MIN:  r = (xs < ys) ? xs : ys;
        ALU_MINU: r = (xu < yu) ? xu : yu;
        ALU_SRL:  r = xu >> sh;
        ALU_SRA:  r = xs >>> sh;
        ALU_SLL:  r = xu << sh;
        ALU_ABS:  r = (xs < 0) ? -xs : xs;
        default:  r = 0;
      endcase
      out |= (32'(r) & ((32'd1 << w) - 1)) << (i * w);
    end
    return out;
  endfunction

  function automatic logic [31:0] ref_dotp(logic [31:0] ra, logic [31:0] rb, logic [31:0] rc,
                                           vwidth_e rvw, dotp_sign_e rs, logic racc);
    int w, n;
    logic [31:0] s;
    w = int'(lane_bits(rvw));
    n = 32 / w;
    s = racc ? rc : 32'd0;
    for (int i = 0; i < n; i++)
      s += 32'(field(ra, w, i, rs == DOTP_SP) * field(rb, w, i, rs != DOTP_UP));
    return s;
  endfunction

  // Number of the sorted thresholds thr[0..n-1] that are <= act.
  function automatic int ref_qnt(shortint act, shortint thr [15], int n);
    int cnt;
    cnt = 0;
    for (int i = 0; i < n; i++) if (act >= thr[i]) cnt++;
    return cnt;
  endfunction

  // In-order rank of heap node k (1-based) in a complete tree of q levels.
  function automatic int heap_rank(int k, int q);
    int d;
    d = $clog2(k + 1) - 1;
    return (2 * (k - (1 << d)) + 1) * (1 << (q - 1 - d)) - 1;
  endfunction

endpackage
