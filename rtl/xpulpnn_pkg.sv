// xpulpnn_pkg: types and helpers shared by the XpulpNN execute-stage blocks.
//
// The extension adds packed-SIMD arithmetic on 4-bit ("nibble") and 2-bit
// ("crumb") lanes next to the existing 16-bit (half) and 8-bit (byte) lanes,
// a sum-of-dot-product unit for all four lane widths and a multi-cycle
// threshold quantization instruction (pv.qnt.{n,c}).
//
// The operation set (add, sub, avg(u), max(u), min(u), srl, sra, sll, abs,
// dotup/dotusp/dotsp and their accumulating sdot* forms, qnt) follows the
// instruction list of the extension. The binary encodings of the enums below
// are this design's own: they describe decoded micro-operations handed from
// the decode stage to the execute stage, not RISC-V instruction encodings.
package xpulpnn_pkg;

  // Lane width of a packed-SIMD operation.
  typedef enum logic [1:0] {
    VW_H = 2'd0,  // 2 x 16 bit
    VW_B = 2'd1,  // 4 x 8 bit
    VW_N = 2'd2,  // 8 x 4 bit  (nibble)
    VW_C = 2'd3   // 16 x 2 bit (crumb)
  } vwidth_e;

  // Element-wise SIMD ALU operations.
  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_AVG  = 4'd2,
    ALU_AVGU = 4'd3,
    ALU_MAX  = 4'd4,
    ALU_MAXU = 4'd5,
    ALU_MIN  = 4'd6,
    ALU_MINU = 4'd7,
    ALU_SRL  = 4'd8,
    ALU_SRA  = 4'd9,
    ALU_SLL  = 4'd10,
    ALU_ABS  = 4'd11
  } alu_op_e;

  // Signedness of the two dot-product operands.
  typedef enum logic [1:0] {
    DOTP_UP  = 2'd0,  // unsigned x unsigned
    DOTP_USP = 2'd1,  // unsigned rs1 x signed rs2
    DOTP_SP  = 2'd2   // signed x signed
  } dotp_sign_e;

  // Execute-stage functional unit that handles an operation.
  typedef enum logic [1:0] {
    EXU_ALU  = 2'd0,
    EXU_DOTP = 2'd1,
    EXU_QNT  = 2'd2
  } exu_e;

  // Decoded operation handed to the execute stage.
  typedef struct packed {
    exu_e       unit;
    alu_op_e    alu_op;
    dotp_sign_e dotp_sign;
    logic       accumulate;  // sdot*: add rD to the dot product
    logic       scalar;      // .sc form: lane 0 of rs2 is replicated to all lanes
    vwidth_e    vw;          // lane width; qnt uses VW_N or VW_C only
  } ex_op_t;

  // Bits per lane for a lane width.
  function automatic int unsigned lane_bits(vwidth_e vw);
    unique case (vw)
      VW_H:    return 16;
      VW_B:    return 8;
      VW_N:    return 4;
      default: return 2;
    endcase
  endfunction

  // Replicate the lowest lane of a register over all lanes (.sc forms).
  function automatic logic [31:0] replicate_lane0(logic [31:0] v, vwidth_e vw);
    unique case (vw)
      VW_H:    return {2{v[15:0]}};
      VW_B:    return {4{v[7:0]}};
      VW_N:    return {8{v[3:0]}};
      default: return {16{v[1:0]}};
    endcase
  endfunction

endpackage
