// simd_lanes: element-wise SIMD ALU datapath for one lane width.
//
// Splits the two 32-bit operands into 32/LANE_W lanes of LANE_W bits and
// applies the selected operation to every lane independently:
//   add, sub               wrap within the lane
//   avg / avgu             (a + b) >> 1 on the full LANE_W+1 bit sum,
//                          arithmetic (avg) or logical (avgu)
//   max / min (u)          signed or unsigned lane compare
//   srl / sra / sll        shift a[i] by the low log2(LANE_W) bits of b[i]
//   abs                    a[i] < 0 ? -a[i] : a[i] (b ignored)
// Purely combinational; simd_alu instantiates one copy per lane width.
// The operation list follows the extension; computing avg on the carry-
// extended sum and masking the shift amount to the lane size are this
// design's choices.
module simd_lanes
  import xpulpnn_pkg::*;
#(
  parameter int unsigned LANE_W = 4
) (
  input  alu_op_e     op_i,
  input  logic [31:0] a_i,
  input  logic [31:0] b_i,
  output logic [31:0] result_o
);

  localparam int unsigned LANES = 32 / LANE_W;
  localparam int unsigned SH_W  = $clog2(LANE_W);

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    logic [LANE_W-1:0] a, b, r;
    logic [LANE_W:0]   sum_s, sum_u;
    logic [SH_W-1:0]   sh;
    logic              lt_s, lt_u;

    assign a     = a_i[i*LANE_W +: LANE_W];
    assign b     = b_i[i*LANE_W +: LANE_W];
    assign sh    = b[SH_W-1:0];
    assign sum_s = {a[LANE_W-1], a} + {b[LANE_W-1], b};
    assign sum_u = {1'b0, a} + {1'b0, b};
    assign lt_s  = $signed(a) < $signed(b);
    assign lt_u  = a < b;

    always_comb begin
      unique case (op_i)
        ALU_ADD:  r = a + b;
        ALU_SUB:  r = a - b;
        ALU_AVG:  r = LANE_W'(sum_s >> 1);
        ALU_AVGU: r = LANE_W'(sum_u >> 1);
        ALU_MAX:  r = lt_s ? b : a;
        ALU_MAXU: r = lt_u ? b : a;
        ALU_MIN:  r = lt_s ? a : b;
        ALU_MINU: r = lt_u ? a : b;
        ALU_SRL:  r = a >> sh;
        ALU_SRA:  r = LANE_W'($signed(a) >>> sh);
        ALU_SLL:  r = a << sh;
        ALU_ABS:  r = a[LANE_W-1] ? LANE_W'(-a) : a;
        default:  r = '0;
      endcase
    end

    assign result_o[i*LANE_W +: LANE_W] = r;
  end

endmodule
