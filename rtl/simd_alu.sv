// simd_alu: packed-SIMD ALU for 16-, 8-, 4- and 2-bit lanes.
//
// Executes the vector ALU, comparison, shift and abs operations of the
// extension (add, sub, avg(u), max(u), min(u), srl, sra, sll, abs) on the
// half, byte, nibble and crumb lane widths. One simd_lanes datapath per width
// computes the operation; the result of the selected width is forwarded.
// The .sc (scalar-replicated) forms need nothing here: the execute stage
// replicates lane 0 of rs2 before the operands reach the ALU.
//
// Interface and timing: combinational, op_i/vw_i/a_i/b_i in, result_o out in
// the same execute cycle.
//
// The supported operations and lane widths follow the extension; building
// one independent datapath per width (instead of a carry-split shared adder)
// is this design's choice, the extension does not describe the ALU insides.
module simd_alu
  import xpulpnn_pkg::*;
(
  input  alu_op_e     op_i,
  input  vwidth_e     vw_i,
  input  logic [31:0] a_i,
  input  logic [31:0] b_i,
  output logic [31:0] result_o
);

  logic [31:0] res_h, res_b, res_n, res_c;

  simd_lanes #(.LANE_W(16)) u_lanes_h (.op_i, .a_i, .b_i, .result_o(res_h));
  simd_lanes #(.LANE_W(8))  u_lanes_b (.op_i, .a_i, .b_i, .result_o(res_b));
  simd_lanes #(.LANE_W(4))  u_lanes_n (.op_i, .a_i, .b_i, .result_o(res_n));
  simd_lanes #(.LANE_W(2))  u_lanes_c (.op_i, .a_i, .b_i, .result_o(res_c));

  always_comb begin
    unique case (vw_i)
      VW_H:    result_o = res_h;
      VW_B:    result_o = res_b;
      VW_N:    result_o = res_n;
      default: result_o = res_c;
    endcase
  end

endmodule
