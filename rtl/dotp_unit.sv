// dotp_unit: sum-of-dot-product unit for 16-, 8-, 4- and 2-bit packed vectors.
//
// Computes dot (rD = sum a[i]*b[i]) and sum-of-dot (rD = sum a[i]*b[i] + rD)
// products of two packed 32-bit registers, interpreting both operands as
// unsigned (up), rs1 unsigned and rs2 signed (usp) or both signed (sp). Each
// lane width has a region of its own (dotp_region): 2 x 16-bit, 4 x 8-bit,
// 8 x 4-bit and 16 x 2-bit multipliers, each with a dedicated adder tree, so
// that no operand splitting or selection logic sits in the multiply path.
// Each region has its own input register that only loads for operations of
// its width (clock gating of the idle regions).
//
// Interface and timing: issue_i marks a dot-product operation leaving the
// decode stage together with its operands; the operands are captured at the
// clock edge and result_o holds the 32-bit result during the following
// (execute) cycle, one operation per cycle, no stalls for back-to-back sdotp.
// The output multiplexer selects the region named by the registered width.
//
// The four separate regions, their input registers with clock gating and the
// single-cycle latency follow the extension's description; the operand
// interface and the order of signedness in the usp form (rs1 unsigned, rs2
// signed, as the instruction name reads) are this design's choice.
module dotp_unit
  import xpulpnn_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        issue_i,       // dot-product op enters execute
  input  vwidth_e     vw_i,
  input  dotp_sign_e  sign_i,
  input  logic        accumulate_i,  // sdot* form
  input  logic [31:0] a_i,           // rs1
  input  logic [31:0] b_i,           // rs2 (already lane-replicated for .sc)
  input  logic [31:0] c_i,           // rD, accumulator
  output logic [31:0] result_o
);

  logic sign_a, sign_b;
  assign sign_a = (sign_i == DOTP_SP);
  assign sign_b = (sign_i == DOTP_SP) || (sign_i == DOTP_USP);

  vwidth_e vw_q;
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)      vw_q <= VW_H;
    else if (issue_i) vw_q <= vw_i;
  end

  logic [31:0] res_h, res_b, res_n, res_c;

  dotp_region #(.LANE_W(16)) u_region_h (
    .clk_i, .rst_ni, .load_i(issue_i && vw_i == VW_H),
    .a_i, .b_i, .c_i, .sign_a_i(sign_a), .sign_b_i(sign_b),
    .accumulate_i, .result_o(res_h)
  );

  dotp_region #(.LANE_W(8)) u_region_b (
    .clk_i, .rst_ni, .load_i(issue_i && vw_i == VW_B),
    .a_i, .b_i, .c_i, .sign_a_i(sign_a), .sign_b_i(sign_b),
    .accumulate_i, .result_o(res_b)
  );

  dotp_region #(.LANE_W(4)) u_region_n (
    .clk_i, .rst_ni, .load_i(issue_i && vw_i == VW_N),
    .a_i, .b_i, .c_i, .sign_a_i(sign_a), .sign_b_i(sign_b),
    .accumulate_i, .result_o(res_n)
  );

  dotp_region #(.LANE_W(2)) u_region_c (
    .clk_i, .rst_ni, .load_i(issue_i && vw_i == VW_C),
    .a_i, .b_i, .c_i, .sign_a_i(sign_a), .sign_b_i(sign_b),
    .accumulate_i, .result_o(res_c)
  );

  always_comb begin
    unique case (vw_q)
      VW_H:    result_o = res_h;
      VW_B:    result_o = res_b;
      VW_N:    result_o = res_n;
      default: result_o = res_c;
    endcase
  end

endmodule
