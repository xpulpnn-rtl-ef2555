// dotp_region: one lane-width region of the dot-product unit.
//
// A region owns a set of 32/LANE_W multipliers and a private adder tree. It
// computes, in one cycle,
//   result = sum_i ext(a[i]) * ext(b[i])  (+ c when accumulate is set)
// where ext() sign- or zero-extends each LANE_W-bit element by one bit, so the
// multipliers work on (LANE_W+1)-bit two's-complement operands. The sum wraps
// at 32 bits like the register it is written to.
//
// Interface and timing: the operands are captured in the region's own input
// register when load_i is high (the operands of the decode stage, at the
// decode/execute boundary). The register is only clocked for operations of
// this lane width, which stands for the clock gating that keeps the operands
// of idle regions from switching; on silicon the enable becomes the enable of
// an integrated clock-gating cell. result_o is combinational from that register
// and valid in the execute cycle that follows the load.
//
// One region per lane width, each with its own adder tree and no resource
// sharing between widths, follows the extension's dot-product unit. Adder tree
// shape is left to synthesis.
module dotp_region #(
  parameter int unsigned LANE_W = 4
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        load_i,        // capture operands (gated clock enable)
  input  logic [31:0] a_i,           // rs1: packed vector
  input  logic [31:0] b_i,           // rs2: packed vector
  input  logic [31:0] c_i,           // rD: accumulator
  input  logic        sign_a_i,      // a elements are signed
  input  logic        sign_b_i,      // b elements are signed
  input  logic        accumulate_i,  // sdot*: add c
  output logic [31:0] result_o
);

  localparam int unsigned LANES = 32 / LANE_W;
  localparam int unsigned PW    = 2 * (LANE_W + 1);  // product width

  logic [31:0] a_q, b_q, c_q;
  logic        sign_a_q, sign_b_q, acc_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      a_q      <= '0;
      b_q      <= '0;
      c_q      <= '0;
      sign_a_q <= 1'b0;
      sign_b_q <= 1'b0;
      acc_q    <= 1'b0;
    end else if (load_i) begin
      a_q      <= a_i;
      b_q      <= b_i;
      c_q      <= c_i;
      sign_a_q <= sign_a_i;
      sign_b_q <= sign_b_i;
      acc_q    <= accumulate_i;
    end
  end

  // Multipliers on (LANE_W+1)-bit extended elements.
  logic signed [PW-1:0] prod [LANES];

  for (genvar i = 0; i < LANES; i++) begin : g_mul
    logic signed [LANE_W:0] ea, eb;
    assign ea = {sign_a_q & a_q[i*LANE_W+LANE_W-1], a_q[i*LANE_W +: LANE_W]};
    assign eb = {sign_b_q & b_q[i*LANE_W+LANE_W-1], b_q[i*LANE_W +: LANE_W]};
    assign prod[i] = PW'(ea * eb);
  end

  // Adder tree (written as a sum; synthesis builds the tree).
  always_comb begin
    logic [31:0] sum;
    sum = acc_q ? c_q : 32'd0;
    for (int unsigned i = 0; i < LANES; i++) begin
      sum = sum + 32'(prod[i]);
    end
    result_o = sum;
  end

endmodule
