// tb_dotp_unit: self-checking test of the dot-product unit.
//
// Issues one random dot or sum-of-dot product per cycle, back to back, over
// all four lane widths and the three signedness forms, and checks each result
// in the cycle after issue (single-cycle latency) against a reference that
// extracts the elements with shifts and integer arithmetic. It also checks
// that the input register of a region is not reloaded by operations of
// another width (clock gating of idle regions).
module tb_dotp_unit;
  import xpulpnn_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        issue;
  vwidth_e     vw;
  dotp_sign_e  sgn;
  logic        acc;
  logic [31:0] a, b, c;
  logic [31:0] result;

  int checks = 0;
  int failures = 0;

  dotp_unit dut (
    .clk_i(clk), .rst_ni(rst_n), .issue_i(issue), .vw_i(vw), .sign_i(sgn),
    .accumulate_i(acc), .a_i(a), .b_i(b), .c_i(c), .result_o(result)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int elem(logic [31:0] v, int w, int i, bit sgnd);
    int x;
    x = int'((v >> (i * w)) & ((32'd1 << w) - 1));
    if (sgnd && x >= (1 << (w - 1))) x -= (1 << w);
    return x;
  endfunction

  function automatic logic [31:0] ref_dotp(logic [31:0] ra, logic [31:0] rb, logic [31:0] rc,
                                           vwidth_e rvw, dotp_sign_e rs, logic racc);
    int w, n;
    logic [31:0] s;
    w = int'(lane_bits(rvw));
    n = 32 / w;
    s = racc ? rc : 32'd0;
    for (int i = 0; i < n; i++)
      s += 32'(elem(ra, w, i, rs == DOTP_SP) * elem(rb, w, i, rs != DOTP_UP));
    return s;
  endfunction

  logic [31:0] exp_q;
  logic        exp_valid;

  initial begin
    issue = 0; vw = VW_N; sgn = DOTP_SP; acc = 0; a = 0; b = 0; c = 0;
    exp_valid = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      if (exp_valid) begin
        checks++;
        if (result !== exp_q) begin
          failures++;
          if (failures < 10) $display("mismatch t=%0d got %h exp %h", t, result, exp_q);
        end
      end
      issue = 1'b1;
      vw    = vwidth_e'($urandom_range(3));
      sgn   = dotp_sign_e'($urandom_range(2));
      acc   = 1'($urandom);
      a     = $urandom;
      b     = $urandom;
      c     = $urandom;
      if (t % 7 == 0) begin a = 32'hFFFF_FFFF; b = 32'hFFFF_FFFF; end  // extreme operands
      if (t % 11 == 0) begin a = 32'h8888_8888; b = 32'hAAAA_AAAA; end
      exp_q     = ref_dotp(a, b, c, vw, sgn, acc);
      exp_valid = 1'b1;
    end
    @(negedge clk);
    checks++;
    if (result !== exp_q) failures++;

    // Gating: a nibble op, then crumb ops must leave the nibble region alone.
    issue = 1; vw = VW_N; sgn = DOTP_SP; acc = 0; a = 32'h1234_5678; b = 32'h9ABC_DEF0;
    @(negedge clk);
    vw = VW_C; a = 32'h0F0F_0F0F; b = 32'hF0F0_F0F0;
    @(negedge clk);
    issue = 0;
    @(negedge clk);
    checks++;
    if (dut.u_region_n.a_q !== 32'h1234_5678 || dut.u_region_n.b_q !== 32'h9ABC_DEF0) begin
      failures++;
      $display("nibble region register changed by a crumb op");
    end
    checks++;
    if (result !== ref_dotp(32'h0F0F_0F0F, 32'hF0F0_F0F0, 32'd0, VW_C, DOTP_SP, 1'b0)) begin
      failures++;
      $display("result changed while no op was issued");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
