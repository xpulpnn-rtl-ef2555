// tb_simd_alu: self-checking test of the packed-SIMD ALU.
//
// Applies random operands to every operation at every lane width (plus a set
// of corner values) and compares each lane with a reference computed on
// integers: elements are extracted with shifts, the operation is done at
// full precision and the result is reduced back to the lane width.
module tb_simd_alu;
  import xpulpnn_pkg::*;

  alu_op_e     op;
  vwidth_e     vw;
  logic [31:0] a, b, result;

  int checks = 0;
  int failures = 0;

  simd_alu dut (.op_i(op), .vw_i(vw), .a_i(a), .b_i(b), .result_o(result));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  task automatic check_one(alu_op_e top, vwidth_e tvw, logic [31:0] ta, logic [31:0] tb_);
    logic [31:0] e;
    op = top; vw = tvw; a = ta; b = tb_;
    #1;
    e = ref_alu(top, tvw, ta, tb_);
    checks++;
    if (result !== e) begin
      failures++;
      if (failures < 10)
        $display("mismatch op=%s vw=%s a=%h b=%h got %h exp %h", top.name(), tvw.name(),
                 ta, tb_, result, e);
    end
  endtask

  localparam logic [31:0] CORNERS [6] = '{32'h0, 32'hFFFF_FFFF, 32'h8888_8888,
                                          32'h7777_7777, 32'hAAAA_AAAA, 32'h5555_5555};

  initial begin
    for (int o = 0; o <= int'(ALU_ABS); o++) begin
      for (int w = 0; w < 4; w++) begin
        for (int i = 0; i < 6; i++)
          for (int j = 0; j < 6; j++)
            check_one(alu_op_e'(o), vwidth_e'(w), CORNERS[i], CORNERS[j]);
        for (int k = 0; k < 400; k++)
          check_one(alu_op_e'(o), vwidth_e'(w), $urandom, $urandom);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
