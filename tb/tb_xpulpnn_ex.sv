// tb_xpulpnn_ex: end-to-end test of the XpulpNN execute stage.
//
// The testbench plays the decode stage: every cycle it offers a random
// operation (SIMD ALU op, dot / sum-of-dot product, pv.qnt, or a bubble) with
// random operands at a random lane width, in the plain or .sc form. Chains of
// sdot products take their accumulator from the execute stage's result in the
// same cycle (forwarding), as a MatMul inner loop does. pv.qnt reads threshold
// trees that the testbench stored in the data memory model, which stalls
// grants at random during part of the run.
//
// Every result is checked against the tb_ref_pkg models. The execute
// occupancy is checked as well: one cycle for ALU and dot-product ops, 9
// (nibble) or 5 (crumb) cycles for pv.qnt when no memory stall hit it. The
// test counts how often each mechanism occurred (each ALU/dot-product lane
// width, .sc replication, accumulation, forwarded accumulation, back-to-back
// issue, both pv.qnt widths, pipeline stall behind pv.qnt, memory grant
// stall) and counts a failure for any that never happened.
module tb_xpulpnn_ex;
  import xpulpnn_pkg::*;
  import tb_ref_pkg::*;

  localparam int NSETS = 32;
  localparam int NOPS  = 20000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        id_valid, id_ready;
  ex_op_t      id_op;
  logic [31:0] id_a, id_b, id_c;
  logic        wb_valid;
  logic [31:0] wb_result;
  logic        req, we, gnt, rvalid;
  logic [31:0] addr, rdata;
  logic [3:0]  be;
  logic        stalls_on = 1'b0;

  int checks = 0;
  int failures = 0;

  xpulpnn_ex dut (
    .clk_i(clk), .rst_ni(rst_n),
    .id_valid_i(id_valid), .id_ready_o(id_ready), .id_op_i(id_op),
    .id_a_i(id_a), .id_b_i(id_b), .id_c_i(id_c),
    .wb_valid_o(wb_valid), .wb_result_o(wb_result),
    .data_req_o(req), .data_addr_o(addr), .data_we_o(we), .data_be_o(be),
    .data_gnt_i(gnt), .data_rvalid_i(rvalid), .data_rdata_i(rdata)
  );

  tb_data_mem #(.WORDS(4096), .STALL_PCT(30)) u_mem (
    .clk_i(clk), .rst_ni(rst_n), .stall_en_i(stalls_on), .req_i(req), .addr_i(addr),
    .we_i(we), .be_i(be), .wdata_i(32'd0), .gnt_o(gnt), .rvalid_o(rvalid), .rdata_o(rdata)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NOPS * 12 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d operations still in execute", sb.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Threshold trees: set s of width q at base(q) + 64*s, two trees per set.
  shortint thr_n [NSETS][2][15];
  shortint thr_c [NSETS][2][15];

  function automatic int unsigned tree_base(bit crumb, int s);
    return (crumb ? 32'h2000 : 32'h1000) + 64 * s;
  endfunction

  function automatic void write_half(int unsigned byte_addr, logic [15:0] v);
    if (byte_addr[1]) u_mem.mem[byte_addr >> 2][31:16] = v;
    else              u_mem.mem[byte_addr >> 2][15:0]  = v;
  endfunction

  task automatic build_trees();
    for (int cr = 0; cr < 2; cr++) begin
      int q, n;
      q = cr ? 2 : 4;
      n = (1 << q) - 1;
      for (int s = 0; s < NSETS; s++)
        for (int p = 0; p < 2; p++) begin
          shortint t [15];
          for (int i = 0; i < 15; i++) t[i] = 16'sh7fff;
          for (int i = 0; i < n; i++) t[i] = shortint'($urandom_range(0, 4095)) - 16'sd2048;
          for (int i = 1; i < n; i++)
            for (int j = i; j > 0 && t[j-1] > t[j]; j--) begin
              shortint x;
              x = t[j]; t[j] = t[j-1]; t[j-1] = x;
            end
          for (int k = 1; k <= n; k++)
            write_half(tree_base(cr[0], s) + p * 2 * n + 2 * (k - 1), t[heap_rank(k, q)]);
          if (cr != 0) thr_c[s][p] = t;
          else         thr_n[s][p] = t;
        end
    end
  endtask

  // Scoreboard of issued operations.
  typedef struct {
    logic [31:0] exp;
    int          issue_cycle;
    int          stalls_at_issue;
    ex_op_t      op;
  } sb_t;
  sb_t sb [$];

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Mechanism counters.
  int n_alu [4];
  int n_dotp [4];
  int n_sc, n_acc, n_fwd, n_b2b_dotp, n_qnt_n, n_qnt_c, n_id_stall, n_mem_stall_qnt;
  int n_qnt_b2b;

  function automatic logic [31:0] expected(ex_op_t op, logic [31:0] a, logic [31:0] b,
                                           logic [31:0] c);
    logic [31:0] bb;
    bb = op.scalar ? ({32{1'b1}} >> (32 - lane_bits(op.vw))) & b : b;
    if (op.scalar)
      for (int i = 1; i < 32 / int'(lane_bits(op.vw)); i++)
        bb |= (b & ({32{1'b1}} >> (32 - lane_bits(op.vw)))) << (i * lane_bits(op.vw));
    case (op.unit)
      EXU_ALU:  return ref_alu(op.alu_op, op.vw, a, bb);
      EXU_DOTP: return ref_dotp(a, bb, c, op.vw, op.dotp_sign, op.accumulate);
      default: begin
        int s, e0, e1;
        bit cr;
        cr = (op.vw == VW_C);
        s  = (b - tree_base(cr, 0)) / 64;
        if (cr) begin
          e0 = ref_qnt(shortint'(a[15:0]), thr_c[s][0], 3);
          e1 = ref_qnt(shortint'(a[31:16]), thr_c[s][1], 3);
          return 32'((e1 << 2) | e0);
        end else begin
          e0 = ref_qnt(shortint'(a[15:0]), thr_n[s][0], 15);
          e1 = ref_qnt(shortint'(a[31:16]), thr_n[s][1], 15);
          return 32'((e1 << 4) | e0);
        end
      end
    endcase
  endfunction

  task automatic random_op(output ex_op_t op, output logic [31:0] a, output logic [31:0] b,
                           output logic [31:0] c, output bit chain);
    int kind;
    op = '0;
    a = $urandom; b = $urandom; c = $urandom;
    chain = 1'b0;
    kind = $urandom_range(99);
    if (kind < 35) begin
      op.unit   = EXU_ALU;
      op.alu_op = alu_op_e'($urandom_range(int'(ALU_ABS)));
      op.vw     = vwidth_e'($urandom_range(3));
      op.scalar = ($urandom_range(3) == 0);
    end else if (kind < 85) begin
      op.unit       = EXU_DOTP;
      op.vw         = vwidth_e'($urandom_range(3));
      op.dotp_sign  = dotp_sign_e'($urandom_range(2));
      op.accumulate = 1'($urandom);
      op.scalar     = ($urandom_range(3) == 0);
      chain         = op.accumulate && ($urandom_range(1) == 1);
    end else begin
      bit cr;
      cr        = 1'($urandom);
      op.unit   = EXU_QNT;
      op.vw     = cr ? VW_C : VW_N;
      b         = tree_base(cr, $urandom_range(NSETS - 1));
      a         = {16'($urandom_range(0, 5000)) - 16'd2500, 16'($urandom_range(0, 5000)) - 16'd2500};
    end
  endtask

  ex_op_t      cur_op;
  logic [31:0] cur_a, cur_b, cur_c;
  bit          cur_chain;
  ex_op_t      last_issued;
  bit          last_issue_prev_cycle = 0;
  logic        id_ready_q = 1'b0;

  initial begin
    id_valid = 0; id_op = '0; id_a = 0; id_b = 0; id_c = 0;
    for (int i = 0; i < 4096; i++) u_mem.mem[i] = $urandom;
    build_trees();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int op_i = 0; op_i < NOPS; ) begin
      @(negedge clk);
      if (op_i == NOPS / 2) stalls_on = 1'b1;

      // write-back check
      if (wb_valid) begin
        sb_t e;
        e = sb.pop_front();
        checks++;
        if (wb_result !== e.exp) begin
          failures++;
          if (failures < 10)
            $display("result mismatch unit=%s vw=%s got %h exp %h", e.op.unit.name(),
                     e.op.vw.name(), wb_result, e.exp);
        end
        if (u_mem.stall_cycles == e.stalls_at_issue) begin
          int occ, want;
          occ  = cycle - e.issue_cycle;
          want = (e.op.unit != EXU_QNT) ? 1 : (e.op.vw == VW_C ? 5 : 9);
          checks++;
          if (occ != want) begin
            failures++;
            if (failures < 10) $display("occupancy %s: %0d cycles, want %0d",
                                        e.op.unit.name(), occ, want);
          end
        end else if (e.op.unit == EXU_QNT) begin
          n_mem_stall_qnt++;
        end
      end

      // decode side: keep a refused op, otherwise draw a new one or a bubble
      if (!(id_valid && !id_ready_q)) begin
        if ($urandom_range(9) == 0) begin
          id_valid = 1'b0;
          cur_chain = 1'b0;
        end else begin
          random_op(cur_op, cur_a, cur_b, cur_c, cur_chain);
          id_valid = 1'b1;
        end
      end
      // forwarding: chained sdot takes rD from the execute stage's result
      if (cur_chain && dut.ex_valid_q && dut.ex_op_q.unit == EXU_DOTP) cur_c = wb_result;
      else if (cur_chain) cur_chain = 1'b0;
      id_op = cur_op; id_a = cur_a; id_b = cur_b; id_c = cur_c;
      #1;
      if (id_valid && !id_ready) n_id_stall++;
      if (id_valid && id_ready) begin
        sb_t e;
        e.exp             = expected(cur_op, cur_a, cur_b, cur_c);
        e.issue_cycle     = cycle;
        e.stalls_at_issue = u_mem.stall_cycles;
        e.op              = cur_op;
        sb.push_back(e);
        op_i++;
        if (cur_op.scalar) n_sc++;
        case (cur_op.unit)
          EXU_ALU:  n_alu[cur_op.vw]++;
          EXU_DOTP: begin
            n_dotp[cur_op.vw]++;
            if (cur_op.accumulate) n_acc++;
            if (cur_chain) n_fwd++;
            if (last_issue_prev_cycle && last_issued.unit == EXU_DOTP) n_b2b_dotp++;
          end
          default: begin
            if (cur_op.vw == VW_C) n_qnt_c++; else n_qnt_n++;
            if (dut.ex_valid_q && dut.ex_op_q.unit == EXU_QNT) n_qnt_b2b++;
          end
        endcase
        last_issued = cur_op;
        last_issue_prev_cycle = 1'b1;
      end else begin
        last_issue_prev_cycle = 1'b0;
      end
      id_ready_q = id_ready;
    end

    // drain: let the last issued operation enter execute first
    @(posedge clk);
    #1;
    id_valid = 1'b0;
    while (sb.size() != 0) begin
      @(negedge clk);
      if (wb_valid) begin
        sb_t e;
        e = sb.pop_front();
        checks++;
        if (wb_result !== e.exp) failures++;
      end
    end

    begin
      string names [17];
      int    counts [17];
      names = '{"alu.h", "alu.b", "alu.n", "alu.c", "dotp.h", "dotp.b", "dotp.n", "dotp.c",
                "scalar-replicated", "sdotp accumulate", "forwarded accumulator",
                "back-to-back dotp", "qnt.n", "qnt.c", "decode stall behind qnt",
                "memory stall in qnt", "qnt back to back"};
      counts = '{n_alu[0], n_alu[1], n_alu[2], n_alu[3], n_dotp[0], n_dotp[1], n_dotp[2],
                 n_dotp[3], n_sc, n_acc, n_fwd, n_b2b_dotp, n_qnt_n, n_qnt_c, n_id_stall,
                 n_mem_stall_qnt, n_qnt_b2b};
      for (int i = 0; i < 17; i++) begin
        $display("mechanism %-24s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin
          failures++;
          $display("mechanism %s never happened", names[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
