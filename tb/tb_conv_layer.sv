// tb_conv_layer: a quantized convolution layer run through the execute stage.
//
// Layer: 16x16x32 input (HWC), 64 filters of 3x3x32, stride 1, zero padding 1,
// so 16x16x64 outputs. It runs at 8, 4 and 2 bits. Activations are unsigned,
// weights signed, so the inner loop uses dotusp/sdotusp: for each output pixel
// the testbench forms the im2col vector (9 x 32 elements = 9*Q words) and,
// for each pair of output channels, alternates the sum-of-dot products of the
// two channels, as a MatMul kernel with two filters does. For 4 and 2 bits the
// two accumulators are cut to 16 bits, packed into one register and
// quantized with pv.qnt against per-channel threshold trees in the data memory
// model; for 8 bits the 32-bit accumulators are checked (the scale-and-clamp
// step of 8-bit kernels is plain software and not part of this design).
//
// The testbench acts as the rest of the core: it keeps a small register file
// that is written from the execute stage's result port, reads accumulators
// from it, and issues one instruction per cycle. Results are compared with a
// direct integer convolution followed by threshold counting. The cycle count
// is checked too: with no memory stalls, each dot product occupies execute for
// one cycle and each pv.qnt for 9 (nibble) or 5 (crumb) cycles, back to back.
module tb_conv_layer;
  import xpulpnn_pkg::*;

  localparam int H = 16, W = 16, CI = 32, CO = 64, KS = 3;

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

  tb_data_mem #(.WORDS(1024), .STALL_PCT(0)) u_mem (
    .clk_i(clk), .rst_ni(rst_n), .stall_en_i(1'b0), .req_i(req), .addr_i(addr),
    .we_i(we), .be_i(be), .wdata_i(32'd0), .gnt_o(gnt), .rvalid_o(rvalid), .rdata_o(rdata)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Layer data.
  byte unsigned act_t [H][W][CI];     // unsigned activations, Q bits
  byte     wgt_t [CO][KS][KS][CI];    // signed weights, Q bits
  shortint thr   [CO][15];            // sorted thresholds per output channel

  // Register file of the surrounding core and write-back tags.
  logic [31:0] rf [3];
  typedef struct {
    int          dest;
    bit          check;
    logic [31:0] exp;
  } tag_t;
  tag_t tags [$];

  task automatic writeback();
    if (wb_valid) begin
      tag_t t;
      t = tags.pop_front();
      rf[t.dest] = wb_result;
      if (t.check) begin
        checks++;
        if (wb_result !== t.exp) begin
          failures++;
          if (failures < 10) $display("output mismatch got %h exp %h", wb_result, t.exp);
        end
      end
    end
  endtask

  // Issue one instruction; c_reg < 0: no accumulator; pack: rs1 = two
  // 16-bit accumulators {rf[1], rf[0]}.
  task automatic exec(ex_op_t op, logic [31:0] a, logic [31:0] b, int c_reg, bit pack,
                      tag_t t);
    forever begin
      @(negedge clk);
      writeback();
      id_valid = 1'b1;
      id_op    = op;
      id_a     = pack ? {rf[1][15:0], rf[0][15:0]} : a;
      id_b     = b;
      id_c     = (c_reg >= 0) ? rf[c_reg] : 32'd0;
      #1;
      if (id_ready) break;
    end
    tags.push_back(t);
  endtask

  task automatic drain();
    @(negedge clk);
    writeback();
    id_valid = 1'b0;
    while (tags.size() != 0) begin
      @(negedge clk);
      writeback();
    end
  endtask

  function automatic vwidth_e width_of(int q);
    return q == 8 ? VW_B : (q == 4 ? VW_N : VW_C);
  endfunction

  task automatic run_layer(int q);
    int k_words, per_word, n_dotp, n_qnt, start_cycle, span, want;
    logic [31:0] col [72];
    logic [31:0] wrow [CO][72];
    ex_op_t op_dot, op_sdot, op_qnt;

    per_word = 32 / q;
    k_words  = KS * KS * CI / per_word;

    // random data and thresholds
    foreach (act_t[y, x, c]) act_t[y][x][c] = byte'($urandom_range(0, (1 << q) - 1));
    foreach (wgt_t[o, i, j, c])
      wgt_t[o][i][j][c] = byte'(int'($urandom_range(0, (1 << q) - 1)) - (1 << (q - 1)));
    for (int o = 0; o < CO; o++) begin
      int n;
      n = (q == 4) ? 15 : 3;
      for (int i = 0; i < n; i++) thr[o][i] = shortint'(int'($urandom_range(0, 1600)) - 800);
      for (int i = 1; i < n; i++)
        for (int j = i; j > 0 && thr[o][j-1] > thr[o][j]; j--) begin
          shortint x;
          x = thr[o][j]; thr[o][j] = thr[o][j-1]; thr[o][j-1] = x;
        end
      // channel pair (2p, 2p+1) in the 64-byte window at 64*p, heap order
      if (q != 8)
        for (int k = 1; k <= n; k++) begin
          int d, rank, ba;
          d    = $clog2(k + 1) - 1;
          rank = (2 * (k - (1 << d)) + 1) * (1 << ((q == 4 ? 4 : 2) - 1 - d)) - 1;
          ba   = 64 * (o / 2) + (o % 2) * 2 * n + 2 * (k - 1);
          if (ba % 4 == 2) u_mem.mem[ba / 4][31:16] = thr[o][rank];
          else             u_mem.mem[ba / 4][15:0]  = thr[o][rank];
        end
    end

    // packed weight rows, order (ky, kx, ci) like the im2col vector
    for (int o = 0; o < CO; o++)
      for (int w = 0; w < k_words; w++) begin
        wrow[o][w] = 0;
        for (int e = 0; e < per_word; e++) begin
          int flat, ky, kx, ci;
          flat = w * per_word + e;
          ky = flat / (KS * CI); kx = (flat / CI) % KS; ci = flat % CI;
          wrow[o][w] |= (32'(wgt_t[o][ky][kx][ci]) & ((32'd1 << q) - 1)) << (e * q);
        end
      end

    op_dot = '0;
    op_dot.unit = EXU_DOTP; op_dot.vw = width_of(q); op_dot.dotp_sign = DOTP_USP;
    op_sdot = op_dot; op_sdot.accumulate = 1'b1;
    op_qnt = '0;
    op_qnt.unit = EXU_QNT; op_qnt.vw = width_of(q);

    n_dotp = 0; n_qnt = 0;
    start_cycle = -1;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int accs [CO];
        // reference convolution
        for (int o = 0; o < CO; o++) begin
          accs[o] = 0;
          for (int i = 0; i < KS; i++)
            for (int j = 0; j < KS; j++)
              for (int c = 0; c < CI; c++) begin
                int yy, xx;
                yy = y + i - 1; xx = x + j - 1;
                if (yy >= 0 && yy < H && xx >= 0 && xx < W)
                  accs[o] += int'(act_t[yy][xx][c]) * int'(wgt_t[o][i][j][c]);
              end
        end
        // im2col
        for (int w = 0; w < k_words; w++) begin
          col[w] = 0;
          for (int e = 0; e < per_word; e++) begin
            int flat, ky, kx, ci, yy, xx;
            flat = w * per_word + e;
            ky = flat / (KS * CI); kx = (flat / CI) % KS; ci = flat % CI;
            yy = y + ky - 1; xx = x + kx - 1;
            if (yy >= 0 && yy < H && xx >= 0 && xx < W)
              col[w] |= 32'(act_t[yy][xx][ci]) << (e * q);
          end
        end
        for (int p = 0; p < CO / 2; p++) begin
          for (int w = 0; w < k_words; w++)
            for (int h = 0; h < 2; h++) begin
              tag_t t;
              t.dest  = h;
              t.check = (q == 8) && (w == k_words - 1);
              t.exp   = 32'(accs[2 * p + h]);
              if (w == 0) exec(op_dot, col[w], wrow[2 * p + h][w], -1, 1'b0, t);
              else        exec(op_sdot, col[w], wrow[2 * p + h][w], h, 1'b0, t);
              if (start_cycle < 0) start_cycle = cycle;
              n_dotp++;
            end
          if (q != 8) begin
            tag_t t;
            int e0, e1, n;
            n = (q == 4) ? 15 : 3;
            e0 = 0; e1 = 0;
            for (int i = 0; i < n; i++) begin
              if (shortint'(accs[2 * p]) >= thr[2 * p][i]) e0++;
              if (shortint'(accs[2 * p + 1]) >= thr[2 * p + 1][i]) e1++;
            end
            t.dest  = 2;
            t.check = 1'b1;
            t.exp   = (q == 4) ? 32'((e1 << 4) | e0) : 32'((e1 << 2) | e0);
            exec(op_qnt, 32'd0, 32'(64 * p), -1, 1'b1, t);
            n_qnt++;
          end
        end
      end
    drain();
    span = cycle - start_cycle;
    want = n_dotp + n_qnt * (q == 4 ? 9 : (q == 2 ? 5 : 0));
    checks++;
    if (span != want) begin
      failures++;
      $display("%0d-bit layer: %0d cycles in execute, want %0d", q, span, want);
    end
    $display("%0d-bit layer: %0d dot products, %0d qnt, %0d cycles, %0d MAC/cycle x100",
             q, n_dotp, n_qnt, span, (100 * H * W * CO * KS * KS * CI) / span);
  endtask

  initial begin
    id_valid = 0; id_op = '0; id_a = 0; id_b = 0; id_c = 0;
    rf = '{default: 32'd0};
    for (int i = 0; i < 1024; i++) u_mem.mem[i] = 32'd0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_layer(8);
    run_layer(4);
    run_layer(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
