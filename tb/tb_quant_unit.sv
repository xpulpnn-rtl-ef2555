// tb_quant_unit: self-checking test of the pv.qnt threshold quantizer.
//
// For each test it draws 2 x (2^Q-1) random thresholds, sorts them per
// activation, stores them in the data memory model as binary search trees in
// heap order (node k of an in-order-sorted complete tree at entry + 2*(k-1),
// the second tree right after the first), draws two activations (often equal
// to a threshold, to exercise the >= boundary) and checks the packed result
// against the number of thresholds that are <= each activation. Without
// memory stalls it also checks the latency: 9 cycles for nibble, 5 for crumb.
// A second phase repeats the test with grant stalls and checks the results.
module tb_quant_unit;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start, crumb;
  logic [31:0] act, entry;
  logic        ready;
  logic [31:0] result;
  logic        req, we, gnt, rvalid;
  logic [31:0] addr, rdata;
  logic [3:0]  be;
  logic        stalls_on = 1'b0;

  int checks = 0;
  int failures = 0;

  quant_unit dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .crumb_i(crumb), .act_i(act),
    .entry_i(entry), .ready_o(ready), .result_o(result),
    .data_req_o(req), .data_addr_o(addr), .data_we_o(we), .data_be_o(be),
    .data_gnt_i(gnt), .data_rvalid_i(rvalid), .data_rdata_i(rdata)
  );

  tb_data_mem #(.WORDS(16384), .STALL_PCT(40)) u_mem (
    .clk_i(clk), .rst_ni(rst_n), .stall_en_i(stalls_on), .req_i(req), .addr_i(addr),
    .we_i(we), .be_i(be), .wdata_i(32'd0), .gnt_o(gnt), .rvalid_o(rvalid), .rdata_o(rdata)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void write_half(int unsigned byte_addr, logic [15:0] v);
    if (byte_addr[1]) u_mem.mem[byte_addr >> 2][31:16] = v;
    else              u_mem.mem[byte_addr >> 2][15:0]  = v;
  endfunction

  int stalled_ops = 0;

  task automatic run_one(bit q_crumb, bit check_latency);
    int q, nthr, cycles, e0, e1;
    shortint thr [2][15];
    shortint acts [2];
    int unsigned base;
    logic [31:0] exp;

    q    = q_crumb ? 2 : 4;
    nthr = (1 << q) - 1;
    base = 64 * $urandom_range(0, 200) + 2 * $urandom_range(0, q_crumb ? 26 : 2);

    for (int p = 0; p < 2; p++) begin
      for (int i = 0; i < nthr; i++) thr[p][i] = shortint'($urandom_range(0, 65535));
      // insertion sort, ascending signed
      for (int i = 1; i < nthr; i++)
        for (int j = i; j > 0 && thr[p][j-1] > thr[p][j]; j--) begin
          shortint t;
          t = thr[p][j]; thr[p][j] = thr[p][j-1]; thr[p][j-1] = t;
        end
      // heap layout: node k at depth d holds in-order rank (2*(k-2^d)+1)*2^(q-1-d)-1
      for (int k = 1; k <= nthr; k++) begin
        int d, rank;
        d = $clog2(k + 1) - 1;
        rank = (2 * (k - (1 << d)) + 1) * (1 << (q - 1 - d)) - 1;
        write_half(base + p * 2 * nthr + 2 * (k - 1), thr[p][rank]);
      end
      case ($urandom_range(3))
        0:       acts[p] = thr[p][$urandom_range(nthr - 1)];
        1:       acts[p] = shortint'($urandom_range(0, 65535));
        2:       acts[p] = (p == 0) ? -16'sd32768 : 16'sd32767;
        default: acts[p] = shortint'($urandom_range(0, 65535)) >>> 4;
      endcase
    end
    e0 = 0; e1 = 0;
    for (int i = 0; i < nthr; i++) begin
      if (acts[0] >= thr[0][i]) e0++;
      if (acts[1] >= thr[1][i]) e1++;
    end
    exp = q_crumb ? 32'((e1 << 2) | e0) : 32'((e1 << 4) | e0);

    // issue
    start = 1'b1; crumb = q_crumb; act = {acts[1], acts[0]}; entry = base;
    cycles = 1;
    #1;
    while (!ready) begin
      @(negedge clk);
      #1;
      cycles++;
      if (cycles > 200) break;
    end
    checks++;
    if (result !== exp) begin
      failures++;
      if (failures < 10) $display("qnt mismatch crumb=%0d act=%h got %h exp %h", q_crumb, act,
                                  result, exp);
    end
    if (check_latency) begin
      checks++;
      if (cycles != (q_crumb ? 5 : 9)) begin
        failures++;
        $display("latency crumb=%0d: %0d cycles", q_crumb, cycles);
      end
    end else if (cycles > (q_crumb ? 5 : 9)) begin
      stalled_ops++;
    end
    @(negedge clk);
    // sometimes issue back to back, sometimes leave a gap
    if ($urandom_range(1)) begin
      start = 1'b0;
      @(negedge clk);
    end
  endtask

  initial begin
    start = 0; crumb = 0; act = 0; entry = 0;
    for (int i = 0; i < 16384; i++) u_mem.mem[i] = 32'hDEAD_BEEF;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < 400; t++) run_one(1'($urandom), 1'b1);
    stalls_on = 1'b1;
    for (int t = 0; t < 400; t++) run_one(1'($urandom), 1'b0);
    checks++;
    if (stalled_ops == 0) begin
      failures++;
      $display("no operation saw a memory stall");
    end
    $display("stalled operations: %0d", stalled_ops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
