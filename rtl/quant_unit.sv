// quant_unit: hardware for pv.qnt.{n,c}, threshold (staircase) quantization.
//
// Quantizes two signed 16-bit activations, packed in one register, to two
// Q-bit values (Q = 4 for nibble, Q = 2 for crumb). Each activation is compared
// with the 2^Q - 1 thresholds of its output channel, which are stored in data
// memory as a balanced binary search tree in heap order: node k (k = 1 is the
// root, children 2k and 2k+1) is the signed 16-bit halfword at
// entry + 2*(k-1). At every tree level the unit fetches one threshold,
// compares (bit = act >= thr), appends the bit to the result (MSB first) and
// descends to child 2k+bit. After Q levels the result equals the number of
// thresholds that are <= the activation. The thresholds of the second
// activation follow those of the first, at entry + 2*(2^Q-1).
//
// Pipelining: the comparison (memory data -> comparator -> bit register) and
// the address update (bit register -> 6-bit adder -> memory address) sit in
// different cycles, so neither lengthens the core-to-memory path. The two
// activations are interleaved so that one is compared while the other's next
// address is formed and requested. With a memory that grants at once and
// answers one cycle later, a nibble quantization takes 9 cycles and a crumb
// one 5 cycles, counted from the first cycle start_i is high to the cycle
// ready_o is high, both included. Memory stalls (grant held low) just delay
// the sequence; requests strictly alternate between the two activations and
// at most one request per activation is outstanding.
//
// Address update: the tree pair of one instruction must lie in one naturally
// aligned 64-byte window (entry[5:0] + 4*(2^Q-1) <= 64), so only the low
// UPD_W = 6 address bits change; the upper bits come from the entry operand.
// Next node address = node address + 2*(k + bit).
//
// Interface: start_i is held high, with act_i, entry_i and crumb_i stable,
// while the instruction is in the execute stage (the core is stalled); in the
// last cycle ready_o is high and result_o holds the two results, first
// activation in bits [Q-1:0], second in bits [2Q-1:Q], the rest zero. The
// memory port is a request/grant port with the read data returned in order,
// with rvalid, at least one cycle after the grant. Comparator inputs are
// forced to zero when no threshold arrives (operand isolation).
//
// The two-region structure, the interleaving, the doubled comparator and
// address-update hardware, the fixed offset to the second tree, the 6-bit
// address update, the 3-bit state machine, operand isolation and the 9/5-cycle
// latency follow the extension's description. The heap layout of the tree,
// the >= comparison, the result packing and the memory handshake are this
// design's choices.
module quant_unit #(
  parameter int unsigned UPD_W = 6   // address bits changed by the update
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        start_i,   // pv.qnt in execute
  input  logic        crumb_i,   // 1: pv.qnt.c (Q=2), 0: pv.qnt.n (Q=4)
  input  logic [31:0] act_i,     // {act1, act0}, signed 16-bit each
  input  logic [31:0] entry_i,   // address of the first tree's root
  output logic        ready_o,
  output logic [31:0] result_o,
  // data memory port
  output logic        data_req_o,
  output logic [31:0] data_addr_o,
  output logic        data_we_o,
  output logic [3:0]  data_be_o,
  input  logic        data_gnt_i,
  input  logic        data_rvalid_i,
  input  logic [31:0] data_rdata_i
);

  typedef enum logic [2:0] {
    QS_IDLE  = 3'd0,  // no operation; start_i makes this the init cycle
    QS_REQ_A = 3'd1,  // next request belongs to activation 0
    QS_REQ_B = 3'd2,  // next request belongs to activation 1
    QS_DRAIN = 3'd3   // all thresholds requested, waiting for the last data
  } qstate_e;

  qstate_e state_q, state_d;

  // Per-activation state: [0] = first activation, [1] = second.
  logic             pend_q [2], pend_d [2];   // request granted, data pending
  logic [2:0]       lvl_q  [2], lvl_d  [2];   // tree levels compared so far
  logic [3:0]       idx_q  [2], idx_d  [2];   // heap index of last request
  logic [UPD_W-1:0] off_q  [2], off_d  [2];   // low address bits of last req
  logic             bit_q  [2], bit_d  [2];   // last comparison result
  logic [3:0]       res_q  [2], res_d  [2];   // result bits, MSB first
  logic             rsp_q, rsp_d;             // owner of the next response

  logic [2:0]       q_lvls;
  logic [UPD_W-1:0] tree_off;
  assign q_lvls   = crumb_i ? 3'd2 : 3'd4;
  assign tree_off = crumb_i ? UPD_W'(6) : UPD_W'(30);  // 2*(2^Q-1) bytes

  // ---------------------------------------------------------------------
  // Address update region: next node of each activation.
  // ---------------------------------------------------------------------
  logic [UPD_W-1:0] nxt_off [2];
  logic [3:0]       nxt_idx [2];

  for (genvar p = 0; p < 2; p++) begin : g_addr
    always_comb begin
      if (lvl_q[p] == 3'd0) begin
        nxt_off[p] = entry_i[UPD_W-1:0] + (p == 1 ? tree_off : '0);
        nxt_idx[p] = 4'd1;
      end else begin
        nxt_off[p] = off_q[p] + UPD_W'({idx_q[p], 1'b0}) + UPD_W'({bit_q[p], 1'b0});
        nxt_idx[p] = {idx_q[p][2:0], bit_q[p]};
      end
    end
  end

  logic turn;   // activation whose request is next
  logic can_req;
  assign turn    = (state_q == QS_REQ_B);
  assign can_req = start_i && (state_q != QS_DRAIN) &&
                   !pend_q[turn] && (lvl_q[turn] < q_lvls);

  assign data_req_o  = can_req;
  assign data_addr_o = {entry_i[31:UPD_W], nxt_off[turn]};
  assign data_we_o   = 1'b0;
  assign data_be_o   = nxt_off[turn][1] ? 4'b1100 : 4'b0011;

  logic granted;
  assign granted = can_req && data_gnt_i;

  // ---------------------------------------------------------------------
  // Comparison region: one comparator per activation, isolated operands.
  // ---------------------------------------------------------------------
  logic             cmp_bit [2];
  logic             rsp_hit [2];

  for (genvar p = 0; p < 2; p++) begin : g_cmp
    logic signed [15:0] cmp_act, cmp_thr;
    assign rsp_hit[p] = start_i && data_rvalid_i && (rsp_q == 1'(p)) && pend_q[p];
    assign cmp_act = rsp_hit[p] ? act_i[p*16 +: 16] : 16'sd0;
    assign cmp_thr = rsp_hit[p] ? (off_q[p][1] ? data_rdata_i[31:16] : data_rdata_i[15:0])
                                : 16'sd0;
    assign cmp_bit[p] = (cmp_act >= cmp_thr);
  end

  // ---------------------------------------------------------------------
  // Control: state machine and per-activation registers.
  // ---------------------------------------------------------------------
  always_comb begin
    state_d = state_q;
    rsp_d   = rsp_q;
    for (int p = 0; p < 2; p++) begin
      pend_d[p] = pend_q[p];
      lvl_d[p]  = lvl_q[p];
      idx_d[p]  = idx_q[p];
      off_d[p]  = off_q[p];
      bit_d[p]  = bit_q[p];
      res_d[p]  = res_q[p];
      if (granted && turn == 1'(p)) begin
        pend_d[p] = 1'b1;
        idx_d[p]  = nxt_idx[p];
        off_d[p]  = nxt_off[p];
      end
      if (rsp_hit[p]) begin
        pend_d[p] = 1'b0;
        lvl_d[p]  = lvl_q[p] + 3'd1;
        bit_d[p]  = cmp_bit[p];
        res_d[p]  = {res_q[p][2:0], cmp_bit[p]};
      end
    end
    if (rsp_hit[0] || rsp_hit[1]) rsp_d = ~rsp_q;

    if (start_i && granted) begin
      if (turn && lvl_q[1] == q_lvls - 3'd1) state_d = QS_DRAIN;
      else                                   state_d = turn ? QS_REQ_A : QS_REQ_B;
    end else if (start_i && state_q == QS_IDLE) begin
      state_d = QS_REQ_A;
    end

    ready_o = start_i && (lvl_d[0] == q_lvls) && (lvl_d[1] == q_lvls);
    if (crumb_i) result_o = {28'd0, res_d[1][1:0], res_d[0][1:0]};
    else         result_o = {24'd0, res_d[1], res_d[0]};

    if (ready_o || !start_i) begin
      state_d = QS_IDLE;
      rsp_d   = 1'b0;
      for (int p = 0; p < 2; p++) begin
        pend_d[p] = 1'b0;
        lvl_d[p]  = 3'd0;
        res_d[p]  = 4'd0;
        bit_d[p]  = 1'b0;
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= QS_IDLE;
      rsp_q   <= 1'b0;
      for (int p = 0; p < 2; p++) begin
        pend_q[p] <= 1'b0;
        lvl_q[p]  <= 3'd0;
        idx_q[p]  <= 4'd0;
        off_q[p]  <= '0;
        bit_q[p]  <= 1'b0;
        res_q[p]  <= 4'd0;
      end
    end else begin
      state_q <= state_d;
      rsp_q   <= rsp_d;
      for (int p = 0; p < 2; p++) begin
        pend_q[p] <= pend_d[p];
        lvl_q[p]  <= lvl_d[p];
        idx_q[p]  <= idx_d[p];
        off_q[p]  <= off_d[p];
        bit_q[p]  <= bit_d[p];
        res_q[p]  <= res_d[p];
      end
    end
  end

  // A request that is not granted keeps its address.
  a_req_stable : assert property (@(posedge clk_i) disable iff (!rst_ni)
    (data_req_o && !data_gnt_i) |=> (data_req_o && $stable(data_addr_o)));

  // The instruction stays in execute until the unit has finished.
  a_start_held : assert property (@(posedge clk_i) disable iff (!rst_ni)
    (state_q != QS_IDLE) |-> start_i);

  // Both trees fit in the 64-byte window whose low bits are updated.
  a_window : assert property (@(posedge clk_i) disable iff (!rst_ni)
    (start_i && state_q == QS_IDLE) |->
      (32'(entry_i[UPD_W-1:0]) + (crumb_i ? 32'd12 : 32'd60) <= 32'd64));

endmodule
