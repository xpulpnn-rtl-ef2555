// xpulpnn_ex: execute stage of the XpulpNN extension.
//
// Brings together the three execution resources that the extension adds to
// a small in-order RISC-V core with DSP extensions:
//   * simd_alu   - packed add/sub/avg/max/min/shift/abs on 16/8/4/2-bit lanes
//   * dotp_unit  - single-cycle (sum-of-)dot-products on 16/8/4/2-bit lanes,
//                  one multiplier region per width with gated input registers
//   * quant_unit - the multi-cycle pv.qnt.{n,c} threshold quantizer, which
//                  loads its thresholds through the core's data port
// The decode stage hands over one decoded operation (ex_op_t) with its three
// register operands per cycle (id_valid_i / id_ready_o handshake). In the
// decode cycle the .sc forms replicate lane 0 of rs2, the operands are
// captured in the decode/execute register and, for dot products, in the
// input register of the selected dot-product region only. In the execute
// cycle the result is produced (wb_valid_o / wb_result_o, written back at the
// end of that cycle). ALU and dot-product operations take one cycle, back to
// back. pv.qnt keeps the instruction in execute and holds id_ready_o low until
// the quantizer finishes (9 cycles for .n, 5 for .c with a one-cycle memory),
// stalling the pipeline behind it; rs1 holds the two 16-bit activations and
// rs2 the address of the first threshold tree.
//
// The data port (data_*) is the quantizer's; in the full core it is muxed
// into the load/store unit. The rest of the core (fetch, decode with the
// instruction encodings, register file, load/store unit, scalar ALU,
// multiplier) is outside this block.
//
// Which unit executes which operation, the stall of the core during pv.qnt
// and the one-cycle dot product follow the extension; the decoded-operation
// format and the handshake to the decode stage are this design's own.
module xpulpnn_ex
  import xpulpnn_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  // from decode
  input  logic        id_valid_i,
  output logic        id_ready_o,
  input  ex_op_t      id_op_i,
  input  logic [31:0] id_a_i,      // rs1
  input  logic [31:0] id_b_i,      // rs2
  input  logic [31:0] id_c_i,      // rD (accumulator of sdot*)
  // write-back
  output logic        wb_valid_o,
  output logic [31:0] wb_result_o,
  // data memory port used by pv.qnt
  output logic        data_req_o,
  output logic [31:0] data_addr_o,
  output logic        data_we_o,
  output logic [3:0]  data_be_o,
  input  logic        data_gnt_i,
  input  logic        data_rvalid_i,
  input  logic [31:0] data_rdata_i
);

  // ---------------------------------------------------------------------
  // Operand preparation (decode side) and decode/execute register.
  // ---------------------------------------------------------------------
  logic [31:0] id_b;
  assign id_b = id_op_i.scalar ? replicate_lane0(id_b_i, id_op_i.vw) : id_b_i;

  logic        issue;
  logic        ex_valid_q;
  ex_op_t      ex_op_q;
  logic [31:0] ex_a_q, ex_b_q;
  logic        ex_done;

  assign issue      = id_valid_i && id_ready_o;
  assign id_ready_o = !ex_valid_q || ex_done;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      ex_valid_q <= 1'b0;
      ex_op_q    <= '0;
      ex_a_q     <= '0;
      ex_b_q     <= '0;
    end else begin
      if (id_ready_o) ex_valid_q <= id_valid_i;
      // dot products keep their operands in the gated region registers
      if (issue && id_op_i.unit != EXU_DOTP) begin
        ex_op_q <= id_op_i;
        ex_a_q  <= id_a_i;
        ex_b_q  <= id_b;
      end else if (issue) begin
        ex_op_q <= id_op_i;
      end
    end
  end

  // ---------------------------------------------------------------------
  // Functional units.
  // ---------------------------------------------------------------------
  logic [31:0] alu_res, dotp_res, qnt_res;
  logic        qnt_start, qnt_ready;

  simd_alu u_alu (
    .op_i    (ex_op_q.alu_op),
    .vw_i    (ex_op_q.vw),
    .a_i     (ex_a_q),
    .b_i     (ex_b_q),
    .result_o(alu_res)
  );

  dotp_unit u_dotp (
    .clk_i,
    .rst_ni,
    .issue_i     (issue && id_op_i.unit == EXU_DOTP),
    .vw_i        (id_op_i.vw),
    .sign_i      (id_op_i.dotp_sign),
    .accumulate_i(id_op_i.accumulate),
    .a_i         (id_a_i),
    .b_i         (id_b),
    .c_i         (id_c_i),
    .result_o    (dotp_res)
  );

  assign qnt_start = ex_valid_q && ex_op_q.unit == EXU_QNT;

  quant_unit u_qnt (
    .clk_i,
    .rst_ni,
    .start_i      (qnt_start),
    .crumb_i      (ex_op_q.vw == VW_C),
    .act_i        (ex_a_q),
    .entry_i      (ex_b_q),
    .ready_o      (qnt_ready),
    .result_o     (qnt_res),
    .data_req_o,
    .data_addr_o,
    .data_we_o,
    .data_be_o,
    .data_gnt_i,
    .data_rvalid_i,
    .data_rdata_i
  );

  // ---------------------------------------------------------------------
  // Result selection and stall.
  // ---------------------------------------------------------------------
  always_comb begin
    unique case (ex_op_q.unit)
      EXU_DOTP: wb_result_o = dotp_res;
      EXU_QNT:  wb_result_o = qnt_res;
      default:  wb_result_o = alu_res;
    endcase
  end

  assign ex_done    = ex_valid_q && (ex_op_q.unit != EXU_QNT || qnt_ready);
  assign wb_valid_o = ex_done;

  // pv.qnt exists for nibble and crumb outputs only.
  a_qnt_width : assert property (@(posedge clk_i) disable iff (!rst_ni)
    qnt_start |-> (ex_op_q.vw == VW_N || ex_op_q.vw == VW_C));

endmodule
