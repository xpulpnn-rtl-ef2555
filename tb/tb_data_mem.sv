// tb_data_mem: behavioural model of the core's data memory for testbenches.
//
// Word-addressed array behind a request/grant port: a request is granted in
// the cycle it is made unless a pseudo-random stall (probability
// STALL_PCT/100, fixed per cycle, while stall_en_i is high) holds the grant low; the read data of a
// granted read is returned with rvalid in the next cycle. Writes through the
// port update the bytes selected by be. Testbenches fill the array directly.
module tb_data_mem #(
  parameter int unsigned WORDS     = 1024,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        stall_en_i,   // allow random grant stalls
  input  logic        req_i,
  input  logic [31:0] addr_i,
  input  logic        we_i,
  input  logic [3:0]  be_i,
  input  logic [31:0] wdata_i,
  output logic        gnt_o,
  output logic        rvalid_o,
  output logic [31:0] rdata_o
);

  logic [31:0] mem [WORDS];
  logic        stall_q;
  int unsigned stall_cycles = 0;

  localparam int unsigned AW = $clog2(WORDS);

  assign gnt_o = req_i && !(stall_en_i && stall_q);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      stall_q  <= 1'b0;
      rvalid_o <= 1'b0;
      rdata_o  <= '0;
    end else begin
      stall_q  <= ($urandom_range(99) < STALL_PCT);
      rvalid_o <= gnt_o;
      if (req_i && !gnt_o) stall_cycles <= stall_cycles + 1;
      if (gnt_o) begin
        rdata_o <= mem[addr_i[AW+1:2]];
        if (we_i)
          for (int i = 0; i < 4; i++)
            if (be_i[i]) mem[addr_i[AW+1:2]][i*8 +: 8] <= wdata_i[i*8 +: 8];
      end
    end
  end

endmodule
