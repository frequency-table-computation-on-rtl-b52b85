// lmem_model: behavioural model of the off-chip memory as seen through one
// block-read channel (testbench only, not synthesizable). It holds WORDS
// 32-bit words; the testbench fills it through the write port, as the host
// does before a run. A read request carries the byte address of a 96-byte
// block; after LAT clocks the model answers with one 768-bit beat, word 0 in
// the lowest bits. Answers come back in request order. When `stall_en` is high the
// model refuses requests on random clocks (about one in four).
module lmem_model
  import freq_pkg::*;
#(
  parameter int unsigned WORDS = 16384,
  parameter int unsigned LAT   = 6
) (
  input  logic                       clk,
  input  logic                       stall_en,  // refuse requests on random clocks
  input  logic                       wr_en,
  input  logic [31:0]                wr_addr,   // word index
  input  logic [DATA_W-1:0]          wr_data,
  input  logic                       req_valid,
  input  logic [ADDR_W-1:0]          req_addr,
  output logic                       req_ready,
  output logic                       rsp_valid,
  output logic [BLOCK_BYTES*8-1:0]   rsp_data
);

  logic [DATA_W-1:0] mem [WORDS];
  logic              pv [LAT];
  logic [ADDR_W-1:0] pa [LAT];
  int unsigned       stalls = 0;

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
    for (int i = 0; i < LAT; i++) begin pv[i] = 1'b0; pa[i] = '0; end
    req_ready = 1'b0;
  end

  always @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    for (int i = LAT - 1; i > 0; i--) begin pv[i] <= pv[i-1]; pa[i] <= pa[i-1]; end
    pv[0] <= req_valid && req_ready;
    pa[0] <= req_addr;
    if (req_valid && !req_ready) stalls <= stalls + 1;
    req_ready <= stall_en ? ($urandom_range(3) != 0) : 1'b1;
  end

  always_comb begin
    rsp_valid = pv[LAT-1];
    for (int w = 0; w < BLOCK_WORDS; w++) begin
      int unsigned wi;
      wi = int'(pa[LAT-1] / 4) + w;
      rsp_data[w*DATA_W +: DATA_W] = (wi < WORDS) ? mem[wi] : '0;
    end
  end

endmodule
