// lmem_stream_reader: turns a region of off-chip memory into a stream of
// 32-bit elements, reading it with a linear access pattern. The region starts
// at byte address `base_addr` and holds `n_elems` elements; since the memory
// is accessed only in whole 96-byte blocks (24 elements), the reader requests
// ceil(n_elems / 24) consecutive blocks and unpacks each, element 0 from the
// lowest 32 bits, sending exactly `n_elems` elements on the output stream.
//
// Interface. `start` (while idle) latches base and length. Block reads go
// out on a valid/ready request channel (byte address of the block); the
// memory answers each request, in order, with one 768-bit response beat
// that is always accepted: the reader keeps at most BUF blocks requested or
// buffered, so there is always room for a response. The output is a
// valid/ready stream; with the output ready on every clock and the memory
// answering in time, one element leaves per clock.
//
// From the reference design: linear access and the 96-byte access granule.
// Own choices: the request/response channel, the in-order single-beat
// response, little-endian element order within a block and the BUF-block
// buffer.
module lmem_stream_reader
  import freq_pkg::*;
#(
  parameter int unsigned BUF = 2,
  localparam int unsigned BW = BLOCK_BYTES * 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] base_addr,
  input  logic [31:0]       n_elems,
  output logic              busy,
  // block read requests and responses
  output logic              req_valid,
  output logic [ADDR_W-1:0] req_addr,
  input  logic              req_ready,
  input  logic              rsp_valid,
  input  logic [BW-1:0]     rsp_data,
  // element stream
  output logic              o_valid,
  output logic [DATA_W-1:0] o_data,
  input  logic              o_ready
);

  localparam int unsigned PW = (BUF > 1) ? $clog2(BUF) : 1;

  logic [31:0]       n_q, req_elems, sent;  // req_elems: elements covered by requests so far
  logic [ADDR_W-1:0] next_addr;
  logic [31:0]       outstanding, stored;
  logic [BW-1:0]     buf_q [BUF];
  logic [PW-1:0]     wp, rp;
  logic [4:0]        word;      // element index within the head block
  logic              active;

  logic req_fire, o_fire, blk_pop;

  assign req_valid = active && (req_elems < n_q) && (outstanding + stored < BUF);
  assign req_addr  = next_addr;
  assign req_fire  = req_valid && req_ready;

  assign o_valid = active && (stored != 0) && (sent < n_q);
  assign o_data  = buf_q[rp][32'(word)*DATA_W +: DATA_W];
  assign o_fire  = o_valid && o_ready;
  assign blk_pop = o_fire && (word == 5'(BLOCK_WORDS - 1) || sent + 1 == n_q);
  assign busy    = active;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (32'(p) == BUF - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; n_q <= '0; req_elems <= '0; sent <= '0;
      next_addr <= '0; outstanding <= '0; stored <= '0; wp <= '0; rp <= '0; word <= '0;
    end else begin
      if (!active) begin
        if (start) begin
          active    <= 1'b1;
          n_q       <= n_elems;
          next_addr <= base_addr;
          req_elems <= '0;
          sent      <= '0;
          word      <= '0;
        end
      end else begin
        if (req_fire) begin
          req_elems <= req_elems + BLOCK_WORDS;
          next_addr <= next_addr + ADDR_W'(BLOCK_BYTES);
        end
        outstanding <= outstanding + 32'(req_fire) - 32'(rsp_valid);
        stored      <= stored + 32'(rsp_valid) - 32'(blk_pop);
        if (rsp_valid) begin
          buf_q[wp] <= rsp_data;
          wp        <= inc(wp);
        end
        if (o_fire) begin
          sent <= sent + 1'b1;
          word <= blk_pop ? '0 : word + 1'b1;
        end
        if (blk_pop) rp <= inc(rp);
        if (sent == n_q && outstanding == 0 && req_elems >= n_q) begin
          active <= 1'b0;
          stored <= '0;
          wp     <= '0;
          rp     <= '0;
        end
      end
    end
  end

  a_rsp: assert property (@(posedge clk) disable iff (!rst_n) rsp_valid |-> outstanding != 0);
  a_buf: assert property (@(posedge clk) disable iff (!rst_n) outstanding + stored <= BUF);

endmodule
