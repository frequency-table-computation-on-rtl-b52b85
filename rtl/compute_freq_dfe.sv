// compute_freq_dfe: the dataflow engine around one frequency-table kernel.
// The host writes the attribute column and the class column of a dataset
// to off-chip memory once; for each attribute it then gives the two start
// addresses and the scalars `items` and `strm_len` and pulses `start`. Two
// linear stream readers fetch the att and attClass streams, `strm_len`
// elements each, in 96-byte blocks; the kernel counts the (att, class) pairs
// of the first `items` elements and returns the table of 2^(N_A+N_C) 32-bit
// counts on the stream `s` to the host, clearing it as it goes.
//
// Clocks. As in the reference engine there are two clock domains: the
// manager side (`mgr_clk`, 100 MHz there), which holds the memory readers
// and every port of this module, and the kernel (`k_clk`, 333 MHz there).
// The three streams cross in async_fifo instances; `start` and the kernel's
// `done` cross as pulses (pulse_sync), the kernel's busy level through
// sync_bit. `items` and `strm_len` are registered on the manager side at
// `start` and held, so the kernel samples stable values. Each domain has its
// own synchronized reset from `rst_n`.
//
// Interface (all on `mgr_clk`). Host side: `start` (taken only while `busy`
// is low), the byte addresses `att_base`/`cls_base` (multiples of 96),
// `items`, `strm_len`, `busy`, a one-clock `done` once the last table word
// has been taken from `s`, and the valid/ready output stream `s`. Memory
// side: for each input stream one block-read channel, a request
// (valid/ready, byte address) and an in-order 768-bit response beat; the
// memory itself and its controller are outside this design.
//
// Timing: with the memory keeping up, a run takes 5 kernel clocks per item
// of interest, then one manager clock per table word (the read-out is paced
// by the 32-bit host stream), plus some 20 clocks of synchronization. From
// the reference design: one kernel, streams from memory with linear access,
// output and scalars to the host, the two clock domains. Own choices: the
// clock-crossing FIFOs and synchronizers, the start/busy/done handshake and
// the memory channels.
module compute_freq_dfe
  import freq_pkg::*;
#(
  parameter int unsigned N_A      = DEF_N_A,
  parameter int unsigned N_C      = DEF_N_C,
  parameter int unsigned LOOP_LAT = DEF_LOOP,
  parameter int unsigned BUF      = 2,
  parameter int unsigned FIFO_AW  = 4,
  localparam int unsigned BW      = BLOCK_BYTES * 8
) (
  input  logic              mgr_clk,
  input  logic              k_clk,
  input  logic              rst_n,
  // host side
  input  logic              start,
  input  logic [ADDR_W-1:0] att_base,
  input  logic [ADDR_W-1:0] cls_base,
  input  logic [31:0]       items,
  input  logic [31:0]       strm_len,
  output logic              busy,
  output logic              done,
  output logic              s_valid,
  output logic [DATA_W-1:0] s_data,
  input  logic              s_ready,
  // memory side, attribute stream
  output logic              att_req_valid,
  output logic [ADDR_W-1:0] att_req_addr,
  input  logic              att_req_ready,
  input  logic              att_rsp_valid,
  input  logic [BW-1:0]     att_rsp_data,
  // memory side, class stream
  output logic              cls_req_valid,
  output logic [ADDR_W-1:0] cls_req_addr,
  input  logic              cls_req_ready,
  input  logic              cls_rsp_valid,
  input  logic [BW-1:0]     cls_rsp_data
);

  // ---------------- resets
  logic m_rst_n, k_rst_n;
  reset_sync u_mrst (.clk(mgr_clk), .arst_n(rst_n), .rst_n(m_rst_n));
  reset_sync u_krst (.clk(k_clk),   .arst_n(rst_n), .rst_n(k_rst_n));

  // ---------------- manager-side control
  logic a_busy, c_busy, k_busy, k_busy_m, k_done, k_done_m, k_start;
  logic go, run_active, done_pending;
  logic [31:0] items_q, strm_q;

  assign busy = run_active || k_busy_m || a_busy || c_busy;
  assign go   = start && !busy;

  always_ff @(posedge mgr_clk or negedge m_rst_n) begin
    if (!m_rst_n) begin
      items_q <= '0; strm_q <= '0;
      run_active <= 1'b0; done_pending <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (go) begin
        items_q    <= items;
        strm_q     <= strm_len;
        run_active <= 1'b1;
      end
      if (k_done_m) done_pending <= 1'b1;
      // finished once the kernel is done and its last word has left `s`
      if (done_pending && !s_valid) begin
        done_pending <= 1'b0;
        run_active   <= 1'b0;
        done         <= 1'b1;
      end
    end
  end

  // start one clock after go, so the kernel sees the registered scalars
  logic go_q;
  always_ff @(posedge mgr_clk or negedge m_rst_n) begin
    if (!m_rst_n) go_q <= 1'b0;
    else          go_q <= go;
  end

  pulse_sync u_start_sync (.sclk(mgr_clk), .srst_n(m_rst_n), .s_pulse(go_q),
                           .dclk(k_clk), .drst_n(k_rst_n), .d_pulse(k_start));
  pulse_sync u_done_sync  (.sclk(k_clk), .srst_n(k_rst_n), .s_pulse(k_done),
                           .dclk(mgr_clk), .drst_n(m_rst_n), .d_pulse(k_done_m));
  sync_bit #(.RST_VAL(1'b1)) u_busy_sync (.clk(mgr_clk), .rst_n(m_rst_n), .d(k_busy), .q(k_busy_m));

  // ---------------- memory readers (manager clock)
  logic              ma_valid, ma_ready, mc_valid, mc_ready;
  logic [DATA_W-1:0] ma_data, mc_data;

  lmem_stream_reader #(.BUF(BUF)) u_att_rd (
    .clk(mgr_clk), .rst_n(m_rst_n), .start(go), .base_addr(att_base), .n_elems(strm_len), .busy(a_busy),
    .req_valid(att_req_valid), .req_addr(att_req_addr), .req_ready(att_req_ready),
    .rsp_valid(att_rsp_valid), .rsp_data(att_rsp_data),
    .o_valid(ma_valid), .o_data(ma_data), .o_ready(ma_ready)
  );

  lmem_stream_reader #(.BUF(BUF)) u_cls_rd (
    .clk(mgr_clk), .rst_n(m_rst_n), .start(go), .base_addr(cls_base), .n_elems(strm_len), .busy(c_busy),
    .req_valid(cls_req_valid), .req_addr(cls_req_addr), .req_ready(cls_req_ready),
    .rsp_valid(cls_rsp_valid), .rsp_data(cls_rsp_data),
    .o_valid(mc_valid), .o_data(mc_data), .o_ready(mc_ready)
  );

  // ---------------- clock crossings
  logic              att_valid, att_ready, cls_valid, cls_ready, ks_valid, ks_ready;
  logic [DATA_W-1:0] att_data, cls_data, ks_data;

  async_fifo #(.W(DATA_W), .AW(FIFO_AW)) u_att_cdc (
    .wclk(mgr_clk), .wrst_n(m_rst_n), .w_valid(ma_valid), .w_data(ma_data), .w_ready(ma_ready),
    .rclk(k_clk), .rrst_n(k_rst_n), .r_valid(att_valid), .r_data(att_data), .r_ready(att_ready)
  );
  async_fifo #(.W(DATA_W), .AW(FIFO_AW)) u_cls_cdc (
    .wclk(mgr_clk), .wrst_n(m_rst_n), .w_valid(mc_valid), .w_data(mc_data), .w_ready(mc_ready),
    .rclk(k_clk), .rrst_n(k_rst_n), .r_valid(cls_valid), .r_data(cls_data), .r_ready(cls_ready)
  );
  async_fifo #(.W(DATA_W), .AW(FIFO_AW)) u_s_cdc (
    .wclk(k_clk), .wrst_n(k_rst_n), .w_valid(ks_valid), .w_data(ks_data), .w_ready(ks_ready),
    .rclk(mgr_clk), .rrst_n(m_rst_n), .r_valid(s_valid), .r_data(s_data), .r_ready(s_ready)
  );

  // ---------------- kernel (kernel clock)
  compute_freq #(.N_A(N_A), .N_C(N_C), .LOOP_LAT(LOOP_LAT)) u_kernel (
    .clk(k_clk), .rst_n(k_rst_n), .start(k_start), .items(items_q), .strm_len(strm_q),
    .busy(k_busy), .done(k_done),
    .att_valid, .att_data, .att_ready,
    .cls_valid, .cls_data, .cls_ready,
    .s_valid(ks_valid), .s_data(ks_data), .s_ready(ks_ready)
  );

endmodule
