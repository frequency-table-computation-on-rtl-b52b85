// tb_compute_freq_dfe: end-to-end test of the dataflow engine with every
// parameter at its default (6 + 6 index bits, 4096-word table, loop latency
// 5). A small dataset in the style of the benchmark sets (attribute values
// 1..63, class values 0..63, uniformly random, stored attribute-major: one
// column per attribute plus one class column) is written into two memory
// models; the engine is then run once per attribute, as the host does, and
// each returned table is compared with one counted here. Runs cover: memory
// and output always ready (the run time must be 5 kernel clocks per item
// plus one manager clock per table word, plus synchronization), random memory stalls and
// output back-pressure, a stream longer than the items of interest (the
// rest is drained), `items` above `strm_len`, and junk in the high bits of
// the values. It counts how often each mechanism happened and fails if one
// never did.
module tb_compute_freq_dfe;
  import freq_pkg::*;
  localparam int NA = DEF_N_A, NC = DEF_N_C, LAT = DEF_LOOP, DEPTH = 1 << (NA + NC);
  localparam int ITEMS = 2000;
  localparam int STRM  = ((ITEMS + BLOCK_WORDS - 1) / BLOCK_WORDS) * BLOCK_WORDS;  // 2016
  localparam int N_ATT = 3;
  localparam int ATT_WORDS = N_ATT * STRM, CLS_WORDS = STRM;

  logic clk = 1'b0, k_clk = 1'b0, rst_n = 1'b1;   // clk: manager side, 100 MHz; k_clk: kernel, 333 MHz
  initial #1 rst_n = 1'b0;   // a falling edge, so every domain enters reset before its first clock
  localparam real TM = 10.0, TK = 3.0;
  logic start = 1'b0, busy, done;
  logic [ADDR_W-1:0] att_base = '0, cls_base = '0;
  logic [31:0] items = '0, strm_len = '0;
  logic s_valid, s_ready = 1'b0;
  logic [31:0] s_data;
  logic att_req_valid, att_req_ready, att_rsp_valid;
  logic cls_req_valid, cls_req_ready, cls_rsp_valid;
  logic [ADDR_W-1:0] att_req_addr, cls_req_addr;
  logic [BLOCK_BYTES*8-1:0] att_rsp_data, cls_rsp_data;
  logic stall_mem = 1'b0;
  logic att_wr = 1'b0, cls_wr = 1'b0;
  logic [31:0] wr_addr = '0, wr_data = '0;

  int checks = 0, failures = 0;
  longint cyc = 0;

  compute_freq_dfe dut (
    .mgr_clk(clk), .k_clk, .rst_n, .start, .att_base, .cls_base, .items, .strm_len, .busy, .done,
    .s_valid, .s_data, .s_ready,
    .att_req_valid, .att_req_addr, .att_req_ready, .att_rsp_valid, .att_rsp_data,
    .cls_req_valid, .cls_req_addr, .cls_req_ready, .cls_rsp_valid, .cls_rsp_data
  );

  lmem_model #(.WORDS(ATT_WORDS), .LAT(8)) att_mem (.clk, .stall_en(stall_mem),
    .wr_en(att_wr), .wr_addr, .wr_data,
    .req_valid(att_req_valid), .req_addr(att_req_addr), .req_ready(att_req_ready),
    .rsp_valid(att_rsp_valid), .rsp_data(att_rsp_data));
  lmem_model #(.WORDS(CLS_WORDS), .LAT(8)) cls_mem (.clk, .stall_en(stall_mem),
    .wr_en(cls_wr), .wr_addr, .wr_data,
    .req_valid(cls_req_valid), .req_addr(cls_req_addr), .req_ready(cls_req_ready),
    .rsp_valid(cls_rsp_valid), .rsp_data(cls_rsp_data));

  always #(TM / 2) clk = ~clk;
  always #(TK / 2) k_clk = ~k_clk;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_throttled = 0, n_writeback = 0, n_drained = 0, n_readout = 0, n_s_stall = 0;
  int n_mem_stall = 0, n_clip = 0, n_clear = 0, n_done = 0, n_junk = 0;
  int n_k_stall = 0;
  always @(posedge k_clk) if (dut.k_rst_n) begin
    if (dut.u_kernel.acc_fire) n_throttled++;
    if (dut.u_kernel.wr_stage) n_writeback++;
    if (dut.u_kernel.take && dut.u_kernel.free) n_drained++;
    if (dut.u_kernel.rd_issue) n_readout++;
    if (dut.ks_valid && !dut.ks_ready) n_k_stall++;
    if (dut.u_kernel.state == K_CLEAR) n_clear++;
  end
  always @(posedge clk) if (dut.m_rst_n) begin
    if (s_valid && !s_ready) n_s_stall++;
    if ((att_req_valid && !att_req_ready) || (cls_req_valid && !cls_req_ready)) n_mem_stall++;
    if (done) n_done++;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  logic [31:0] att_col [N_ATT][STRM];
  logic [31:0] cls_col [STRM];

  task automatic run(input int a, input int n_items, input bit rnd, output real ns);
    int ref_tab [DEPTH];
    int got [$];
    int eff;
    real t0;
    eff = (n_items < STRM) ? n_items : STRM;
    if (n_items > STRM) n_clip++;
    for (int i = 0; i < DEPTH; i++) ref_tab[i] = 0;
    for (int i = 0; i < eff; i++) ref_tab[{att_col[a][i][NA-1:0], cls_col[i][NC-1:0]}]++;
    stall_mem = rnd;
    @(negedge clk);
    att_base = ADDR_W'(a * STRM * 4);
    cls_base = '0;
    items = n_items; strm_len = STRM; start = 1'b1;
    t0 = $realtime;
    @(negedge clk);
    start = 1'b0;
    while (!done) begin
      s_ready = !rnd || $urandom_range(3) != 0;
      @(posedge clk);
      if (s_valid && s_ready) got.push_back(int'(s_data));
      @(negedge clk);
    end
    ns = $realtime - t0;
    s_ready = 1'b0;
    @(negedge clk);
    check(!busy, "idle after done");
    check(got.size() == DEPTH, $sformatf("attribute %0d: table length %0d", a, got.size()));
    for (int i = 0; i < DEPTH && i < got.size(); i++)
      check(got[i] == ref_tab[i], $sformatf("attribute %0d entry %0d: got %0d want %0d", a, i, got[i], ref_tab[i]));
  endtask

  initial begin
    real ns, want;
    // dataset: attribute values 1..63, class values 0..63
    for (int i = 0; i < STRM; i++) begin
      for (int a = 0; a < N_ATT; a++) att_col[a][i] = 32'($urandom_range(63, 1));
      cls_col[i] = 32'($urandom_range(63, 0));
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // host writes the columns to memory
    for (int a = 0; a < N_ATT; a++)
      for (int i = 0; i < STRM; i++) begin
        @(negedge clk);
        att_wr = 1'b1; wr_addr = a * STRM + i; wr_data = att_col[a][i];
      end
    @(negedge clk);
    att_wr = 1'b0; cls_wr = 1'b0;
    for (int i = 0; i < STRM; i++) begin
      @(negedge clk);
      cls_wr = 1'b1; wr_addr = i; wr_data = cls_col[i];
    end
    @(negedge clk);
    cls_wr = 1'b0;
    while (busy) @(negedge clk);
    check(n_clear >= DEPTH, $sformatf("clear sweep %0d clocks", n_clear));

    // one full operation, nothing stalls: check the rate
    run(0, ITEMS, 0, ns);
    // 5 kernel clocks per item, then one manager clock per table word
    want = ITEMS * LAT * TK + DEPTH * TM;
    check(ns >= want && ns <= want + 400.0,
          $sformatf("run took %0.1f ns, expected %0.1f ns + synchronization", ns, want));
    $display("run of %0d items: %0.1f ns (%0.1f ns for %0d items at %0d kernel clocks + %0d words at one manager clock)",
             ITEMS, ns, want, ITEMS, LAT, DEPTH);
    // the other attributes, with stalls and back-pressure, and a drained tail
    run(1, ITEMS, 1, ns);
    run(2, 1500, 1, ns);
    // items above strm_len: clipped
    run(1, 3000, 0, ns);
    // junk in the high bits of the class column: only the low 6 bits count
    for (int i = 0; i < STRM; i++) begin
      @(negedge clk);
      cls_col[i] = {26'($urandom_range(32'h3FF_FFFF)), cls_col[i][5:0]};
      cls_wr = 1'b1; wr_addr = i; wr_data = cls_col[i];
      n_junk++;
    end
    @(negedge clk);
    cls_wr = 1'b0;
    run(2, ITEMS, 1, ns);

    check(n_throttled > 0, "throttled item accepts");
    check(n_writeback == n_throttled, $sformatf("write-backs %0d vs items %0d", n_writeback, n_throttled));
    check(n_drained > 0, "drained elements");
    check(n_readout == 5 * DEPTH, $sformatf("read-out words %0d", n_readout));
    check(n_s_stall > 0, "output back-pressure");
    check(n_mem_stall > 0, "memory stalls");
    check(n_clip > 0, "items clipped to strm_len");
    check(n_done == 5, $sformatf("done pulses %0d", n_done));
    check(n_k_stall > 0, "kernel read-out held back by the clock crossing");
    $display("kernel stalls on s crossing=%0d", n_k_stall);
    $display("mechanisms: throttled=%0d writeback=%0d drained=%0d readout=%0d s_stall=%0d mem_stall=%0d clip=%0d clear=%0d junk=%0d",
             n_throttled, n_writeback, n_drained, n_readout, n_s_stall, n_mem_stall, n_clip, n_clear, n_junk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
