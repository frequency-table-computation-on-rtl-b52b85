// tb_workload_benchmark: runs scaled-down versions of the benchmark
// datasets through the engine at its default parameters. Like the benchmark
// sets, each dataset has nominal attributes with values 1..63 and a class
// with values 0..63, drawn uniformly, stored attribute-major with every
// column padded to a whole number of 96-byte blocks. Two sweeps: the number
// of items doubling from 2^11 to 2^22 with one attribute (the
// benchmark's full range of items), and the number of
// attributes doubling from 1 to 64 with 2^11 items (one engine run per
// attribute). Every returned table is compared with one counted here, and
// every run must take 5 kernel clocks (333 MHz) per item plus one manager
// clock (100 MHz) per table word, plus synchronization. The measured
// engine throughput is printed (host overheads not included).
module tb_workload_benchmark;
  import freq_pkg::*;
  localparam int DEPTH = 1 << (DEF_N_A + DEF_N_C), LAT = DEF_LOOP;
  localparam int MAX_WORDS = (1 << 22) + 24;   // one column of 2^22 items, or 64 columns of 2064

  logic clk = 1'b0, k_clk = 1'b0, rst_n = 1'b1;   // clk: manager side, 100 MHz; k_clk: kernel, 333 MHz
  initial #1 rst_n = 1'b0;   // a falling edge, so every domain enters reset before its first clock
  localparam real TM = 10.0, TK = 3.0;
  logic start = 1'b0, busy, done;
  logic [ADDR_W-1:0] att_base = '0, cls_base = '0;
  logic [31:0] items = '0, strm_len = '0;
  logic s_valid, s_ready = 1'b1;
  logic [31:0] s_data;
  logic att_req_valid, att_req_ready, att_rsp_valid;
  logic cls_req_valid, cls_req_ready, cls_rsp_valid;
  logic [ADDR_W-1:0] att_req_addr, cls_req_addr;
  logic [BLOCK_BYTES*8-1:0] att_rsp_data, cls_rsp_data;
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

  lmem_model #(.WORDS(MAX_WORDS), .LAT(8)) att_mem (.clk, .stall_en(1'b0),
    .wr_en(att_wr), .wr_addr, .wr_data,
    .req_valid(att_req_valid), .req_addr(att_req_addr), .req_ready(att_req_ready),
    .rsp_valid(att_rsp_valid), .rsp_data(att_rsp_data));
  lmem_model #(.WORDS(MAX_WORDS), .LAT(8)) cls_mem (.clk, .stall_en(1'b0),
    .wr_en(cls_wr), .wr_addr, .wr_data,
    .req_valid(cls_req_valid), .req_addr(cls_req_addr), .req_ready(cls_req_ready),
    .rsp_valid(cls_rsp_valid), .rsp_data(cls_rsp_data));

  always #(TM / 2) clk = ~clk;
  always #(TK / 2) k_clk = ~k_clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #(1000.0 * 1000.0 * 1000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  logic [31:0] cls_col [MAX_WORDS];
  logic [31:0] att_col [MAX_WORDS];

  // write a dataset of n_att attributes and n items; columns padded to strm words
  task automatic load(input int n_att, input int n, input int strm);
    for (int i = 0; i < strm; i++) begin
      @(negedge clk);
      cls_col[i] = (i < n) ? 32'($urandom_range(63, 0)) : '0;
      cls_wr = 1'b1; att_wr = 1'b0; wr_addr = i; wr_data = cls_col[i];
    end
    for (int w = 0; w < n_att * strm; w++) begin
      @(negedge clk);
      att_col[w] = ((w % strm) < n) ? 32'($urandom_range(63, 1)) : '0;
      cls_wr = 1'b0; att_wr = 1'b1; wr_addr = w; wr_data = att_col[w];
    end
    @(negedge clk);
    cls_wr = 1'b0; att_wr = 1'b0;
  endtask

  // run the engine for every attribute, return the total time in ns
  task automatic run_all(input int n_att, input int n, input int strm, output real total);
    total = 0;
    for (int a = 0; a < n_att; a++) begin
      int ref_tab [DEPTH];
      int k;
      real t0, ns, want;
      for (int i = 0; i < DEPTH; i++) ref_tab[i] = 0;
      for (int i = 0; i < n; i++) ref_tab[{att_col[a * strm + i][5:0], cls_col[i][5:0]}]++;
      @(negedge clk);
      att_base = ADDR_W'(a * strm * 4); cls_base = '0;
      items = n; strm_len = strm; start = 1'b1;
      t0 = $realtime;
      @(negedge clk);
      start = 1'b0;
      k = 0;
      while (!done) begin
        @(posedge clk);
        if (s_valid && s_ready) begin
          checks++;
          if (k >= DEPTH || int'(s_data) != ref_tab[k]) begin
            failures++;
            if (failures < 10) $display("FAIL: attr %0d entry %0d got %0d", a, k, s_data);
          end
          k++;
        end
        @(negedge clk);
      end
      ns = $realtime - t0;
      want = n * LAT * TK + DEPTH * TM;
      check(k == DEPTH, $sformatf("table length %0d", k));
      check(ns >= want && ns <= want + 400.0, $sformatf("%0d items took %0.1f ns, expected %0.1f", n, ns, want));
      total += ns;
    end
  endtask

  initial begin
    real total;
    int n, strm;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (busy) @(negedge clk);
    // sweep the number of items, one attribute
    for (int e = 11; e <= 22; e++) begin
      n = 1 << e;
      strm = ((n + BLOCK_WORDS - 1) / BLOCK_WORDS) * BLOCK_WORDS;
      load(1, n, strm);
      run_all(1, n, strm, total);
      $display("items %7d attributes  1: %10.1f us, %6.2f million items/s (kernel clock 333 MHz)", n, total / 1000.0, n * 1000.0 / total);
    end
    // sweep the number of attributes, 2048 items
    n = 2048;
    strm = ((n + BLOCK_WORDS - 1) / BLOCK_WORDS) * BLOCK_WORDS;
    for (int a = 1; a <= 64; a *= 2) begin
      load(a, n, strm);
      run_all(a, n, strm, total);
      $display("items %7d attributes %2d: %10.1f us, %6.2f million items/s", n, a, total / 1000.0, n * a * 1000.0 / total);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
