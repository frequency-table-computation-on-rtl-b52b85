// tb_lmem_stream_reader: checks the linear stream reader against the
// memory model: for several region lengths (a whole number of 96-byte
// blocks, a partial last block, a single element) and base addresses, the
// elements must come out in address order, exactly `n_elems` of them, with
// block requests at consecutive 96-byte addresses and never more than
// needed. One run with a memory that never stalls and an always-ready
// consumer also checks the steady rate of one element per clock.
module tb_lmem_stream_reader;
  import freq_pkg::*;
  localparam int WORDS = 4096;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, busy;
  logic [ADDR_W-1:0] base_addr = '0;
  logic [31:0] n_elems = '0;
  logic req_valid, req_ready, rsp_valid;
  logic [ADDR_W-1:0] req_addr;
  logic [BLOCK_BYTES*8-1:0] rsp_data;
  logic o_valid, o_ready = 1'b0;
  logic [31:0] o_data;
  logic wr_en = 1'b0;
  logic [31:0] wr_addr = '0, wr_data = '0;
  logic stall_mem = 1'b1;

  int checks = 0, failures = 0;
  longint cyc = 0;

  lmem_stream_reader dut (.clk, .rst_n, .start, .base_addr, .n_elems, .busy,
    .req_valid, .req_addr, .req_ready, .rsp_valid, .rsp_data,
    .o_valid, .o_data, .o_ready);

  lmem_model #(.WORDS(WORDS), .LAT(4)) mem (.clk, .stall_en(stall_mem), .wr_en, .wr_addr, .wr_data,
    .req_valid, .req_addr, .req_ready, .rsp_valid, .rsp_data);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pattern(int w);
    return 32'h5A00_0000 ^ (w * 32'h9E37) ^ 32'(w);
  endfunction

  task automatic run(input int base_blk, input int n, input bit rnd, output longint span);
    int got = 0, reqs = 0;
    longint first = -1, last = -1;
    logic [ADDR_W-1:0] want_addr;
    want_addr = ADDR_W'(base_blk * BLOCK_BYTES);
    stall_mem = rnd;
    @(negedge clk);
    base_addr = want_addr; n_elems = n; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (busy) begin
      o_ready = !rnd || $urandom_range(3) != 0;
      @(posedge clk);
      if (req_valid && req_ready) begin
        check(req_addr == want_addr, $sformatf("request %0d at %0h, want %0h", reqs, req_addr, want_addr));
        want_addr += BLOCK_BYTES;
        reqs++;
      end
      if (o_valid && o_ready) begin
        check(o_data == pattern(base_blk * BLOCK_WORDS + got), $sformatf("element %0d = %0h", got, o_data));
        if (first < 0) first = cyc;
        last = cyc;
        got++;
      end
      @(negedge clk);
    end
    o_ready = 1'b0;
    check(got == n, $sformatf("%0d elements, want %0d", got, n));
    check(reqs == (n + BLOCK_WORDS - 1) / BLOCK_WORDS, $sformatf("%0d block requests for %0d elements", reqs, n));
    span = last - first + 1;
  endtask

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  initial begin
    longint span;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // fill the memory model, as the host does before a run
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = w; wr_data = pattern(w);
    end
    @(negedge clk);
    wr_en = 1'b0;
    run(0, 240, 1, span);
    run(3, 100, 1, span);
    run(10, 1, 1, span);
    run(20, 1000, 0, span);
    check(span == 1000, $sformatf("1000 elements took %0d clocks unstalled", span));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
