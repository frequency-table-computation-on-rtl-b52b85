// tb_compute_freq: self-checking test of the frequency-table kernel with a
// 4 + 3 bit index (128-word table) and the default loop latency of 5.
// Several runs, each against a table counted in the testbench from the same
// random streams (with junk in the high bits that the index must ignore):
// a run with inputs and output always ready checks the rates (one item per
// 5 clocks while counting, one drained element and one output word per
// clock afterwards); others use random valid/ready gaps, no items at all,
// and `items` larger than `strm_len`. Each run starts from the table left by
// the one before, so a read-out that does not clear shows up as wrong counts.
module tb_compute_freq;
  import freq_pkg::*;
  localparam int NA = 4, NC = 3, LAT = 5, DEPTH = 1 << (NA + NC);
  localparam longint LLAT = longint'(LAT), LDEPTH = longint'(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, busy, done;
  logic [31:0] items = '0, strm_len = '0;
  logic att_valid = 1'b0, att_ready, cls_valid = 1'b0, cls_ready;
  logic [31:0] att_data = '0, cls_data = '0;
  logic s_valid, s_ready = 1'b0;
  logic [31:0] s_data;

  int checks = 0, failures = 0;
  longint cyc = 0;

  compute_freq #(.N_A(NA), .N_C(NC), .LOOP_LAT(LAT)) dut (
    .clk, .rst_n, .start, .items, .strm_len, .busy, .done,
    .att_valid, .att_data, .att_ready, .cls_valid, .cls_data, .cls_ready,
    .s_valid, .s_data, .s_ready
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  // one run: returns nothing, checks inside
  task automatic run(input int n_items, input int n_strm, input bit rnd_in, input bit rnd_out);
    logic [31:0] att_s [], cls_s [];
    int ref_tab [DEPTH];
    int got [$];
    longint take_cyc [$];
    longint first_s, last_s;
    int ia, ic, eff;
    att_s = new[n_strm];
    cls_s = new[n_strm];
    for (int i = 0; i < DEPTH; i++) ref_tab[i] = 0;
    eff = (n_items < n_strm) ? n_items : n_strm;
    for (int i = 0; i < n_strm; i++) begin
      att_s[i] = $urandom;
      cls_s[i] = $urandom;
      if (i < eff) ref_tab[{att_s[i][NA-1:0], cls_s[i][NC-1:0]}]++;
    end
    ia = 0; ic = 0; first_s = -1; last_s = -1;
    @(negedge clk);
    items = n_items; strm_len = n_strm; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(busy, "busy after start");
    while (busy) begin
      // drive inputs for this clock
      att_valid = (ia < n_strm) && (!rnd_in || $urandom_range(2) != 0);
      cls_valid = (ic < n_strm) && (!rnd_in || $urandom_range(2) != 0);
      att_data  = (ia < n_strm) ? att_s[ia] : '0;
      cls_data  = (ic < n_strm) ? cls_s[ic] : '0;
      s_ready   = !rnd_out || $urandom_range(3) != 0;
      @(posedge clk);
      if (att_valid && att_ready) begin ia++; take_cyc.push_back(cyc); end
      if (cls_valid && cls_ready) ic++;
      if (s_valid && s_ready) begin
        got.push_back(int'(s_data));
        if (first_s < 0) first_s = cyc;
        last_s = cyc;
      end
      @(negedge clk);
    end
    att_valid = 1'b0; cls_valid = 1'b0;
    check(ia == n_strm && ic == n_strm, $sformatf("all %0d elements consumed (att %0d cls %0d)", n_strm, ia, ic));
    check(got.size() == DEPTH, $sformatf("table length %0d", got.size()));
    for (int i = 0; i < DEPTH && i < got.size(); i++)
      check(got[i] == ref_tab[i], $sformatf("entry %0d: got %0d want %0d", i, got[i], ref_tab[i]));
    if (!rnd_in && !rnd_out) begin
      // rate of the counting phase: one item per LAT clocks
      for (int i = 1; i < eff; i++)
        check(take_cyc[i] - take_cyc[i-1] == LLAT, $sformatf("item %0d spacing %0d", i, take_cyc[i] - take_cyc[i-1]));
      // the rest of the stream drains at one element per clock
      for (int i = eff + 1; i < n_strm; i++)
        check(take_cyc[i] - take_cyc[i-1] == 1, $sformatf("drain %0d spacing %0d", i, take_cyc[i] - take_cyc[i-1]));
      // the table leaves at one word per clock
      check(last_s - first_s == LDEPTH - 1, $sformatf("read-out took %0d clocks", last_s - first_s + 1));
    end
  endtask

  initial begin
    longint t0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    t0 = cyc;
    // the clear sweep after reset
    while (busy) @(posedge clk);
    check(cyc - t0 >= LDEPTH && cyc - t0 <= LDEPTH + 2, $sformatf("clear sweep took %0d clocks", cyc - t0));
    @(negedge clk);
    run(200, 240, 0, 0);
    run(300, 300, 1, 1);
    run(0, 48, 1, 0);
    run(500, 96, 0, 1);
    run(1000, 1032, 1, 1);
    run(64, 72, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
