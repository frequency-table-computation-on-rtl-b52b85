// tb_async_fifo: checks the clock-crossing FIFO (16 entries) with a write
// clock of 10 ns and a read clock of 3 ns, then the other way round.
// Random valid and ready on both sides; every word read must be the next
// one written, none lost or repeated. With the reader stopped, the writer
// must be able to put exactly 16 words in and then see `w_ready` low.
module tb_async_fifo;
  localparam int W = 32, AW = 4;
  logic fast = 1'b0, slow = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  logic sel = 1'b0;              // 0: write slow / read fast, 1: the reverse
  logic wclk, rclk;
  logic w_valid = 1'b0, w_ready, r_valid, r_ready = 1'b0;
  logic [W-1:0] w_data = '0, r_data;
  int checks = 0, failures = 0;

  assign wclk = sel ? fast : slow;
  assign rclk = sel ? slow : fast;

  async_fifo #(.W(W), .AW(AW)) dut (.wclk, .wrst_n(rst_n), .w_valid, .w_data, .w_ready,
                                    .rclk, .rrst_n(rst_n), .r_valid, .r_data, .r_ready);

  always #5 slow = ~slow;
  always #1.5 fast = ~fast;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_wr = 0, n_rd = 0;
  bit rnd_w, rnd_r;

  task automatic writer(input int n);
    while (n_wr < n) begin
      @(negedge wclk);
      w_data  = 32'h1000_0000 + n_wr;
      w_valid = !rnd_w || $urandom_range(1) == 1;
      @(posedge wclk);
      if (w_valid && w_ready) n_wr++;
    end
    @(negedge wclk);
    w_valid = 1'b0;
  endtask

  task automatic phase(input bit s, input int n, input bit rw, input bit rr);
    @(negedge slow);
    rst_n = 1'b0; sel = s; n_wr = 0; n_rd = 0; rnd_w = rw; rnd_r = rr;
    repeat (3) @(negedge slow);
    rst_n = 1'b1;
    repeat (3) @(negedge slow);
    fork
      writer(n);
      begin
        while (n_rd < n) begin
          @(negedge rclk);
          r_ready = !rnd_r || $urandom_range(2) == 0;
          @(posedge rclk);
          if (r_valid && r_ready) begin
            checks++;
            if (r_data != 32'h1000_0000 + n_rd) begin
              failures++;
              if (failures < 10) $display("FAIL: word %0d = %0h", n_rd, r_data);
            end
            n_rd++;
          end
        end
        @(negedge rclk);
        r_ready = 1'b0;
      end
    join
    repeat (10) @(negedge slow);
    checks++;
    if (r_valid) begin failures++; $display("FAIL: FIFO not empty after %0d words", n); end
  endtask

  initial begin
    phase(0, 2000, 1, 1);
    phase(1, 2000, 1, 1);
    phase(0, 500, 0, 0);
    phase(1, 500, 0, 0);
    // fill test: reader stopped
    @(negedge slow);
    rst_n = 1'b0; sel = 1'b0; n_wr = 0; n_rd = 0; rnd_w = 0;
    repeat (3) @(negedge slow);
    rst_n = 1'b1;
    repeat (3) @(negedge slow);
    fork
      writer(100);
    join_none
    repeat (60) @(negedge slow);
    checks++;
    if (n_wr != (1 << AW) || w_ready) begin failures++; $display("FAIL: %0d words taken with reader stopped, w_ready %0d", n_wr, w_ready); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
