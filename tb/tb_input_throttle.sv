// tb_input_throttle: checks the input throttle at M = 5: with data always
// offered in throttled mode one element is taken every 5 clocks exactly; in
// free mode one per clock; with no mode nothing; with a random valid the
// throttled accepts stay at least 5 clocks apart and none is lost.
module tb_input_throttle;
  localparam int M = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic thr = 1'b0, free = 1'b0, in_valid = 1'b0, in_ready, take;
  int checks = 0, failures = 0;

  input_throttle #(.M(M)) dut (.clk, .rst_n, .thr, .free, .in_valid, .in_ready, .take);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit t, input bit f, input bit rnd, input int cycles,
                     output int takes, output int min_gap);
    int last;
    takes = 0; min_gap = 1 << 30; last = -1000;
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      thr = t; free = f;
      in_valid = rnd ? ($urandom_range(2) == 0) : 1'b1;
      #1;
      checks++;
      if (take !== (in_valid && (f || (t && in_ready)))) begin failures++; $display("take mismatch"); end
      if (take) begin
        if (t && !f && !rnd && takes > 0) begin
          checks++;
          if (c - last != M) begin failures++; $display("throttled spacing %0d", c - last); end
        end
        if (c - last < min_gap) min_gap = c - last;
        last = c;
        takes++;
      end
    end
    @(negedge clk); thr = 1'b0; free = 1'b0; in_valid = 1'b0;
    repeat (M) @(negedge clk);
  endtask

  initial begin
    int tk, gap;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    run(1, 0, 0, 100, tk, gap);
    checks++;
    if (tk != 20 || gap != M) begin failures++; $display("throttled: %0d takes, gap %0d", tk, gap); end
    run(0, 1, 0, 100, tk, gap);
    checks++;
    if (tk != 100 || gap != 1) begin failures++; $display("free: %0d takes, gap %0d", tk, gap); end
    run(0, 0, 0, 50, tk, gap);
    checks++;
    if (tk != 0) begin failures++; $display("idle: %0d takes", tk); end
    run(1, 0, 1, 1000, tk, gap);
    checks++;
    if (gap < M || tk < 100) begin failures++; $display("random throttled: %0d takes, gap %0d", tk, gap); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
