// tb_wrap_counter: checks the table address counter against a reference
// count: it advances only when enabled, wraps from MAX-1 to 0, flags the
// last value, clears on request; once at a small MAX and once at the
// default of 4096 (a full sweep).
module tb_wrap_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clr = 1'b0, en = 1'b0;
  logic [2:0] cnt5;
  logic last5;
  logic [11:0] cntf;
  logic lastf;
  int checks = 0, failures = 0;
  int ref5 = 0, reff = 0, wraps = 0;

  wrap_counter #(.MAX(5)) dut5 (.clk, .rst_n, .clr, .en, .count(cnt5), .last(last5));
  wrap_counter dutf (.clk, .rst_n, .clr, .en, .count(cntf), .last(lastf));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 10000; n++) begin
      @(negedge clk);
      checks++;
      if (int'(cnt5) != ref5 || last5 != (ref5 == 4) || int'(cntf) != reff || lastf != (reff == 4095)) begin
        failures++;
        $display("n=%0d cnt5=%0d/%0d last5=%0d cntf=%0d/%0d", n, cnt5, ref5, last5, cntf, reff);
      end
      en  = (n < 9000) ? ($urandom_range(3) != 0) : 1'b1;
      clr = (n == 500);
      if (clr) begin ref5 = 0; reff = 0; end
      else if (en) begin
        if (reff == 4095) wraps++;
        ref5 = (ref5 == 4) ? 0 : ref5 + 1;
        reff = (reff == 4095) ? 0 : reff + 1;
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("full counter never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
