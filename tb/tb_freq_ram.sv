// tb_freq_ram: checks the single-port read-first table RAM against a
// reference array: random reads and writes, where a write's clock must
// return the word's old value and a later read the new one; and the initial
// contents must be zero.
module tb_freq_ram;
  localparam int DEPTH = 64, WIDTH = 32;
  logic clk = 1'b0;
  logic [5:0] addr = '0;
  logic we = 1'b0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  freq_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .addr, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] expect_v;
    for (int i = 0; i < DEPTH; i++) ref_mem[i] = '0;
    // initial contents are zero
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); addr = 6'(i); we = 1'b0;
      @(posedge clk); #1;
      checks++;
      if (rdata !== '0) begin failures++; $display("init addr %0d = %0h", i, rdata); end
    end
    // random traffic
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      addr  = 6'($urandom_range(DEPTH - 1));
      we    = ($urandom_range(1) == 1);
      wdata = $urandom;
      expect_v = ref_mem[addr];
      if (we) ref_mem[addr] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata !== expect_v) begin
        failures++;
        $display("addr %0d we %0d: got %0h want %0h", addr, we, rdata, expect_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
