// freq_ram: single-port block RAM with read-first behaviour, holding the
// frequency table. One address port serves both reading and writing: on every
// clock the word at `addr` is registered onto `rdata` and, if `we` is high,
// `wdata` is then written to the same word, so `rdata` shows the value from
// before the write (read-first). Read latency is one clock.
// The single-port, read-first configuration follows the reference design;
// the contents start at zero (FPGA block RAM initial value) and the kernel
// also clears the table itself after reset.
module freq_ram #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr,
  input  logic             we,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    rdata <= mem[addr];
    if (we) mem[addr] <= wdata;
  end

endmodule
