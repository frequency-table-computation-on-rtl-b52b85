// reset_sync: reset for one clock domain. The reset asserts as soon as
// `arst_n` goes low (asynchronously) and is released two clocks of `clk`
// after `arst_n` goes high, so every flop of the domain leaves reset on the
// same clock edge.
module reset_sync (
  input  logic clk,
  input  logic arst_n,
  output logic rst_n
);

  logic r1;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin
      r1    <= 1'b0;
      rst_n <= 1'b0;
    end else begin
      r1    <= 1'b1;
      rst_n <= r1;
    end
  end

endmodule
