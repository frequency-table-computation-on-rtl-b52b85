// sync_bit: two-flop synchronizer bringing a level signal into the clock
// domain of `clk`. The output follows `d` two to three clocks later;
// RST_VAL is the value held during reset.
module sync_bit #(
  parameter bit RST_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic s1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= RST_VAL;
      q  <= RST_VAL;
    end else begin
      s1 <= d;
      q  <= s1;
    end
  end

endmodule
