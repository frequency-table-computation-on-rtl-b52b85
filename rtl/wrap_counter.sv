// wrap_counter: the table address counter (`cnt`) used while the table is
// streamed out and cleared. It counts 0, 1, ..., MAX-1 on each clock that
// `en` is high and wraps to 0; `last` is high while the count is MAX-1, so
// `en && last` marks the final address of a sweep. `clr` returns it to 0.
// MAX defaults to 4096, the number of table words (6 + 6 index bits).
module wrap_counter #(
  parameter int unsigned MAX = 4096,
  localparam int unsigned W  = (MAX > 1) ? $clog2(MAX) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  output logic [W-1:0] count,
  output logic         last
);

  assign last = (count == W'(MAX - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        count <= '0;
    else if (clr)      count <= '0;
    else if (en)       count <= last ? '0 : count + 1'b1;
  end

endmodule
