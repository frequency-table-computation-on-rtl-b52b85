// input_throttle: flow control on the kernel's joined input streams. In
// throttled mode (`thr`) it lets one element through and then refuses the
// next M-1 clocks, so that an element enters the read-increment-write loop at
// most once every M clocks (M = loop latency). In free mode (`free`) it
// accepts an element on every clock. With neither mode it accepts nothing.
// `in_ready` does not depend on `in_valid`; `take` = `in_valid && in_ready`
// is the accept strobe. The gap counter keeps running when the mode changes,
// so an element accepted in throttled mode is always followed by M-1 idle
// clocks before the next throttled one.
module input_throttle #(
  parameter int unsigned M = 5,
  localparam int unsigned GW = (M > 1) ? $clog2(M) : 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic thr,
  input  logic free,
  input  logic in_valid,
  output logic in_ready,
  output logic take
);

  logic [GW-1:0] gap;  // clocks still to wait before the next throttled accept

  assign in_ready = free || (thr && gap == '0);
  assign take     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 gap <= '0;
    else if (take && thr && !free) gap <= GW'(M - 1);
    else if (gap != '0)         gap <= gap - 1'b1;
  end

  // Two throttled accepts are at least M clocks apart.
  int unsigned since;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) since <= M;
    else if (take && thr && !free) since <= 1;
    else if (since < M) since <= since + 1;
  end
  a_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    (take && thr && !free) |-> since >= M);

endmodule
