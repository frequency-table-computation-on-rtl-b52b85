// async_fifo: a valid/ready stream FIFO between two unrelated clocks, used
// where the engine's streams pass between the memory/host clock domain and
// the kernel clock domain. 2^AW entries of W bits. Write and read pointers
// are kept in binary and in Gray code; each side sees the other's Gray
// pointer through a two-flop synchronizer, so the full and empty flags are
// conservative (they may lag by up to three clocks, never lead).
//
// Interface: write side `w_valid`/`w_data`/`w_ready` on `wclk`, read side
// `r_valid`/`r_data`/`r_ready` on `rclk`, each with its own active-low
// reset (asynchronous assert, both to be released together after the
// clocks run). `r_data` is the head entry, valid while `r_valid` is high.
// The crossing itself is this design's choice: the reference engine ran its
// memory side at 100 MHz and its kernel at 333 MHz, but left the crossing to
// its tool flow.
module async_fifo #(
  parameter int unsigned W  = 32,
  parameter int unsigned AW = 4
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         w_valid,
  input  logic [W-1:0] w_data,
  output logic         w_ready,
  input  logic         rclk,
  input  logic         rrst_n,
  output logic         r_valid,
  output logic [W-1:0] r_data,
  input  logic         r_ready
);

  localparam int unsigned DEPTH = 1 << AW;

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, wgray, rbin, rgray;
  logic [AW:0]  rgray_w1, rgray_w2;   // read pointer in the write domain
  logic [AW:0]  wgray_r1, wgray_r2;   // write pointer in the read domain
  logic         push, pop;

  function automatic logic [AW:0] gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  assign w_ready = (wgray != {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign push    = w_valid && w_ready;

  always_ff @(posedge wclk) if (push) mem[wbin[AW-1:0]] <= w_data;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (push) begin
        wbin  <= wbin + 1'b1;
        wgray <= gray(wbin + 1'b1);
      end
    end
  end

  // read side
  assign r_valid = (rgray != wgray_r2);
  assign r_data  = mem[rbin[AW-1:0]];
  assign pop     = r_valid && r_ready;

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (pop) begin
        rbin  <= rbin + 1'b1;
        rgray <= gray(rbin + 1'b1);
      end
    end
  end

  if (AW < 2) begin : g_bad_aw
    $error("async_fifo: AW must be at least 2");
  end

endmodule
