// pulse_sync: carries one-clock pulses from clock domain `sclk` to clock
// domain `dclk`. Each source pulse flips a toggle flop; the toggle passes a
// two-flop synchronizer (sync_bit) and every change of it gives one
// destination pulse, two to four `dclk` clocks later. Source pulses must be
// at least three destination clocks apart.
module pulse_sync (
  input  logic sclk,
  input  logic srst_n,
  input  logic s_pulse,
  input  logic dclk,
  input  logic drst_n,
  output logic d_pulse
);

  logic tgl, tgl_d, tgl_q;

  always_ff @(posedge sclk or negedge srst_n) begin
    if (!srst_n)      tgl <= 1'b0;
    else if (s_pulse) tgl <= ~tgl;
  end

  sync_bit u_sync (.clk(dclk), .rst_n(drst_n), .d(tgl), .q(tgl_d));

  always_ff @(posedge dclk or negedge drst_n) begin
    if (!drst_n) tgl_q <= 1'b0;
    else         tgl_q <= tgl_d;
  end

  assign d_pulse = tgl_d ^ tgl_q;

endmodule
