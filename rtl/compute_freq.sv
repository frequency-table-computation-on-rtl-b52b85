// compute_freq: the frequency-table kernel. It counts how often each
// (attribute value, class value) pair occurs among the first `items` elements
// of two synchronous 32-bit input streams, then streams the whole table out
// on `s` and clears it, ready for the next run.
//
// How it works. The low N_A bits of `att` and the low N_C bits of `cls` are
// concatenated, attribute bits on top, into a table index. The table sits in
// a single-port read-first RAM (freq_ram). For each item the index is put on
// the RAM address (read), the word read out is incremented by one, passed
// through LOOP_LAT-2 pipeline registers and written back to the same address
// LOOP_LAT-1 clocks after the read. Because the next read must see that
// write, input_throttle lets one element in every LOOP_LAT clocks during this
// phase: the rate is one item per LOOP_LAT clocks. Once `items` elements have
// been counted and the last write has landed, two multiplexers switch the RAM
// address from the index to the counter `cnt` (wrap_counter) and the write
// data from "read value + 1" to zero: each clock one word is read (old value,
// read-first) and zeroed, so the table leaves on `s` in address order, one
// word per clock, and is all zero afterwards. While this happens the
// remaining `strm_len - items` input elements are accepted one per clock and
// discarded. `done` pulses when the read-out and the draining are both over.
//
// Interface. `start` (sampled while idle) latches the scalars `items` and
// `strm_len`; `busy` is high from reset or start until `done`. The inputs are
// valid/ready streams that are accepted together (an element is taken only
// when both are valid); `s` is a valid/ready stream of 2^(N_A+N_C) words,
// word k = count of pairs with att = k >> N_C and cls = k mod 2^N_C.
// After reset the kernel first sweeps the table to zero (2^(N_A+N_C) clocks).
//
// From the reference design: the index slicing and concatenation, the
// single-port read-first RAM, the increment loop, the throttle of one
// element per loop latency (5 clocks), the counter and the two multiplexers
// for read-out with clearing, one output word per clock, and un-throttled
// draining of the rest of the stream. Own choices: the valid/ready
// handshakes, the start/busy/done control, clipping `items` to `strm_len`,
// the clear sweep after reset, the two-word output buffer that lets `s`
// stall without losing a RAM word, and where the loop registers sit (after
// the adder).
module compute_freq
  import freq_pkg::*;
#(
  parameter int unsigned N_A      = DEF_N_A,
  parameter int unsigned N_C      = DEF_N_C,
  parameter int unsigned LOOP_LAT = DEF_LOOP,
  localparam int unsigned IW      = N_A + N_C,
  localparam int unsigned DEPTH   = 1 << IW
) (
  input  logic              clk,
  input  logic              rst_n,
  // scalars and control
  input  logic              start,
  input  logic [31:0]       items,
  input  logic [31:0]       strm_len,
  output logic              busy,
  output logic              done,
  // input streams
  input  logic              att_valid,
  input  logic [DATA_W-1:0] att_data,
  output logic              att_ready,
  input  logic              cls_valid,
  input  logic [DATA_W-1:0] cls_data,
  output logic              cls_ready,
  // output stream
  output logic              s_valid,
  output logic [DATA_W-1:0] s_data,
  input  logic              s_ready
);

  if (LOOP_LAT < 2) begin : g_bad_lat
    $error("compute_freq: LOOP_LAT must be at least 2 (RAM read plus write)");
  end

  kstate_e state;
  logic [31:0] items_q, strm_q, seen;

  // ---------------- input join and throttle
  logic in_valid, in_ready, take, thr, free;
  assign in_valid  = att_valid && cls_valid;
  assign thr       = (state == K_ACCUM) && (seen < items_q);
  assign free      = (state == K_FLUSH || state == K_READOUT) && (seen < strm_q);

  input_throttle #(.M(LOOP_LAT)) u_thr (
    .clk, .rst_n, .thr, .free,
    .in_valid, .in_ready, .take
  );
  // Each stream is acknowledged only together with the other one.
  assign att_ready = in_ready && cls_valid;
  assign cls_ready = in_ready && att_valid;

  logic acc_fire;   // element enters the increment loop
  assign acc_fire = take && thr;

  // ---------------- table index: att[N_A-1:0] @ cls[N_C-1:0]
  logic [IW-1:0] idx_in, idx_q;
  assign idx_in = {att_data[N_A-1:0], cls_data[N_C-1:0]};

  // ---------------- increment loop
  logic [LOOP_LAT-1:1] v;        // v[k]: the item read k clocks ago is in the loop
  logic [DATA_W-1:0]   rdata, incr, wval;
  logic                wr_stage;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else begin
      v[1] <= acc_fire;
      for (int k = 2; k < LOOP_LAT; k++) v[k] <= v[k-1];
    end
  end

  always_ff @(posedge clk) if (acc_fire) idx_q <= idx_in;

  assign incr     = rdata + 1'b1;
  assign wr_stage = v[LOOP_LAT-1];

  if (LOOP_LAT == 2) begin : g_nopipe
    assign wval = incr;
  end else begin : g_pipe
    logic [LOOP_LAT-3:0][DATA_W-1:0] dl;
    always_ff @(posedge clk) begin
      dl[0] <= incr;
      for (int j = 1; j < LOOP_LAT - 2; j++) dl[j] <= dl[j-1];
    end
    assign wval = dl[LOOP_LAT-3];
  end

  // ---------------- counter for clearing and read-out
  logic [IW-1:0] cnt;
  logic          cnt_last, cnt_en, cnt_clr;
  wrap_counter #(.MAX(DEPTH)) u_cnt (
    .clk, .rst_n, .clr(cnt_clr), .en(cnt_en), .count(cnt), .last(cnt_last)
  );

  // ---------------- output buffer (two words)
  logic [DATA_W-1:0] ob [2];
  logic              ob_wp, ob_rp;
  logic [1:0]        ob_cnt;
  logic              inflight, rd_issue, rd_done, pop;

  assign pop     = s_valid && s_ready;
  assign s_valid = (ob_cnt != 2'd0);
  assign s_data  = ob[ob_rp];
  assign rd_issue = (state == K_READOUT) && !rd_done &&
                    ((32'(ob_cnt) + 32'(inflight) - 32'(pop)) <= 32'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ob_wp <= 1'b0; ob_rp <= 1'b0; ob_cnt <= 2'd0; inflight <= 1'b0;
    end else begin
      inflight <= rd_issue;
      if (inflight) begin
        ob[ob_wp] <= rdata;
        ob_wp     <= ~ob_wp;
      end
      if (pop) ob_rp <= ~ob_rp;
      ob_cnt <= ob_cnt + {1'b0, inflight} - {1'b0, pop};
    end
  end

  // ---------------- RAM and its two multiplexers
  logic              clr_we;
  logic [IW-1:0]     ram_addr;
  logic              ram_we;
  logic [DATA_W-1:0] ram_wdata;

  assign clr_we   = (state == K_CLEAR);
  assign cnt_en   = clr_we || rd_issue;
  assign ram_addr = wr_stage ? idx_q : (cnt_en ? cnt : idx_in);
  assign ram_we   = wr_stage || cnt_en;
  assign ram_wdata = wr_stage ? wval : '0;

  freq_ram #(.DEPTH(DEPTH), .WIDTH(DATA_W)) u_ram (
    .clk, .addr(ram_addr), .we(ram_we), .wdata(ram_wdata), .rdata
  );

  // ---------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= K_CLEAR;
      items_q <= '0;
      strm_q  <= '0;
      seen    <= '0;
      rd_done <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (take) seen <= seen + 1'b1;
      if (rd_issue && cnt_last) rd_done <= 1'b1;
      unique case (state)
        K_CLEAR:   if (cnt_last) state <= K_IDLE;
        K_IDLE: if (start) begin
          items_q <= (items < strm_len) ? items : strm_len;
          strm_q  <= strm_len;
          seen    <= '0;
          rd_done <= 1'b0;
          state   <= K_ACCUM;
        end
        K_ACCUM:   if (!thr) state <= K_FLUSH;
        K_FLUSH:   if (v == '0) state <= K_READOUT;
        K_READOUT: if (rd_done && !inflight && ob_cnt == 2'd0 && seen == strm_q) begin
          state <= K_IDLE;
          done  <= 1'b1;
        end
        default:   state <= K_IDLE;
      endcase
    end
  end

  assign busy    = (state != K_IDLE);
  assign cnt_clr = (state == K_IDLE);

  // ---------------- rules
  // The loop's write never meets a new read: single port, one access per clock.
  a_port: assert property (@(posedge clk) disable iff (!rst_n) !(wr_stage && acc_fire));
  a_nocnt: assert property (@(posedge clk) disable iff (!rst_n) !(wr_stage && cnt_en));
  a_ob: assert property (@(posedge clk) disable iff (!rst_n) ob_cnt <= 2'd2);

endmodule
