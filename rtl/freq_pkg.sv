// freq_pkg: constants and types shared by the frequency-table kernel and its
// manager. The table index is the low N_A bits of the attribute value
// concatenated with the low N_C bits of the class value; with the default
// 6 + 6 bits the table holds 4096 words of 32 bits. The default loop latency
// of 5 clocks and the 96-byte memory block are the values of the reference
// implementation; the word width of the counts (32 bits) matches its 32-bit
// input and output streams.
package freq_pkg;

  localparam int unsigned DATA_W      = 32;  // stream element / table word width
  localparam int unsigned DEF_N_A     = 6;   // attribute bits used in the index
  localparam int unsigned DEF_N_C     = 6;   // class bits used in the index
  localparam int unsigned DEF_LOOP    = 5;   // read-increment-write loop latency (clocks)
  localparam int unsigned BLOCK_BYTES = 96;  // off-chip memory access granule
  localparam int unsigned BLOCK_WORDS = BLOCK_BYTES / (DATA_W / 8);  // 24 elements
  localparam int unsigned ADDR_W      = 33;  // byte address into 6 GiB of off-chip memory

  // Kernel phases.
  typedef enum logic [2:0] {
    K_CLEAR   = 3'd0,  // after reset: sweep the table to zero
    K_IDLE    = 3'd1,  // waiting for start
    K_ACCUM   = 3'd2,  // throttled read-increment-write of the items of interest
    K_FLUSH   = 3'd3,  // last increment still in the loop
    K_READOUT = 3'd4   // stream table out while writing zeros; drain the rest of the input
  } kstate_e;

endpackage
