// fb_pkg: shared types and constants of the FASTBUS dual-port memory and
// display diagnostic module.
//
// The module is a FASTBUS slave with two ports (crate segment and cable
// segment) that share one data space made of a fast 256 x 32 memory and a slow
// 16K x 32 memory. The asynchronous FASTBUS handshake is modelled here as
// synchronous logic: every bus line is sampled on the rising edge of one
// module clock (CLK_PERIOD_NS, 10 ns by default), and the 10 ns / 100 ns memory
// access pulses become whole numbers of clock cycles.
//
// From the document: the ID code 0018 of CSR#0, the CSR bit positions, the SS
// codes (2 end of block, 6 CSR parity error, 7 data parity error or invalid
// internal address), the memory sizes and access times, and the table that
// selects the access width. The clock period, the bundle layouts and even
// parity are this design's own choices.
package fb_pkg;

  // Module clock and the two memory access times of the document.
  localparam int unsigned CLK_PERIOD_NS  = 10;
  localparam int unsigned FAST_ACCESS_NS = 10;
  localparam int unsigned SLOW_ACCESS_NS = 100;
  localparam int unsigned FAST_CYCLES    = FAST_ACCESS_NS / CLK_PERIOD_NS;
  localparam int unsigned SLOW_CYCLES    = SLOW_ACCESS_NS / CLK_PERIOD_NS;

  // Memory organisation.
  localparam int unsigned DATA_W      = 32;
  localparam int unsigned FAST_DEPTH  = 256;
  localparam int unsigned SLOW_DEPTH  = 16384;
  localparam int unsigned MAR_W       = 14;   // Memory Address Register
  localparam int unsigned IA_W        = 15;   // A14 plus the 14-bit MAR

  // CSR#0 identification code (bits 31..16 on a read).
  localparam logic [15:0] MODULE_ID = 16'h0018;

  // Slave status codes returned on the SS lines.
  localparam logic [2:0] SS_OK           = 3'd0;
  localparam logic [2:0] SS_END_OF_BLOCK = 3'd2;
  localparam logic [2:0] SS_CSR_PARITY   = 3'd6;
  localparam logic [2:0] SS_DATA_PARITY  = 3'd7;
  localparam logic [2:0] SS_INVALID_IA   = 3'd7;

  // Data-cycle mode codes on MS<1:0>; MS<2> marks a pipelined cycle.
  localparam logic [1:0] MS_RANDOM    = 2'd0;
  localparam logic [1:0] MS_BLOCK     = 2'd1;
  localparam logic [1:0] MS_SECONDARY = 2'd2;

  // Lines a master drives, as the slave sees them.
  typedef struct packed {
    logic        as;    // address sync
    logic        ds;    // data sync
    logic        eg;    // enable geographical addressing
    logic        rd;    // read
    logic [2:0]  ms;    // mode select
    logic [31:0] ad;    // address / data
    logic        pa;    // parity
  } fb_master_t;

  // Lines this slave drives.
  typedef struct packed {
    logic        ak;    // address acknowledge
    logic        dk;    // data acknowledge
    logic        wt;    // wait
    logic [2:0]  ss;    // slave status
    logic        ad_oe; // AD and PA are driven
    logic [31:0] ad;
    logic        pa;
    logic        pe;    // parity error seen
  } fb_slave_t;

  // Everything the display logic can show about one segment.
  typedef struct packed {
    logic        ag;
    logic        as;
    logic        ak;
    logic        ds;
    logic        dk;
    logic        wt;
    logic        eg;
    logic        rd;
    logic [2:0]  ms;
    logic [2:0]  ss;
    logic [31:0] ad;
  } fb_snapshot_t;

  // Bit indices of the timing signals the display logic can trigger on.
  localparam int unsigned TRIG_AG = 0;
  localparam int unsigned TRIG_AS = 1;
  localparam int unsigned TRIG_AK = 2;
  localparam int unsigned TRIG_DS = 3;
  localparam int unsigned TRIG_DK = 4;

  // CSR#2 control bits (bits 3..0; writing bit n+16 clears bit n).
  typedef struct packed {
    logic slow_off;   // bit 3
    logic fast_off;   // bit 2
    logic par_gen;    // bit 1
    logic par_chk;    // bit 0
  } csr2_t;

  // One request from a port to the shared data space.
  typedef struct packed {
    logic                valid;
    logic                load;   // use addr instead of the MAR
    logic [IA_W-1:0]     addr;   // {A14, MAR}
    logic                we;
    logic [DATA_W-1:0]   wdata;
    logic                incr;   // block transfer: advance the MAR
  } ds_req_t;

  // Even parity: PA makes the number of ones on AD plus PA even.
  function automatic logic even_parity(input logic [31:0] d);
    return ^d;
  endfunction

  // Access control table: the memory a data-space access goes to.
  // Slow-off (bit 3) forces the fast memory, fast-off (bit 2) forces the
  // slow one (and wins if both are set); otherwise A14 chooses.
  function automatic logic sel_fast(input logic a14, input logic slow_off,
                                    input logic fast_off);
    if (fast_off)      return 1'b0;
    else if (slow_off) return 1'b1;
    else               return a14;
  endfunction

  // A data-space internal address is valid when its bits above A14 are zero
  // and, for the fast memory, bits 13..8 are zero too.
  function automatic logic data_ia_ok(input logic [31:0] ia);
    return (ia[31:15] == '0) && (!ia[14] || ia[13:8] == '0);
  endfunction

  // A CSR-space internal address uses bits 2..0: bit 2 picks the other
  // port's registers, bits 1..0 the register number.
  function automatic logic csr_ia_ok(input logic [31:0] ia);
    return ia[31:3] == '0;
  endfunction

endpackage
