// data_space: the data space shared by both ports: a 14-bit Memory Address
// Register (MAR) plus the A14 bank bit, the fast 256 x 32 memory and the slow
// 16K x 32 memory.
//
// Address map (internal address, 15 bits = {A14, 13..0}):
//   A14 = 0: slow memory, word 13..0;  A14 = 1: fast memory, word 7..0.
// CSR#2 can switch either memory off. With the slow memory off every access
// goes to the fast memory, with the fast memory off (or both off) every
// access goes to the slow memory; with both on the fast memory follows the
// slow one in the address space.
//
// A request (req.valid for one cycle, issued by the port that owns the data
// space) reads or writes one word at the MAR, or at req.addr when req.load is
// set (a new internal address). With req.incr (block transfer) the address
// then advances; it wraps around at the end of the space in all three
// organisations, and the access that wraps reports wrapped=1, for which the
// port answers SS=2. The read word appears on rdata the cycle after the
// request and holds. mar/a14 show the address of the next access.
//
// Sizes, the bank table and wrap-around with SS=2 are the document's; how a
// request is signalled is this design's own.
module data_space
  import fb_pkg::*;
#(
  parameter int unsigned FAST_WORDS = FAST_DEPTH,
  parameter int unsigned SLOW_WORDS = SLOW_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ds_req_t           req,
  input  logic              slow_off,
  input  logic              fast_off,
  output logic [DATA_W-1:0] rdata,
  output logic              wrapped,
  output logic [MAR_W-1:0]  mar,
  output logic              a14,
  output logic              next_fast     // memory the next access uses
);

  localparam int unsigned FAW = $clog2(FAST_WORDS);
  localparam int unsigned SAW = $clog2(SLOW_WORDS);

  logic [IA_W-1:0]   eff;
  logic              use_fast;
  logic [IA_W-1:0]   nxt;
  logic              wrap_d;
  logic [DATA_W-1:0] fast_q, slow_q;
  logic              last_fast;

  always_comb begin
    eff      = req.load ? req.addr : {a14, mar};
    use_fast = sel_fast(eff[14], slow_off, fast_off);
    nxt      = eff;
    wrap_d   = 1'b0;
    if (use_fast) begin
      if (eff[FAW-1:0] == '1) begin
        // end of the fast memory: back to the slow one unless it is off
        nxt    = slow_off ? IA_W'(1) << 14 : '0;
        wrap_d = 1'b1;
      end else begin
        nxt = {1'b1, MAR_W'(eff[FAW-1:0]) + 1'b1};
      end
    end else begin
      if (eff[SAW-1:0] == '1) begin
        // end of the slow memory: on to the fast one, or wrap if it is off
        nxt    = fast_off ? '0 : IA_W'(1) << 14;
        wrap_d = fast_off;
      end else begin
        nxt = {1'b0, MAR_W'(eff[SAW-1:0]) + 1'b1};
      end
    end
    next_fast = sel_fast(a14, slow_off, fast_off);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mar       <= '0;
      a14       <= 1'b0;
      wrapped   <= 1'b0;
      last_fast <= 1'b0;
    end else if (req.valid) begin
      {a14, mar} <= req.incr ? nxt : eff;
      wrapped    <= req.incr && wrap_d;
      last_fast  <= use_fast;
    end
  end

  data_mem #(.DEPTH(FAST_WORDS), .WIDTH(DATA_W)) u_fast (
    .clk, .en(req.valid && use_fast), .we(req.we),
    .addr(eff[FAW-1:0]), .wdata(req.wdata), .rdata(fast_q)
  );

  data_mem #(.DEPTH(SLOW_WORDS), .WIDTH(DATA_W)) u_slow (
    .clk, .en(req.valid && !use_fast), .we(req.we),
    .addr(eff[SAW-1:0]), .wdata(req.wdata), .rdata(slow_q)
  );

  assign rdata = last_fast ? fast_q : slow_q;

endmodule
