// access_clock_gen: the dual-width memory clock of a port, the synchronous
// counterpart of the document's retriggerable one-shot.
//
// A pulse is started by a data-sync edge: a rising edge when the module is
// selected (the one-shot's P input, driven by module select), a falling edge
// only during a block transfer (the N input, driven by MS0=1). The pulse on
// ick is short for CSR space and for the fast memory, and long for the slow
// memory, following the published control table: outside data space the
// output is fast; in data space A14 picks the memory unless CSR#2 bit 3 (slow
// memory off) forces the fast one or bit 2 (fast memory off) forces the slow
// one. The widths are FAST_W and SLOW_W clock cycles (10 ns and 100 ns at a
// 10 ns clock). A new trigger while the pulse runs restarts it, as the
// one-shot is retriggerable. done is high in the last cycle of the pulse.
//
// Timing: a trigger in cycle t gives ick in cycles t+1 .. t+W and done in
// cycle t+W.
module access_clock_gen
  import fb_pkg::*;
#(
  parameter int unsigned FAST_W = FAST_CYCLES,
  parameter int unsigned SLOW_W = SLOW_CYCLES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ds_rise,        // buffered DS, rising edge
  input  logic ds_fall,        // buffered DS, falling edge
  input  logic p_en,           // module selected
  input  logic n_en,           // block transfer
  input  logic data_space,
  input  logic a14,
  input  logic slow_off,       // CSR#2 bit 3
  input  logic fast_off,       // CSR#2 bit 2
  output logic fire,           // this edge starts a pulse
  output logic wide,           // the pulse started now is the long one
  output logic ick,
  output logic done
);

  localparam int unsigned CW = $clog2((FAST_W > SLOW_W ? FAST_W : SLOW_W) + 1);

  logic [CW-1:0] cnt;

  always_comb begin
    fire = (ds_rise && p_en) || (ds_fall && n_en);
    wide = data_space && !sel_fast(a14, slow_off, fast_off);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cnt <= '0;
    else if (fire) cnt <= wide ? CW'(SLOW_W) : CW'(FAST_W);
    else if (cnt != '0) cnt <= cnt - 1'b1;
  end

  assign ick  = (cnt != '0);
  assign done = (cnt == CW'(1));

endmodule
