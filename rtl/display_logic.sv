// display_logic: the bus monitor of the module's front panel.
//
// It watches either the crate segment or the cable segment (bus_sel). On a
// chosen edge of the chosen timing signals (AG, AS, AK, DS, DK; trig_mask
// picks the signals, edge_p the leading and edge_n the trailing edges) and
// with WT generation enabled, it latches the whole segment state into an
// internal register and sets a flip-flop. The flip-flop lights the IWT lamp
// and drives WT onto the watched segment only (wt_crate or wt_cable), which
// freezes the activity there. The flip-flop is cleared by the push button
// (man_reset) or, in automatic mode, a programmable time after it was set
// (auto_delay clock cycles, at most MAX_AUTO_DELAY, 1 s at a 10 ns clock).
// The LED display shows either the live segment (led_sel = 0) or the latched
// register (led_sel = 1).
//
// Timing: one clock from the sampled edge to the latch, the flip-flop and
// WT. A reset and a trigger in the same cycle leave the flip-flop clear.
//
// The functions, the five timing signals, the edge selection, the latch,
// the manual and automatic reset and the two display sources are the
// document's. The signals shown on the LEDs, the edge detection by sampling
// and the reset priority are this design's choices.
module display_logic
  import fb_pkg::*;
#(
  parameter int unsigned MAX_AUTO_DELAY = 1_000_000_000 / CLK_PERIOD_NS,
  localparam int unsigned DW = $clog2(MAX_AUTO_DELAY + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  fb_snapshot_t crate_bus,
  input  fb_snapshot_t cable_bus,
  input  logic         bus_sel,      // 0 crate, 1 cable
  input  logic [4:0]   trig_mask,    // TRIG_AG .. TRIG_DK
  input  logic         edge_p,
  input  logic         edge_n,
  input  logic         en_wt_gen,
  input  logic         led_sel,      // 0 live bus, 1 latch
  input  logic         man_reset,
  input  logic         auto_reset,   // 1 automatic, 0 manual
  input  logic [DW-1:0] auto_delay,
  output fb_snapshot_t leds,
  output logic         iwt,
  output logic         wt_crate,
  output logic         wt_cable,
  output logic         trigger
);

  fb_snapshot_t bus, latch_q;
  logic [4:0]   tsig, tsig_q, rise, fall;
  logic [DW-1:0] timer;
  logic         auto_fire;
  logic [DW-1:0] delay_eff;

  always_comb begin
    bus       = bus_sel ? cable_bus : crate_bus;
    tsig      = '0;
    tsig[TRIG_AG] = bus.ag;
    tsig[TRIG_AS] = bus.as;
    tsig[TRIG_AK] = bus.ak;
    tsig[TRIG_DS] = bus.ds;
    tsig[TRIG_DK] = bus.dk;
    rise      = tsig & ~tsig_q & trig_mask;
    fall      = ~tsig & tsig_q & trig_mask;
    trigger   = en_wt_gen && ((edge_p && |rise) || (edge_n && |fall));
    delay_eff = (auto_delay > DW'(MAX_AUTO_DELAY)) ? DW'(MAX_AUTO_DELAY) : auto_delay;
    auto_fire = auto_reset && iwt && (timer >= delay_eff);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tsig_q  <= '0;
      latch_q <= '0;
      iwt     <= 1'b0;
      timer   <= '0;
    end else begin
      tsig_q <= tsig;
      if (trigger) latch_q <= bus;
      if (man_reset || auto_fire) iwt <= 1'b0;
      else if (trigger)           iwt <= 1'b1;
      // the automatic-reset timer runs while the flip-flop is set
      if (!iwt || auto_fire) timer <= '0;
      else if (timer != '1)  timer <= timer + 1'b1;
    end
  end

  assign leds     = led_sel ? latch_q : bus;
  assign wt_crate = iwt && !bus_sel;
  assign wt_cable = iwt && bus_sel;

endmodule
