// tb_display_logic: checks the bus monitor with a short automatic-reset
// limit (MAX_AUTO_DELAY = 50 clocks).
//  - no trigger with WT generation disabled or an unselected signal/edge
//  - a leading DS edge on the watched crate bus latches the bus, sets the
//    IWT flip-flop and puts WT on the crate bus only
//  - the LEDs show the live bus or the latch
//  - manual reset clears the flip-flop
//  - a trailing edge on the cable bus, automatic reset after auto_delay
//    clocks, and the limit on auto_delay
module tb_display_logic;
  import fb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         rst_n, bsel, ep, en, wten, lsel, mr, ar;
  logic [4:0]   mask;
  logic [5:0]   dly;
  fb_snapshot_t crate, cable, leds;
  logic         iwt, wtc, wtk, trig;

  display_logic #(.MAX_AUTO_DELAY(50)) dut (.clk, .rst_n, .crate_bus(crate), .cable_bus(cable),
    .bus_sel(bsel), .trig_mask(mask), .edge_p(ep), .edge_n(en), .en_wt_gen(wten), .led_sel(lsel),
    .man_reset(mr), .auto_reset(ar), .auto_delay(dly), .leds, .iwt, .wt_crate(wtc), .wt_cable(wtk),
    .trigger(trig));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int n;
    rst_n = 0; bsel = 0; ep = 1; en = 0; wten = 0; lsel = 0; mr = 0; ar = 0; dly = 10;
    mask = 5'b01000; crate = '0; cable = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // disabled: a DS edge does nothing
    crate.ds = 1; crate.ad = 32'h1111_1111; @(negedge clk); @(negedge clk);
    chk(!iwt && !wtc, "no WT while generation disabled");
    crate.ds = 0; @(negedge clk);
    wten = 1;
    // unselected signal (AS) and unselected edge (trailing DS)
    crate.as = 1; @(negedge clk); crate.as = 0; @(negedge clk);
    wten = 0; crate.ds = 1; @(negedge clk); wten = 1; crate.ds = 0; @(negedge clk); @(negedge clk);
    chk(!iwt, "no trigger on unselected signal or edge");
    ep = 1;
    // cable activity is not watched
    cable.ds = 1; @(negedge clk); @(negedge clk);
    chk(!iwt, "cable bus not watched");
    // leading DS edge on the crate bus
    crate.ad = 32'hCAFE_0001; crate.ms = 3'd1; crate.ds = 1;
    @(negedge clk);
    chk(iwt && wtc && !wtk, "WT on crate bus only");
    crate.ad = 32'h0000_0002; crate.ds = 0;
    @(negedge clk);
    chk(leds.ad == 32'h0000_0002, "LEDs show live bus");
    lsel = 1; #1;
    chk(leds.ad == 32'hCAFE_0001 && leds.ds && leds.ms == 3'd1, "LEDs show latch");
    repeat (20) @(negedge clk);
    chk(iwt, "manual mode holds WT");
    mr = 1; @(negedge clk); mr = 0;
    chk(!iwt && !wtc, "manual reset");
    // cable bus, trailing AK edge, automatic reset after 10 clocks
    bsel = 1; mask = 5'b00100; ep = 0; en = 1; ar = 1; dly = 10;
    cable.ak = 1; @(negedge clk); @(negedge clk);
    chk(!iwt, "leading AK edge ignored");
    cable.ak = 0; cable.ad = 32'h0BAD_F00D;
    @(negedge clk);
    chk(iwt && wtk && !wtc, "WT on cable bus only");
    chk(leds.ad == 32'h0BAD_F00D, "cable latch");
    n = 0;
    while (iwt && n < 100) begin @(negedge clk); n++; end
    chk(n == 11, $sformatf("auto reset after %0d clocks", n));
    // the delay is limited to MAX_AUTO_DELAY
    dly = 63;
    cable.ak = 1; @(negedge clk); cable.ak = 0; @(negedge clk);
    n = 0;
    while (iwt && n < 200) begin @(negedge clk); n++; end
    chk(n == 51, $sformatf("limited auto reset after %0d clocks", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
