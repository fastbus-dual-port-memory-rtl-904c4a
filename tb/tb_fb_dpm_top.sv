// tb_fb_dpm_top: end-to-end test of the whole module at its default sizes
// (fast 256 x 32, slow 16K x 32, 10-clock slow access, 1 s automatic-reset
// limit), with a master on the crate segment and one on the cable segment.
//
// Scenario: both ports are set up through their CSRs (logical addressing,
// module addresses, parity); the crate master fills the whole slow and fast
// memory with a block transfer that ends in the wrap-around (SS=2), and the
// cable master reads it all back (the "mailbox" use). Then: both ports go
// for the data space at once (the later one waits with WT and its data is
// still right); the cable port reads the crate port's CSR#3 while the crate
// port is busy (WT until it is idle); a memory is switched off in CSR#2
// (fast only and slow only organisations); parity errors, an invalid
// internal address, a pipelined burst and a broadcast; the display stops
// the cable segment on a DS edge, latches it, and is reset by hand and
// automatically.
//
// Each of these mechanisms is counted when it is seen to happen; a mechanism
// that never happens counts as a failure.
module tb_fb_dpm_top;
  import fb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         rst_n;
  fb_master_t   cm, km;
  fb_slave_t    cs, ks;
  logic         bsel, ep, en, wten, lsel, mr, ar;
  logic [4:0]   mask;
  logic [26:0]  dly;
  fb_snapshot_t leds;
  logic         iwt;
  logic [7:0]   cec, kec;

  localparam logic [4:0] GA_C = 5'd3, GA_K = 5'd17;

  fb_master_bfm bc (.clk, .m(cm), .s(cs));
  fb_master_bfm bk (.clk, .m(km), .s(ks));

  fb_dpm_top dut (.clk, .rst_n,
    .crate_m(cm), .crate_ga(GA_C), .crate_ag(1'b0), .crate_s(cs),
    .cable_m(km), .cable_ga(GA_K), .cable_ag(1'b0), .cable_s(ks),
    .disp_bus_sel(bsel), .disp_trig_mask(mask), .disp_edge_p(ep), .disp_edge_n(en),
    .disp_en_wt_gen(wten), .disp_led_sel(lsel), .disp_man_reset(mr), .disp_auto_reset(ar),
    .disp_auto_delay(dly), .disp_leds(leds), .disp_iwt_led(iwt),
    .crate_err_cnt(cec), .cable_err_cnt(kec));

  // mechanisms
  typedef enum int {M_BLOCK, M_WRAP, M_CONTENTION_WT, M_CSR3_WT, M_FAST_ONLY, M_SLOW_ONLY,
                    M_PARITY_DATA, M_PARITY_CSR, M_INVALID_IA, M_PIPELINE, M_BROADCAST,
                    M_GEO, M_LOGICAL, M_OTHER_CSR, M_DISPLAY_WT, M_MAN_RESET, M_AUTO_RESET,
                    M_NUM} mech_t;
  int seen [M_NUM];
  string mech_name [M_NUM] = '{"block", "wrap_ss2", "contention_wt", "csr3_wt", "fast_only",
                               "slow_only", "parity_data", "parity_csr", "invalid_ia",
                               "pipeline", "broadcast", "geographic", "logical", "other_csr",
                               "display_wt", "manual_reset", "auto_reset"};

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  // helpers on either segment (sel 0 crate, 1 cable)
  task automatic att(input bit k, input logic [2:0] ms, input logic eg, input logic [31:0] ad,
                     output logic ok);
    if (k) bk.attach(ms, eg, ad, ok); else bc.attach(ms, eg, ad, ok);
  endtask
  task automatic x(input bit k, input logic r, input logic [2:0] ms, input logic [31:0] wd,
                   output logic [31:0] q, output logic [2:0] st, output int l);
    if (k) bk.xfer(r, ms, wd, q, st, l); else bc.xfer(r, ms, wd, q, st, l);
  endtask
  task automatic rel(input bit k);
    if (k) bk.release_bus(); else bc.release_bus();
  endtask
  // random-mode word (DS up and down)
  task automatic rw(input bit k, input logic r, input logic [31:0] wd,
                    output logic [31:0] q, output logic [2:0] st);
    logic [31:0] q2; logic [2:0] s2; int l;
    x(k, r, 3'd0, wd, q, st, l);
    x(k, r, 3'd0, wd, q2, s2, l);
  endtask
  task automatic sa(input bit k, input logic [31:0] ia, output logic [2:0] st);
    logic [31:0] q; int l;
    x(k, 0, 3'd2, ia, q, st, l);
    x(k, 0, 3'd2, ia, q, st, l);
  endtask
  // write one CSR of a port under geographic addressing
  task automatic csr_wr(input bit k, input logic [2:0] r, input logic [31:0] d);
    logic ok; logic [31:0] q; logic [2:0] st;
    att(k, 3'd1, 1'b1, k ? 32'(GA_K) : 32'(GA_C), ok);
    chk(ok, "CSR attach");
    seen[M_GEO]++;
    sa(k, 32'(r), st);
    rw(k, 0, d, q, st);
    rel(k);
  endtask

  function automatic logic [31:0] pat(input int i);
    return 32'h9E37_79B9 * (i + 1) ^ 32'(i);
  endfunction

  localparam logic [15:0] MA_C = 16'h00C1, MA_K = 16'h00CB;

  initial begin
    logic ok;
    logic [31:0] q;
    logic [2:0]  st;
    int l;
    rst_n = 0; bsel = 0; ep = 1; en = 0; wten = 0; lsel = 0; mr = 0; ar = 0; dly = 0; mask = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---------------------------------------------------------- set up
    csr_wr(0, 3'd0, 32'h0000_0042);       // LA and error counter on
    csr_wr(0, 3'd3, {MA_C, 16'h0});
    csr_wr(0, 3'd2, 32'h0000_0003);       // parity check and generate
    csr_wr(1, 3'd0, 32'h0000_0042);
    csr_wr(1, 3'd3, {MA_K, 16'h0});
    csr_wr(1, 3'd2, 32'h0000_0003);
    // each port reads the other's CSR#0 and CSR#3 (crate idle)
    att(0, 3'd1, 1'b0, {MA_C, 16'h0004}, ok); chk(ok, "crate logical CSR");
    seen[M_LOGICAL]++;
    rw(0, 1, 0, q, st); chk(q == 32'h0018_0042, "crate reads cable CSR0");
    sa(0, 32'd7, st);
    rw(0, 1, 0, q, st); chk(q == {MA_K, 16'h0}, "crate reads cable CSR3");
    seen[M_OTHER_CSR]++;
    rel(0);
    att(1, 3'd1, 1'b0, {MA_K, 16'h0007}, ok);
    rw(1, 1, 0, q, st); chk(q == {MA_C, 16'h0}, "cable reads crate CSR3 while crate idle");
    seen[M_OTHER_CSR]++;
    rel(1);

    // --------------------------- fill everything from the crate segment
    att(0, 3'd0, 1'b0, {MA_C, 16'h0000}, ok); chk(ok, "crate data space");
    begin
      int errs = 0, wraps = 0;
      for (int i = 0; i < SLOW_DEPTH + FAST_DEPTH; i++) begin
        x(0, 0, 3'd1, pat(i), q, st, l);
        if (l != ((i < SLOW_DEPTH) ? SLOW_CYCLES : FAST_CYCLES) + 2) errs++;
        if (st == SS_END_OF_BLOCK) begin
          wraps++;
          if (i != SLOW_DEPTH + FAST_DEPTH - 1) errs++;
        end else if (st != SS_OK) errs++;
      end
      chk(errs == 0, $sformatf("block fill: %0d errors", errs));
      chk(wraps == 1, "one wrap at the end of the space");
      seen[M_BLOCK]++;
      seen[M_WRAP] += wraps;
    end
    rel(0);

    // ------------------------------ read everything from the cable segment
    att(1, 3'd0, 1'b0, {MA_K, 16'h0000}, ok); chk(ok, "cable data space");
    begin
      int errs = 0;
      for (int i = 0; i < SLOW_DEPTH + FAST_DEPTH; i++) begin
        x(1, 1, 3'd1, 0, q, st, l);
        if (q != pat(i)) errs++;
        if (ks.pa != even_parity(q)) errs++;
      end
      chk(errs == 0, $sformatf("mailbox read back: %0d errors", errs));
      seen[M_BLOCK]++;
    end
    rel(1);

    // ------------------------------------------- contention for data space
    // crate takes the data space; cable must wait with WT
    att(0, 3'd0, 1'b0, {MA_C, 16'h0010}, ok);
    rw(0, 0, 32'hC0DE_0010, q, st);
    att(1, 3'd0, 1'b0, {MA_K, 16'h0010}, ok);
    chk(ok && ks.wt, "cable attached but held off");
    fork
      begin repeat (40) @(negedge clk); rel(0); end
      begin
        bk.wt_cycles = 0;
        rw(1, 1, 0, q, st);
      end
    join
    chk(q == 32'hC0DE_0010 && bk.wt_cycles > 20, $sformatf("cable waited %0d clocks", bk.wt_cycles));
    if (bk.wt_cycles > 0) seen[M_CONTENTION_WT]++;
    rel(1);

    // ------------------------- cable reads crate CSR#3 while crate is busy
    att(0, 3'd1, 1'b0, {MA_C, 16'h0000}, ok);
    att(1, 3'd1, 1'b0, {MA_K, 16'h0007}, ok);
    fork
      begin repeat (30) @(negedge clk); rel(0); end
      begin
        bk.wt_cycles = 0;
        rw(1, 1, 0, q, st);
      end
    join
    chk(q == {MA_C, 16'h0} && bk.wt_cycles > 15, $sformatf("CSR3 view waited %0d", bk.wt_cycles));
    if (bk.wt_cycles > 0) seen[M_CSR3_WT]++;
    rel(1);

    // ---------------------------------------------- memory organisations
    csr_wr(0, 3'd2, 32'h0000_0008);               // slow memory off
    att(0, 3'd0, 1'b0, {MA_C, 16'h00FF}, ok);     // A14=0, yet fast memory
    x(0, 1, 3'd1, 0, q, st, l);
    chk(q == pat(SLOW_DEPTH + 255) && st == SS_END_OF_BLOCK && l == FAST_CYCLES + 2, "fast only: wrap at 256");
    x(0, 1, 3'd1, 0, q, st, l);
    chk(q == pat(SLOW_DEPTH) && st == SS_OK, "fast only: back to fast 0");
    if (q == pat(SLOW_DEPTH)) seen[M_FAST_ONLY]++;
    rel(0);
    csr_wr(0, 3'd2, 32'h0008_0004);               // slow on, fast off
    att(0, 3'd0, 1'b0, {MA_C, 16'h3FFF}, ok);
    x(0, 1, 3'd1, 0, q, st, l);
    chk(q == pat(SLOW_DEPTH - 1) && st == SS_END_OF_BLOCK && l == SLOW_CYCLES + 2, "slow only: wrap at 16K");
    x(0, 1, 3'd1, 0, q, st, l);
    chk(q == pat(0) && st == SS_OK, "slow only: back to slow 0");
    if (q == pat(0)) seen[M_SLOW_ONLY]++;
    rel(0);
    csr_wr(0, 3'd2, 32'h0004_0000);               // both on again

    // ---------------------------------------- errors: parity, invalid IA
    att(1, 3'd0, 1'b0, {MA_K, 16'h0020}, ok);
    bk.bad_parity = 1;
    rw(1, 0, 32'h0BAD_0BAD, q, st);
    chk(st == SS_DATA_PARITY && kec == 1, "cable data parity error");
    if (st == SS_DATA_PARITY) seen[M_PARITY_DATA]++;
    rw(1, 1, 0, q, st); chk(q == pat(32), "bad word not written");
    sa(1, 32'h0001_0000, st);
    chk(st == SS_INVALID_IA, "invalid data IA");
    if (st == SS_INVALID_IA) seen[M_INVALID_IA]++;
    rel(1);
    att(0, 3'd1, 1'b0, {MA_C, 16'h0001}, ok);
    bc.bad_parity = 1;
    rw(0, 0, 32'h0000_0077, q, st);
    chk(st == SS_CSR_PARITY && cec == 1, "crate CSR parity error");
    if (st == SS_CSR_PARITY) seen[M_PARITY_CSR]++;
    rel(0);

    // ------------------------------------------------- pipelined burst
    att(1, 3'd0, 1'b0, {MA_K, 16'h4000}, ok);
    begin
      logic [31:0] w [] = new[4];
      int k = 0, n = 0;
      logic dkp;
      for (int i = 0; i < 4; i++) w[i] = 32'hA11C_E000 + i;
      dkp = ks.dk;
      fork
        bk.pipe_write(3'd5, w, 4);
        while (k < 4 && n < 200) begin
          @(posedge clk); #1; n++;
          if (ks.dk != dkp) k++;
          dkp = ks.dk;
        end
      join
      chk(k == 4, "pipelined burst acknowledged");
    end
    rel(1);
    att(0, 3'd0, 1'b0, {MA_C, 16'h4000}, ok);
    begin
      int errs = 0;
      for (int i = 0; i < 4; i++) begin
        x(0, 1, 3'd1, 0, q, st, l);
        if (q != 32'hA11C_E000 + i) errs++;
      end
      chk(errs == 0, "pipelined words seen from the crate side");
      if (errs == 0) seen[M_PIPELINE]++;
    end
    rel(0);

    // ----------------------------------------------------- broadcast
    att(0, 3'd3, 1'b0, 32'h0000_0000, ok);
    chk(ok, "CSR broadcast answered");
    if (ok) seen[M_BROADCAST]++;
    rel(0);

    // --------------------------------------------------------- display
    bsel = 1; mask = 5'b01000; ep = 1; en = 0; wten = 1; lsel = 1; ar = 0;
    att(1, 3'd0, 1'b0, {MA_K, 16'h0030}, ok);
    x(1, 0, 3'd0, 32'h5EE0_0030, q, st, l);      // DS rises: display fires
    @(negedge clk);
    chk(iwt && ks.wt && !cs.wt, "display WT on the cable segment");
    chk(leds.ds && leds.ad == 32'h5EE0_0030, "display latched the cable bus");
    if (iwt && ks.wt) seen[M_DISPLAY_WT]++;
    repeat (10) @(negedge clk);
    chk(iwt, "WT held in manual mode");
    mr = 1; @(negedge clk); mr = 0;
    chk(!iwt && !ks.wt, "manual reset");
    if (!iwt) seen[M_MAN_RESET]++;
    ar = 1; dly = 27'd25;
    x(1, 0, 3'd0, 32'h5EE0_0030, q, st, l);      // DS falls: no trigger
    begin
      int n = 0;
      fork
        x(1, 0, 3'd0, 32'h5EE0_0031, q, st, l);  // DS rises: trigger
        begin
          while (!iwt) @(negedge clk);
          while (iwt && n < 100) begin @(negedge clk); n++; end
        end
      join
      chk(n == 26, $sformatf("automatic reset after %0d clocks", n));
      if (n == 26) seen[M_AUTO_RESET]++;
    end
    rel(1);
    rw(0, 0, 0, q, st);   // keep the crate BFM's DS level consistent (unattached, ignored)
    bc.release_bus();

    // ------------------------------------------------------ summary
    for (int i = 0; i < M_NUM; i++) begin
      $display("mechanism %-16s seen %0d", mech_name[i], seen[i]);
      checks++;
      if (seen[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
