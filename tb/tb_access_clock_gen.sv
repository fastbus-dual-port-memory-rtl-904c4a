// tb_access_clock_gen: checks the dual-width access clock.
//  - pulse width for every row of the width table: CSR space (fast), data
//    space with A14 = 0 / 1, slow memory off, fast memory off; 1 clock for
//    10 ns and 10 clocks for 100 ns at a 10 ns clock
//  - a rising edge fires only when the module is selected (P), a falling
//    edge only in a block transfer (N)
//  - a trigger during a pulse restarts it (retriggerable)
module tb_access_clock_gen;
  import fb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, rise, fall, p_en, n_en, dsp, a14, so, fo;
  logic fire, wide, ick, done;

  access_clock_gen dut (.clk, .rst_n, .ds_rise(rise), .ds_fall(fall), .p_en, .n_en,
                        .data_space(dsp), .a14, .slow_off(so), .fast_off(fo),
                        .fire, .wide, .ick, .done);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Trigger once and measure how many cycles ick stays high; done must be
  // high exactly in the last one.
  task automatic pulse(input logic r, input int exp_w, input string what);
    int w, d;
    @(negedge clk);
    rise = r; fall = !r;
    @(negedge clk);
    rise = 0; fall = 0;
    w = 0; d = 0;
    while (ick) begin
      if (done) d = w + 1;
      w++;
      @(negedge clk);
    end
    checks++;
    if (w != exp_w || (exp_w > 0 && d != exp_w)) begin
      failures++;
      $display("%s: width %0d (done at %0d), expected %0d", what, w, d, exp_w);
    end
  endtask

  initial begin
    rst_n = 0; rise = 0; fall = 0; p_en = 1; n_en = 0; dsp = 0; a14 = 0; so = 0; fo = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // width table
    dsp = 0;                         pulse(1, 1,  "CSR space");
    dsp = 1; a14 = 0; so = 0; fo = 0; pulse(1, 10, "slow memory");
    dsp = 1; a14 = 1; so = 0; fo = 0; pulse(1, 1,  "fast memory");
    dsp = 1; a14 = 0; so = 1; fo = 0; pulse(1, 1,  "fast memory only");
    dsp = 1; a14 = 1; so = 0; fo = 1; pulse(1, 10, "slow memory only");
    dsp = 1; a14 = 1; so = 1; fo = 1; pulse(1, 10, "both off");
    // edge gating
    so = 0; fo = 0; a14 = 1;
    p_en = 0; n_en = 0; pulse(1, 0, "rise, not selected");
    p_en = 1; n_en = 0; pulse(0, 0, "fall, not block");
    p_en = 1; n_en = 1; pulse(0, 1, "fall, block");
    // retrigger: second trigger 4 cycles into a slow pulse
    a14 = 0;
    @(negedge clk); rise = 1;
    @(negedge clk); rise = 0;
    repeat (3) @(negedge clk);
    rise = 1;
    @(negedge clk); rise = 0;
    begin
      int w = 0;
      while (ick) begin w++; @(negedge clk); end
      checks++;
      if (w != 10) begin failures++; $display("retrigger: %0d", w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
