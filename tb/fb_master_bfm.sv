// fb_master_bfm: FASTBUS master model for the testbenches.
//
// Drives the master lines of one segment on the falling clock edge and
// watches the slave's answers on the rising edge. Tasks:
//   attach(ms, eg, ad, ok)   address cycle: raise AS, wait for AK
//   xfer(rd, ms, wd, rdata, ss, lat)  toggle DS once and wait for DK to
//                            follow; lat is the number of rising clock edges
//                            from DS changing to DK changing
//   pipe_write(ms, words[], n)  toggle DS n times without waiting for DK
//   release()                drop AS and DS
// bad_parity makes the next driven word carry the wrong PA. wt_cycles
// counts the rising edges at which the slave showed WT during a transfer.
module fb_master_bfm
  import fb_pkg::*;
(
  input  logic       clk,
  output fb_master_t m,
  input  fb_slave_t  s
);

  logic bad_parity = 1'b0;
  int   wt_cycles  = 0;
  int   timeout    = 1000;

  initial m = '0;

  task automatic put_ad(input logic [31:0] ad);
    m.ad = ad;
    m.pa = even_parity(ad) ^ bad_parity;
    bad_parity = 1'b0;
  endtask

  task automatic attach(input logic [2:0] ms, input logic eg,
                        input logic [31:0] ad, output logic ok);
    int n;
    @(negedge clk);
    m.ms = ms;
    m.eg = eg;
    m.rd = 1'b0;
    put_ad(ad);
    @(negedge clk);
    m.as = 1'b1;
    n = 0;
    while (!s.ak && n < 8) begin
      @(negedge clk);
      n++;
    end
    ok = s.ak;
  endtask

  task automatic xfer(input logic rd, input logic [2:0] ms, input logic [31:0] wd,
                      output logic [31:0] rdata, output logic [2:0] ss,
                      output int lat);
    int n;
    @(negedge clk);
    m.rd = rd;
    m.ms = ms;
    put_ad(rd ? 32'h0 : wd);
    m.ds = !m.ds;
    n = 0;
    do begin
      @(posedge clk);
      n++;
      #1;
      if (s.wt) wt_cycles++;
    end while (s.dk != m.ds && n < timeout);
    lat   = n;
    rdata = s.ad;
    ss    = s.ss;
  endtask

  task automatic pipe_write(input logic [2:0] ms, input logic [31:0] words [],
                            input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      m.rd = 1'b0;
      m.ms = ms;
      put_ad(words[i]);
      m.ds = !m.ds;
    end
  endtask

  task automatic release_bus();
    @(negedge clk);
    m.as = 1'b0;
    m.ds = 1'b0;
    m.ms = '0;
    m.rd = 1'b0;
    @(negedge clk);
    @(negedge clk);
  endtask

endmodule
