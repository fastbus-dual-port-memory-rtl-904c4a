// tb_fb_port: checks one port (the crate port, with its ADI slices)
// connected to the data space and the contention logic, driven by a master
// model. The other port is stood in for by a request line to the contention
// logic and a fixed set of CSR values. Covered: geographic and logical
// addressing in CSR and data space, a wrong address, broadcast, secondary
// address, random, block and pipelined transfers, the access time of CSR
// space and both memories (2 and 11 clocks from DS to DK), end of block
// (SS=2) at the wrap-around, parity errors in data and CSR space (SS=7 and
// 6, PE, error counter), parity generation, invalid internal addresses
// (SS=7), reads of the other port's CSRs, and WT while the other port holds
// the data space.
module tb_fb_port;
  import fb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n;
  fb_master_t  m;
  fb_slave_t   s;
  logic [1:0]  req, grant, cwt;
  ds_req_t     dreq;
  logic [31:0] ds_rdata;
  logic        ds_wrapped, ds_a14, nf;
  logic [13:0] ds_mar;
  logic [31:0] own [4], oth [4];
  csr2_t       c2;
  logic        busy, vreq, vvalid;
  logic [7:0]  ec;
  logic        other_req;

  localparam logic [4:0] GA = 5'd9;

  fb_master_bfm bfm (.clk, .m, .s);

  fb_port #(.IS_CABLE(1'b0)) dut (.clk, .rst_n, .m, .ga(GA), .s,
    .ds_need(req[0]), .ds_grant(grant[0]), .ds_wt(cwt[0]), .dreq,
    .ds_rdata, .ds_wrapped, .ds_mar, .ds_a14,
    .csr_out(own), .other_csr(oth), .csr2(c2), .busy,
    .la_view_req(vreq), .la_view_req_in(1'b0), .la_view_valid(vvalid), .la_view_ok(1'b0),
    .err_cnt(ec));

  assign req[1] = other_req;
  contention_logic u_c (.clk, .rst_n, .req, .grant, .wt(cwt));
  data_space u_ds (.clk, .rst_n, .req(dreq), .slow_off(c2.slow_off), .fast_off(c2.fast_off),
    .rdata(ds_rdata), .wrapped(ds_wrapped), .mar(ds_mar), .a14(ds_a14), .next_fast(nf));

  initial begin
    repeat (50000) @(posedge clk);
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

  logic [31:0] rd;
  logic [2:0]  ss;
  int          lat;
  logic        ok;

  // one random-mode word: DS up (transfer) and down (handshake)
  task automatic rnd(input logic r, input logic [31:0] wd, output logic [31:0] q,
                     output logic [2:0] st, output int l);
    bfm.xfer(r, 3'd0, wd, q, st, l);
    begin
      logic [31:0] d2; logic [2:0] s2; int l2;
      bfm.xfer(r, 3'd0, wd, d2, s2, l2);
    end
  endtask

  task automatic sec(input logic [31:0] ia, output logic [2:0] st);
    logic [31:0] q; int l;
    bfm.xfer(1'b0, 3'd2, ia, q, st, l);
    bfm.xfer(1'b0, 3'd2, ia, q, st, l);
  endtask

  initial begin
    other_req = 0;
    for (int i = 0; i < 4; i++) oth[i] = 32'h0E00_0000 + i;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // wrong geographic address: no AK
    bfm.attach(3'd1, 1'b1, 32'd10, ok); chk(!ok, "wrong GA not answered");
    bfm.release_bus();

    // geographic, CSR space: ID, access time
    bfm.attach(3'd1, 1'b1, 32'(GA), ok); chk(ok, "GA in CSR space");
    rnd(1, 0, rd, ss, lat);
    chk(rd == 32'h0018_0000 && ss == 0, "read CSR0 ID");
    chk(lat == FAST_CYCLES + 2, $sformatf("CSR access time %0d", lat));
    rnd(0, 32'h0000_0042, rd, ss, lat);            // enable LA and error counter
    sec(32'd2, ss); chk(ss == 0, "secondary address 2");
    rnd(0, 32'h0000_0003, rd, ss, lat);            // parity check and generate
    sec(32'd3, ss);
    rnd(0, 32'h1234_0000, rd, ss, lat);            // MA into the ADI slices
    rnd(1, 0, rd, ss, lat); chk(rd == 32'h1234_0000, "read MA from the ADI slices");
    sec(32'd0, ss);
    rnd(1, 0, rd, ss, lat); chk(rd == 32'h0018_0042, "CSR0 enables");
    chk(s.pa == even_parity(rd), "parity generated on read");
    // other port's registers, read only
    sec(32'd6, ss);
    rnd(1, 0, rd, ss, lat); chk(rd == 32'h0E00_0002, "read other port CSR2");
    rnd(0, 32'h5, rd, ss, lat); chk(ss == SS_INVALID_IA, "write to other port refused");
    // parity error in CSR space
    sec(32'd2, ss);
    bfm.bad_parity = 1;
    rnd(0, 32'h0000_0008, rd, ss, lat); chk(ss == SS_CSR_PARITY && s.pe, "CSR parity error SS=6");
    chk(own[2] == 32'h3 && ec == 1, "bad word not written, counted");
    // invalid CSR internal address
    sec(32'h0000_0010, ss); chk(ss == SS_INVALID_IA, "invalid CSR IA");
    bfm.release_bus();

    // logical addressing, data space, slow memory: access time
    bfm.attach(3'd0, 1'b0, 32'h1234_0064, ok); chk(ok, "logical address in data space");
    rnd(0, 32'hDEAD_0064, rd, ss, lat);
    chk(ss == 0 && lat == SLOW_CYCLES + 2, $sformatf("slow write time %0d", lat));
    rnd(1, 0, rd, ss, lat);
    chk(rd == 32'hDEAD_0064 && lat == SLOW_CYCLES + 2, "slow read");
    bfm.release_bus();
    bfm.attach(3'd0, 1'b0, 32'h1233_0064, ok); chk(!ok, "wrong MA not answered");
    bfm.release_bus();

    // block write across the slow/fast boundary, then block read
    bfm.attach(3'd0, 1'b0, 32'h1234_3FFE, ok);
    for (int i = 0; i < 4; i++) begin
      bfm.xfer(0, 3'd1, 32'hB10C_0000 + i, rd, ss, lat);
      chk(ss == 0, "block write status");
      chk(lat == ((i < 2) ? SLOW_CYCLES : FAST_CYCLES) + 2, $sformatf("block write %0d time %0d", i, lat));
    end
    bfm.release_bus();
    bfm.attach(3'd0, 1'b0, 32'h1234_3FFE, ok);
    for (int i = 0; i < 4; i++) begin
      bfm.xfer(1, 3'd1, 0, rd, ss, lat);
      chk(rd == 32'hB10C_0000 + i, $sformatf("block read %0d: %h", i, rd));
    end
    // secondary address read returns the advanced address
    bfm.xfer(1, 3'd2, 0, rd, ss, lat);
    chk(rd == 32'h0000_4002, $sformatf("IA after block %h", rd));
    bfm.release_bus();

    // end of block: wrap at the last fast word
    bfm.attach(3'd0, 1'b0, 32'h1234_40FE, ok);
    bfm.xfer(1, 3'd1, 0, rd, ss, lat); chk(ss == 0, "fast 254");
    bfm.xfer(1, 3'd1, 0, rd, ss, lat); chk(ss == SS_END_OF_BLOCK, "SS=2 at wrap");
    bfm.xfer(1, 3'd1, 0, rd, ss, lat); chk(ss == 0, "after wrap, slow 0");
    bfm.release_bus();

    // data parity error, invalid IA, geographic with secondary address
    bfm.attach(3'd0, 1'b1, 32'(GA), ok);
    sec(32'h0000_0064, ss); chk(ss == 0, "secondary address in data space");
    bfm.bad_parity = 1;
    rnd(0, 32'h0BAD_0BAD, rd, ss, lat); chk(ss == SS_DATA_PARITY && s.pe, "data parity error SS=7");
    rnd(1, 0, rd, ss, lat); chk(rd == 32'hDEAD_0064 && ss == 0, $sformatf("bad word not written %h %0d", rd, ss));
    chk(ec == 2, "error counted");
    sec(32'h0000_4164, ss); chk(ss == SS_INVALID_IA, "fast IA with bits 13..8 set");
    rnd(1, 0, rd, ss, lat); chk(ss == SS_INVALID_IA, "access with invalid IA");
    bfm.release_bus();

    // pipelined block write: four DS edges without waiting for DK
    bfm.attach(3'd0, 1'b0, 32'h1234_4010, ok);
    begin
      logic [31:0] w [] = new[4];
      int n = 0, k = 0;
      logic dk_prev;
      for (int i = 0; i < 4; i++) w[i] = 32'h919E_0000 + i;
      dk_prev = s.dk;
      fork
        bfm.pipe_write(3'd5, w, 4);
        while (k < 4 && n < 200) begin
          @(posedge clk); #1; n++;
          if (s.dk != dk_prev) k++;
          dk_prev = s.dk;
        end
      join
      chk(k == 4, $sformatf("pipelined writes acknowledged: %0d DK edges", k));
      // four fast words: the slave overlaps them with the master's edges
      chk(n <= 4 * (FAST_CYCLES + 1) + 3, $sformatf("pipelined burst took %0d clocks", n));
    end
    bfm.release_bus();
    bfm.attach(3'd0, 1'b0, 32'h1234_4010, ok);
    for (int i = 0; i < 4; i++) begin
      bfm.xfer(1, 3'd1, 0, rd, ss, lat);
      chk(rd == 32'h919E_0000 + i, $sformatf("pipelined data stored %h", rd));
    end
    bfm.release_bus();

    // broadcast in data space: any address
    bfm.attach(3'd2, 1'b0, 32'hFFFF_FFFF, ok); chk(ok, "broadcast answered");
    bfm.release_bus();

    // the other port holds the data space: WT until it lets go
    other_req = 1;
    repeat (2) @(negedge clk);
    bfm.attach(3'd0, 1'b0, 32'h1234_0064, ok);
    fork
      begin repeat (30) @(negedge clk); other_req = 0; end
      begin
        bfm.wt_cycles = 0;
        bfm.xfer(1, 3'd0, 0, rd, ss, lat);
      end
    join
    chk(bfm.wt_cycles > 20 && rd == 32'hDEAD_0064, $sformatf("held off with WT for %0d", bfm.wt_cycles));
    bfm.release_bus();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
