// tb_data_space: checks the shared data space at its full size (fast
// 256 x 32 after slow 16K x 32) against a reference model.
//  - normal organisation: a block run from the top of the slow memory
//    crosses into the fast memory without a wrap flag, and the last fast
//    word wraps back to slow word 0 with the flag
//  - fast memory only (slow off): A14 is ignored, the run wraps at 256
//  - slow memory only (fast off, or both off): wraps at 16K
//  - random loads, writes and reads, compared word by word
module tb_data_space;
  import fb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, so, fo;
  ds_req_t     req;
  logic [31:0] rdata;
  logic        wrapped, a14, nf;
  logic [13:0] mar;
  logic [31:0] ref_f [256];
  logic [31:0] ref_s [16384];
  bit          vf [256];
  bit          vs [16384];

  data_space dut (.clk, .rst_n, .req, .slow_off(so), .fast_off(fo), .rdata, .wrapped,
                  .mar, .a14, .next_fast(nf));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one access; returns read data and the wrap flag
  task automatic acc(input logic load, input logic [14:0] addr, input logic we,
                     input logic [31:0] wd, input logic incr,
                     output logic [31:0] rd, output logic wr);
    @(negedge clk);
    req = '{valid: 1'b1, load: load, addr: addr, we: we, wdata: wd, incr: incr};
    @(negedge clk);
    req = '0;
    rd = rdata;
    wr = wrapped;
  endtask

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (mar=%h a14=%0d)", what, mar, a14);
    end
  endtask

  initial begin
    logic [31:0] rd;
    logic        wr;
    rst_n = 0; so = 0; fo = 0; req = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // normal organisation: slow 16382, 16383, then fast 0..255, then slow 0
    acc(1, 15'd16382, 1, 32'hA000_0000, 1, rd, wr); ref_s[16382] = 32'hA000_0000;
    chk(!wr && a14 == 0 && mar == 14'd16383, "slow advance");
    acc(0, 0, 1, 32'hA000_0001, 1, rd, wr); ref_s[16383] = 32'hA000_0001;
    chk(!wr && a14 == 1 && mar == 0, "slow into fast, no wrap");
    for (int i = 0; i < 256; i++) begin
      acc(0, 0, 1, 32'hB000_0000 + i, 1, rd, wr); ref_f[i] = 32'hB000_0000 + i;
      if (i < 255) chk(!wr, "no wrap inside fast");
    end
    chk(wr && a14 == 0 && mar == 0, "wrap after last fast word");
    // read back across the boundary
    acc(1, 15'd16383, 0, 0, 1, rd, wr); chk(rd == 32'hA000_0001, "read slow 16383");
    acc(0, 0, 0, 0, 1, rd, wr);          chk(rd == 32'hB000_0000, "read fast 0");
    acc(1, 15'h40FF, 0, 0, 0, rd, wr);   chk(rd == 32'hB000_00FF && !wr, "random read fast 255");
    chk(a14 == 1 && mar == 14'hFF, "random read keeps address");

    // fast memory only: A14=0 address still goes to the fast memory
    so = 1;
    acc(1, 15'd5, 0, 0, 1, rd, wr); chk(rd == 32'hB000_0005, "fast only ignores A14");
    acc(1, 15'h40FF, 1, 32'hC0FF_EE00, 1, rd, wr); ref_f[255] = 32'hC0FF_EE00;
    chk(wr && a14 == 1 && mar == 0, "fast only wraps at 256");
    acc(0, 0, 0, 0, 1, rd, wr); chk(rd == ref_f[0] && !wr, "fast only after wrap");

    // slow memory only, and both off
    so = 0; fo = 1;
    acc(1, 15'h4003, 1, 32'h5105_0003, 0, rd, wr); ref_s[3] = 32'h5105_0003;
    fo = 0;
    acc(1, 15'd3, 0, 0, 0, rd, wr); chk(rd == 32'h5105_0003, "slow only, A14 ignored");
    fo = 1;
    acc(1, 15'd16383, 0, 0, 1, rd, wr); chk(rd == 32'hA000_0001 && wr && a14 == 0 && mar == 0, "slow only wraps at 16K");
    so = 1;
    acc(1, 15'd16383, 0, 0, 1, rd, wr); chk(wr && mar == 0, "both off behaves as slow only");
    so = 0; fo = 0;

    // random traffic against the model
    foreach (vf[i]) vf[i] = 1;
    for (int i = 0; i < 4000; i++) begin
      logic [14:0] a;
      logic        w;
      logic [31:0] d;
      a = $urandom_range(0, 1) ? {1'b1, 6'b0, 8'($urandom)} : {1'b0, 14'($urandom)};
      w = $urandom_range(0, 1);
      d = $urandom;
      acc(1, a, w, d, 0, rd, wr);
      if (w) begin
        if (a[14]) begin ref_f[a[7:0]] = d; vf[a[7:0]] = 1; end
        else begin ref_s[a[13:0]] = d; vs[a[13:0]] = 1; end
      end else if (a[14] ? vf[a[7:0]] : vs[a[13:0]]) begin
        chk(rd == (a[14] ? ref_f[a[7:0]] : ref_s[a[13:0]]), "random read");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
