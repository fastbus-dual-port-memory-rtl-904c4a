// tb_csr_regs: checks the CSR registers: the ID 0018 in CSR#0, the set and
// clear bit pairs of CSR#0 (1/17 and 30, 6/22) and CSR#2 (n/n+16), the error
// counter (counts only when enabled, loads on write, stops at 255), CSR#3 as
// a register and as a view of an external register.
module tb_csr_regs;
  import fb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, we, inc;
  logic [1:0]  wsel;
  logic [31:0] wd;
  logic [31:0] out_a [4], out_b [4];
  logic        la_a, ec_a, la_b, ec_b;
  csr2_t       c2_a, c2_b;
  logic [15:0] ma_a, ma_b;
  logic [7:0]  ec_cnt_a, ec_cnt_b;

  csr_regs #(.HAS_MA_REG(1'b1)) dut (.clk, .rst_n, .we, .wsel, .wdata(wd), .err_inc(inc),
    .ma_ext(16'h0000), .csr_out(out_a), .la_en(la_a), .ec_en(ec_a), .csr2(c2_a), .ma(ma_a), .err_cnt(ec_cnt_a));
  csr_regs #(.HAS_MA_REG(1'b0)) dut_ext (.clk, .rst_n, .we, .wsel, .wdata(wd), .err_inc(inc),
    .ma_ext(16'hBEEF), .csr_out(out_b), .la_en(la_b), .ec_en(ec_b), .csr2(c2_b), .ma(ma_b), .err_cnt(ec_cnt_b));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [1:0] r, input logic [31:0] d);
    @(negedge clk); we = 1; wsel = r; wd = d;
    @(negedge clk); we = 0;
  endtask

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 0; we = 0; inc = 0; wsel = 0; wd = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(out_a[0], 32'h0018_0000, "reset CSR0");
    chk(out_a[2], 32'h0, "reset CSR2");
    wr(0, 32'h0000_0002); chk(out_a[0], 32'h0018_0002, "LA enable");
    chk({31'b0, la_a}, 1, "la_en");
    wr(0, 32'h0002_0000); chk(out_a[0], 32'h0018_0000, "LA disable bit 17");
    wr(0, 32'h0000_0002); wr(0, 32'h4000_0000); chk({31'b0, la_a}, 0, "LA disable bit 30");
    wr(0, 32'h0000_0042); chk(out_a[0], 32'h0018_0042, "EC and LA enable");
    wr(0, 32'h0040_0000); chk(out_a[0], 32'h0018_0002, "EC disable bit 22");
    // counter disabled: no count
    @(negedge clk); inc = 1; @(negedge clk); inc = 0;
    chk(out_a[1], 0, "no count when disabled");
    wr(0, 32'h0000_0040);
    repeat (5) begin @(negedge clk); inc = 1; end
    @(negedge clk); inc = 0;
    chk(out_a[1], 5, "count 5");
    wr(1, 32'h0000_00FD);
    repeat (6) begin @(negedge clk); inc = 1; end
    @(negedge clk); inc = 0;
    chk(out_a[1], 32'hFF, "saturate");
    wr(1, 32'h0); chk(out_a[1], 0, "clear by write");
    // CSR2 set/clear pairs
    wr(2, 32'h0000_000F); chk(out_a[2], 32'hF, "CSR2 all set");
    chk({28'b0, c2_a}, 32'hF, "csr2 struct");
    wr(2, 32'h0005_0000); chk(out_a[2], 32'hA, "clear bits 0 and 2");
    chk({31'b0, c2_a.slow_off}, 1, "slow_off is bit 3");
    wr(2, 32'h000A_0001); chk(out_a[2], 32'h1, "set 0, clear 1 and 3");
    // CSR3
    wr(3, 32'h1234_5678); chk(out_a[3], 32'h1234_0000, "MA register");
    chk({16'b0, ma_a}, 32'h1234, "ma out");
    chk(out_b[3], 32'hBEEF_0000, "external MA view");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
