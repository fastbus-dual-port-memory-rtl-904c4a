// tb_data_mem: self-checking test of the data memory at the fast memory's
// size (256 x 32) and at the slow memory's size (16K x 32). Random writes
// go to both the memory and a reference array, then every touched address
// is read back and compared; a read must leave the memory unchanged and
// rdata must hold between reads.
module tb_data_mem;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        en_f, we_f, en_s, we_s;
  logic [7:0]  a_f;
  logic [13:0] a_s;
  logic [31:0] wd_f, wd_s, rd_f, rd_s;
  logic [31:0] ref_f [256];
  logic [31:0] ref_s [16384];
  bit          set_f [256];
  bit          set_s [16384];

  data_mem #(.DEPTH(256),   .WIDTH(32)) u_f (.clk, .en(en_f), .we(we_f), .addr(a_f), .wdata(wd_f), .rdata(rd_f));
  data_mem #(.DEPTH(16384), .WIDTH(32)) u_s (.clk, .en(en_s), .we(we_s), .addr(a_s), .wdata(wd_s), .rdata(rd_s));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en_f = 0; we_f = 0; en_s = 0; we_s = 0; a_f = 0; a_s = 0; wd_f = 0; wd_s = 0;
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      en_f = 1; we_f = 1; a_f = 8'($urandom); wd_f = $urandom;
      en_s = 1; we_s = 1; a_s = 14'($urandom); wd_s = $urandom;
      if (i < 256) a_f = 8'(i);
      ref_f[a_f] = wd_f; set_f[a_f] = 1;
      ref_s[a_s] = wd_s; set_s[a_s] = 1;
      @(negedge clk);
    end
    we_f = 0; we_s = 0;
    for (int i = 0; i < 256; i++) begin
      a_f = 8'(i); en_f = 1;
      @(negedge clk);
      checks++;
      if (rd_f !== ref_f[i]) begin
        failures++;
        $display("fast mismatch at %0d: %h vs %h", i, rd_f, ref_f[i]);
      end
    end
    for (int i = 0; i < 16384; i++) begin
      if (!set_s[i]) continue;
      a_s = 14'(i); en_s = 1;
      @(negedge clk);
      checks++;
      if (rd_s !== ref_s[i]) begin
        failures++;
        $display("slow mismatch at %0d: %h vs %h", i, rd_s, ref_s[i]);
      end
    end
    // rdata holds while en is low
    en_s = 0; a_s = 14'h0;
    repeat (3) @(negedge clk);
    checks++;
    if (rd_s !== ref_s[16383] && set_s[16383]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
