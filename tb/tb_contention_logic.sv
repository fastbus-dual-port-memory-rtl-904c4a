// tb_contention_logic: checks first-come-first-serve ownership: the first
// port to ask gets the data space and keeps it while asking, the other gets
// WT; release hands over; a tie goes to the crate port; never two owners.
// A random phase compares against a reference model of the same rule.
module tb_contention_logic;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic       rst_n;
  logic [1:0] req, grant, wt;
  logic [1:0] ref_g;

  contention_logic dut (.clk, .rst_n, .req, .grant, .wt);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_g(input logic [1:0] g, input logic [1:0] w, input string what);
    checks++;
    if (grant !== g || wt !== w) begin
      failures++;
      $display("%s: grant=%b wt=%b expected %b %b", what, grant, wt, g, w);
    end
  endtask

  initial begin
    rst_n = 0; req = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    req = 2'b10; @(negedge clk); expect_g(2'b10, 2'b00, "cable first");
    req = 2'b11; @(negedge clk); expect_g(2'b10, 2'b01, "crate held off");
    repeat (3) @(negedge clk);   expect_g(2'b10, 2'b01, "still held off");
    req = 2'b01; @(negedge clk); expect_g(2'b01, 2'b00, "hand over");
    req = 2'b11; @(negedge clk); expect_g(2'b01, 2'b10, "cable held off");
    req = 2'b00; @(negedge clk); expect_g(2'b00, 2'b00, "both released");
    req = 2'b11; @(negedge clk); expect_g(2'b01, 2'b10, "tie to crate");
    req = 2'b00; @(negedge clk);
    // random phase against a model
    ref_g = 2'b00;
    for (int i = 0; i < 2000; i++) begin
      logic [1:0] nx;
      req = 2'($urandom);
      nx = ref_g & req;
      if (nx == 0) nx = req[0] ? 2'b01 : (req[1] ? 2'b10 : 2'b00);
      ref_g = nx;
      @(negedge clk);
      expect_g(ref_g, req & ~ref_g, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
