// tb_parity_gen: checks the parity generator against a bit count: with
// generation enabled PA makes the number of ones on AD plus PA even; with it
// disabled PA stays low.
module tb_parity_gen;
  int checks = 0, failures = 0;
  logic [31:0] ad;
  logic        en, pa;
  logic        clk = 0;
  always #5 clk = ~clk;

  parity_gen dut (.ad, .enable(en), .pa);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int ones;
      ad = (i < 32) ? (32'h1 << i) : $urandom;
      en = (i % 7) != 3;
      #1;
      ones = $countones(ad);
      checks++;
      if (en && ((ones + pa) % 2 != 0)) begin
        failures++;
        $display("odd total for %h pa=%0d", ad, pa);
      end
      if (!en && pa !== 1'b0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
