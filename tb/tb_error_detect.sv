// tb_error_detect: checks the parity check and its status code: SS=7 for
// a data-space word with bad parity, SS=6 for a CSR-space word, SS=0 and no
// error for good parity, with checking off, or without a strobe.
module tb_error_detect;
  int checks = 0, failures = 0;
  logic        strobe, en, csr, pa, perr, cnt;
  logic [31:0] ad;
  logic [2:0]  ss;
  logic        clk = 0;
  always #5 clk = ~clk;

  error_detect dut (.strobe, .check_en(en), .csr_space(csr), .ad, .pa,
                    .perr, .err_count(cnt), .ss);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic bad, exp_err;
      logic [2:0] exp_ss;
      ad     = $urandom;
      bad    = $urandom_range(0, 1);
      pa     = ($countones(ad) % 2) ^ bad;
      strobe = $urandom_range(0, 3) != 0;
      en     = $urandom_range(0, 3) != 0;
      csr    = $urandom_range(0, 1);
      #1;
      exp_err = strobe && en && bad;
      exp_ss  = !exp_err ? 3'd0 : (csr ? 3'd6 : 3'd7);
      checks++;
      if (perr !== exp_err || cnt !== exp_err || ss !== exp_ss) begin
        failures++;
        $display("ad=%h pa=%0d s=%0d en=%0d csr=%0d: perr=%0d ss=%0d", ad, pa, strobe, en, csr, perr, ss);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
