// tb_fma601_adi: checks one address/data interface slice.
//  - the address latch and the logical comparator against R#3, with and
//    without la_width_ctrl
//  - the geographic comparator and the LA/GA select
//  - R#3 written from the AD lines and from the user data in, and read
//    back through the user data out
//  - the output buffers (gate_output, gate_do) and both inversions
//  - parity of the internal bus
module tb_fma601_adi;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       rst_n, gi, go, lib, wla, rla, lw, sga, gdi, idi, gdo, ido, par, av;
  logic [7:0] adi, ado, ga, din, dout, la;

  fma601_adi dut (.clk, .rst_n, .ad_in(adi), .ad_out(ado), .gate_input(gi), .gate_output(go),
    .parity(par), .ga, .latch_ib(lib), .write_la(wla), .read_la(rla), .la_width_ctrl(lw),
    .select_ga(sga), .addr_valid(av), .data_in(din), .gate_di(gdi), .invert_di(idi),
    .data_out(dout), .gate_do(gdo), .invert_do(ido), .la_reg(la));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: %h expected %h", what, got, exp);
    end
  endtask

  task automatic idle();
    gi = 1; go = 0; lib = 0; wla = 0; rla = 0; gdi = 0; gdo = 0; idi = 0; ido = 0;
  endtask

  initial begin
    rst_n = 0; idle(); lw = 1; sga = 0; adi = 0; ga = 8'h0B; din = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // write R#3 from the AD lines
    adi = 8'h5A; wla = 1; @(negedge clk); idle();
    chk(la, 8'h5A, "R#3 from AD");
    // latch a matching address
    adi = 8'h5A; lib = 1; @(negedge clk); idle(); adi = 8'h00;
    #1 chk({7'b0, av}, 1, "LA match");
    adi = 8'h5B; lib = 1; @(negedge clk); idle();
    #1 chk({7'b0, av}, 0, "LA mismatch");
    lw = 0; #1 chk({7'b0, av}, 1, "LA width off: always match");
    lw = 1;
    // geographic
    sga = 1;
    adi = 8'h0B; lib = 1; @(negedge clk); idle();
    #1 chk({7'b0, av}, 1, "GA match");
    adi = 8'h0C; lib = 1; @(negedge clk); idle();
    #1 chk({7'b0, av}, 0, "GA mismatch");
    sga = 0;
    // R#3 from user data with inversion, read back through user data out
    gi = 0; gdi = 1; din = 8'h0F; idi = 1; wla = 1; @(negedge clk); idle();
    chk(la, 8'hF0, "R#3 from inverted user data");
    gi = 0; rla = 1; gdo = 1; #1 chk(dout, 8'hF0, "read R#3");
    ido = 1; #1 chk(dout, 8'h0F, "read R#3 inverted");
    chk({7'b0, par}, 0, "parity of F0");
    idle();
    // output buffer
    gi = 0; gdi = 1; din = 8'h37; go = 1; #1 chk(ado, 8'h37, "AD out");
    chk({7'b0, par}, 8'(^8'h37), "parity of 37");
    go = 0; #1 chk(ado, 8'h00, "AD out gated off");
    gdo = 0; #1 chk(dout, 8'h00, "data out gated off");
    // random parity and pass-through
    for (int i = 0; i < 200; i++) begin
      idle(); adi = 8'($urandom); gdo = 1;
      #1;
      chk(dout, adi, "AD to data out");
      chk({7'b0, par}, {7'b0, ^adi}, "parity");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
