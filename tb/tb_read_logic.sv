// tb_read_logic: checks every source and register select of the read
// multiplexer against the expected word.
module tb_read_logic;
  int checks = 0, failures = 0;
  logic [1:0]  src, rs;
  logic [31:0] own [4], oth [4], mem, ia, rd;
  logic        clk = 0;
  always #5 clk = ~clk;

  read_logic dut (.src, .reg_sel(rs), .own_csr(own), .other_csr(oth),
                  .mem_data(mem), .ia, .rdata(rd));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < 4; i++) begin
        own[i] = $urandom;
        oth[i] = $urandom;
      end
      mem = $urandom;
      ia  = $urandom;
      for (int s = 0; s < 4; s++) begin
        for (int r = 0; r < 4; r++) begin
          logic [31:0] exp;
          src = 2'(s); rs = 2'(r);
          #1;
          case (s)
            0: exp = own[r];
            1: exp = oth[r];
            2: exp = mem;
            default: exp = ia;
          endcase
          checks++;
          if (rd !== exp) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
