// csr_regs: CSR registers #0, #1, #2 and optionally #3 of one port.
//
// Register layout (32 bits):
//   #0  read : bits 31..16 = ID 0018 (hex), bit 6 = error counter enabled,
//              bit 1 = logical addressing enabled.
//       write: a one in bit 1 enables logical addressing, a one in bit 17
//              or bit 30 disables it; a one in bit 6 enables the error
//              counter, a one in bit 22 disables it. Clearing wins over
//              setting when both are written.
//   #1  8-bit error counter in bits 7..0. It counts parity errors while
//       enabled and stops at 255; a write loads it.
//   #2  control bits 3..0: slow memory off, fast memory off, parity
//       generate, parity check. A one in bit n sets bit n, a one in bit n+16
//       clears it. Reads return the four bits in 3..0.
//   #3  module address (MA) in bits 31..16. With HAS_MA_REG = 0 the register
//       lives elsewhere (in the crate port it is inside the address/data
//       interface slices) and ma_ext is returned on a read.
// All enables and the counter reset to zero, so after reset the module
// answers only to geographic addressing, both memories are on and parity is
// neither checked nor generated.
//
// The bit positions, the ID and the set/clear pairs are the document's
// register map; the reset values and the saturating counter are this design's
// choices. Writes take effect on the clock edge; csr_out is combinational.
module csr_regs
  import fb_pkg::*;
#(
  parameter bit HAS_MA_REG = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [1:0]  wsel,
  input  logic [31:0] wdata,
  input  logic        err_inc,
  input  logic [15:0] ma_ext,
  output logic [31:0] csr_out [4],
  output logic        la_en,
  output logic        ec_en,
  output csr2_t       csr2,
  output logic [15:0] ma,
  output logic [7:0]  err_cnt
);

  logic [15:0] ma_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      la_en   <= 1'b0;
      ec_en   <= 1'b0;
      csr2    <= '0;
      err_cnt <= '0;
      ma_q    <= '0;
    end else begin
      if (we && wsel == 2'd0) begin
        if (wdata[17] || wdata[30]) la_en <= 1'b0;
        else if (wdata[1])          la_en <= 1'b1;
        if (wdata[22])              ec_en <= 1'b0;
        else if (wdata[6])          ec_en <= 1'b1;
      end
      if (we && wsel == 2'd1)       err_cnt <= wdata[7:0];
      else if (err_inc && ec_en && err_cnt != 8'hFF) err_cnt <= err_cnt + 1'b1;
      if (we && wsel == 2'd2)       csr2 <= (csr2 | wdata[3:0]) & ~wdata[19:16];
      if (we && wsel == 2'd3 && HAS_MA_REG) ma_q <= wdata[31:16];
    end
  end

  assign ma = HAS_MA_REG ? ma_q : ma_ext;

  always_comb begin
    csr_out[0] = {MODULE_ID, 9'b0, ec_en, 4'b0, la_en, 1'b0};
    csr_out[1] = {24'b0, err_cnt};
    csr_out[2] = {28'b0, csr2};
    csr_out[3] = {ma, 16'b0};
  end

endmodule
