// read_logic: the read multiplexer of one port, which picks the word the
// port drives on its AD lines in a read cycle.
//
// Sources, chosen by src: the port's own CSR out bus, the other port's CSR
// out bus (both indexed by the register number), the data memory out bus,
// or the internal address register (the answer to a secondary-address read).
// Combinational. The document shows a Read Logic block fed by both CSR out
// buses and the memory out bus; the select encoding is this design's own.
module read_logic (
  input  logic [1:0]  src,        // 0 own CSR, 1 other CSR, 2 memory, 3 IA
  input  logic [1:0]  reg_sel,
  input  logic [31:0] own_csr   [4],
  input  logic [31:0] other_csr [4],
  input  logic [31:0] mem_data,
  input  logic [31:0] ia,
  output logic [31:0] rdata
);

  always_comb begin
    unique case (src)
      2'd0:    rdata = own_csr[reg_sel];
      2'd1:    rdata = other_csr[reg_sel];
      2'd2:    rdata = mem_data;
      default: rdata = ia;
    endcase
  end

endmodule
