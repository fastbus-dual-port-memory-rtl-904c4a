// data_mem: single-port synchronous data memory, used twice in the data
// space: as the fast 256 x 32 memory (10 ns part in the original module) and
// as the slow 16K x 32 memory (100 ns part).
//
// Written as a plain array so synthesis can map it to a RAM macro. A write
// (en and we) stores wdata at addr on the clock edge; a read (en, not we)
// presents the word at addr on rdata after that edge, and rdata holds until
// the next read. The difference in access time between the two memories is
// not modelled here: the port waits for the access clock generator's pulse,
// whose width is 1 or 10 clock cycles, before it uses rdata.
//
// Sizes follow the document; the one-cycle synchronous read is this design's
// choice.
module data_mem #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
