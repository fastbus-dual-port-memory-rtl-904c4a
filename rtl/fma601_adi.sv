// fma601_adi: one 8-bit address/data interface (ADI) slice. The crate port
// uses four of them for the 32 AD lines.
//
// Structure, after the slice's block diagram: an internal 8-bit bus links
//  - the FASTBUS buffer (AD lines in; AD lines out when gate_output),
//  - a parity generator (parity = XOR of the internal bus),
//  - a latch loaded from the internal bus by latch_ib (the address),
//  - the logical address register R#3 (write_la loads it from the internal
//    bus, read_la puts it on the internal bus),
//  - a logical address comparator (latch against R#3) and a geographic
//    address comparator (latch against the GA lines),
//  - a multiplexer that gives the LA or GA comparison as addr_valid,
//  - the user I/O buffer, with optional inversion in each direction.
// The internal bus carries, in priority order, the AD lines (gate_input),
// the user data in (gate_di), R#3 (read_la), otherwise the latch.
// With la_width_ctrl low the slice does not take part in the logical
// comparison and reports a match, so a wider chip set can compare fewer
// bits than it has.
//
// Combinational apart from the latch and R#3, which load on the clock edge.
// The document gives the slice's block diagram and its use; the bus priority,
// the polarity of select_ga and the meaning given to la_width_ctrl are this
// design's own. R#3 resets to zero.
module fma601_adi (
  input  logic       clk,
  input  logic       rst_n,
  // FASTBUS side
  input  logic [7:0] ad_in,
  output logic [7:0] ad_out,
  input  logic       gate_input,
  input  logic       gate_output,
  output logic       parity,
  input  logic [7:0] ga,
  // control
  input  logic       latch_ib,
  input  logic       write_la,
  input  logic       read_la,
  input  logic       la_width_ctrl,
  input  logic       select_ga,
  output logic       addr_valid,
  // user side
  input  logic [7:0] data_in,
  input  logic       gate_di,
  input  logic       invert_di,
  output logic [7:0] data_out,
  input  logic       gate_do,
  input  logic       invert_do,
  output logic [7:0] la_reg
);

  logic [7:0] ib;
  logic [7:0] latch_q;
  logic       la_match, ga_match;

  always_comb begin
    if (gate_input)   ib = ad_in;
    else if (gate_di) ib = data_in ^ {8{invert_di}};
    else if (read_la) ib = la_reg;
    else              ib = latch_q;
    ad_out     = gate_output ? ib : 8'h00;
    data_out   = gate_do ? ib ^ {8{invert_do}} : 8'h00;
    parity     = ^ib;
    la_match   = !la_width_ctrl || (latch_q == la_reg);
    ga_match   = (latch_q == ga);
    addr_valid = select_ga ? ga_match : la_match;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      latch_q <= '0;
      la_reg  <= '0;
    end else begin
      if (latch_ib) latch_q <= ib;
      if (write_la) la_reg  <= ib;
    end
  end

endmodule
