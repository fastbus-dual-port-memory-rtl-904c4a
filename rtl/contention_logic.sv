// contention_logic: first-come-first-serve ownership of the shared data
// space by the crate port (index 0) and the cable port (index 1).
//
// A port raises req while it is attached to the module in data space. The
// first port to ask becomes the owner and keeps grant until it drops req;
// the other port is held off and gets wt for as long as it asks without
// owning. If both ask in the same cycle while the space is free, the crate
// port wins (a tie rule of this design; the document only says "first come
// first serve"). A release and the other port's grant happen in the same
// cycle. grant is registered: it follows req by one clock.
module contention_logic (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] req,
  output logic [1:0] grant,
  output logic [1:0] wt
);

  logic [1:0] owner_d;

  always_comb begin
    owner_d = grant & req;           // an owner keeps the space while asking
    if (owner_d == 2'b00) begin
      if      (req[0]) owner_d = 2'b01;
      else if (req[1]) owner_d = 2'b10;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) grant <= 2'b00;
    else        grant <= owner_d;
  end

  assign wt = req & ~grant;

  // Never more than one owner.
  a_one_owner: assert property (@(posedge clk) disable iff (!rst_n) grant != 2'b11);

endmodule
