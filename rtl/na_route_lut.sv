// Route Lookup Table of the initiator adapter. Indexed by the 8 most
// significant bits of the OCP address, it gives the routing path a best-effort
// (BE) request needs in its header flit. Each entry holds
// {return path[31:16], forward path[15:0]}: the forward path becomes the
// header flit, the return path travels in the control flit so the target can
// route its response back.
//
// Read is combinational (lookup and encapsulation happen in the same OCP
// cycle); write is synchronous and comes from configuration writes on the OCP
// socket. Entries are not reset and must be programmed before use.
// The 8-bit index is the adapter's; the entry layout is this design's choice.
module na_route_lut #(
  parameter int unsigned IDX_W   = 8,
  parameter int unsigned ENTRY_W = 32
) (
  input  logic               clk,
  input  logic               we,
  input  logic [IDX_W-1:0]   waddr,
  input  logic [ENTRY_W-1:0] wdata,
  input  logic [IDX_W-1:0]   raddr,
  output logic [ENTRY_W-1:0] rdata
);
  logic [ENTRY_W-1:0] mem [2**IDX_W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
