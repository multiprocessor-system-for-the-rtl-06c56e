// rta_bus_controller: the bus controller of the RTA bus.
//
// It issues the bus grant BG when some master requests the bus (BR, the
// wired-OR of all bus requests) and the bus is not busy (BB). BG then runs
// down the daisy chain of communication blocks; the first block that needs
// the bus keeps it. BG is registered, so a grant follows a request by one
// clock. As in the original, the controller itself knows nothing of
// priorities: they come from the position in the chain.
module rta_bus_controller (
  input  logic clk,
  input  logic rst_n,
  input  logic br,   // bus request (wired-OR)
  input  logic bb,   // bus busy (wired-OR)
  output logic bg    // bus grant, head of the daisy chain
);
  always_ff @(posedge clk) begin
    if (!rst_n) bg <= 1'b0;
    else        bg <= br & ~bb;
  end
endmodule
