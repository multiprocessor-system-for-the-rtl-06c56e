// rta_bus_request: bus request unit of a communication block.
//
// While the block needs the bus (bn) and does not own it, the unit raises the
// bus request BR. The grant BG arrives from the block above in the daisy
// chain; a block that needs the bus keeps it, otherwise it passes BG on
// (combinationally, like the original's asynchronous chain). The priority
// chain P_N works the same way: p_out = p_in | bn, so every block knows
// whether a block above it wants the bus. The owner drives bus use BU (which
// makes up BB). When p_in rises the owner must give the bus back: it asserts
// yield, the active transfer unit finishes the word in flight and drops
// release; then BU falls and the controller grants again. A block whose
// demand ends also releases.
//
// Timing: take-over one clock after BG reaches a needing block with BB low.
module rta_bus_request (
  input  logic clk,
  input  logic rst_n,
  input  logic bn,       // bus need from the active transfer unit
  input  logic release_i,// active transfer unit: give the bus back now
  input  logic bg_in,
  output logic bg_out,
  input  logic p_in,     // a block above needs the bus
  output logic p_out,
  input  logic bb,       // bus busy (wired-OR of all BU)
  output logic br,
  output logic bu,       // this block owns the bus
  output logic yield_o   // a higher block wants the bus
);
  always_ff @(posedge clk) begin
    if (!rst_n)                          bu <= 1'b0;
    else if (bu && release_i)            bu <= 1'b0;
    else if (!bu && bg_in && bn && !bb)  bu <= 1'b1;
  end

  assign br      = bn & ~bu;
  assign bg_out  = bg_in & ~bn;
  assign p_out   = p_in | bn;
  assign yield_o = bu & p_in;
endmodule
