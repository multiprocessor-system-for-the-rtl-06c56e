// lut_ram: look-up table RAM with one write port (table update from the bus)
// and one registered read port (the video data path), read when ren is high.
// Contents are cleared by nothing; the host loads a table before use.
module lut_ram #(
  parameter int unsigned WORDS = 256,
  parameter int unsigned W     = 8
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] wadr,
  input  logic [W-1:0]             wdata,
  input  logic                     ren,
  input  logic [$clog2(WORDS)-1:0] radr,
  output logic [W-1:0]             q
);
  logic [W-1:0] mem [WORDS];
  always_ff @(posedge clk) begin
    if (we)  mem[wadr] <= wdata;
    if (ren) q <= mem[radr];
  end
endmodule
