// vdp_lightpen: light-pen interpretation unit of the video display
// processor.
//
// The light pen gives a pulse when the beam passes under it. The pulse is
// synchronised with two flip-flops and its rising edge latches the raster
// position (hcount, vcount) of the pixel being shown, corrected by
// DELAY pixel slots of video pipeline; hit is a one-clock pulse to the
// control unit, which forms the message for the host. Pulses outside the
// visible area are ignored.
module vdp_lightpen #(
  parameter int unsigned DELAY = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pen,       // asynchronous pen pulse
  input  logic       active,
  input  logic [9:0] hcount,
  input  logic [9:0] vcount,
  output logic       hit,
  output logic [9:0] x,
  output logic [9:0] y
);
  logic [2:0] sync;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync <= '0; hit <= 1'b0; x <= '0; y <= '0;
    end else begin
      sync <= {sync[1:0], pen};
      hit  <= 1'b0;
      if (sync[1] && !sync[2] && active) begin
        hit <= 1'b1;
        x   <= hcount - 10'(DELAY);
        y   <= vcount;
      end
    end
  end
endmodule
