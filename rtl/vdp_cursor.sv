// vdp_cursor: cursor control unit of the video display processor.
//
// When enabled, it overlays a full-screen cross-hair in white on the visible
// picture: every pixel on column cx or on line cy. The cursor position comes
// from the control unit, which may move it to the light-pen position. Purely
// combinational on the (already delayed) raster position; the cross-hair
// shape is this design's choice.
module vdp_cursor (
  input  logic       enable,
  input  logic       active,
  input  logic [9:0] hcount,
  input  logic [9:0] vcount,
  input  logic [9:0] cx,
  input  logic [9:0] cy,
  input  logic [7:0] red_in, green_in, blue_in,
  output logic [7:0] red, green, blue,
  output logic       on_cursor
);
  assign on_cursor = enable && active && ((hcount == cx) || (vcount == cy));
  assign red   = on_cursor ? 8'hFF : red_in;
  assign green = on_cursor ? 8'hFF : green_in;
  assign blue  = on_cursor ? 8'hFF : blue_in;
endmodule
