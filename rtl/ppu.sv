// ppu: programmable processing unit of the video display processor.
//
// Real-time picture transformations by two cascaded look-up tables. The
// pixel of frame buffer #1 addresses LUT #1 (256 x 8). Data path selector 1
// forms the 12-bit address of LUT #2 (4096 x 9):
//   select1 = 0: {page, LUT1 out}               monadic operation on buffer 1
//   select1 = 1: {LUT1 out[7:2], buffer 2[7:2]} operation on both buffers:
//                concatenation or dyadic (e.g. subtraction)
// Data path selector 2 turns the 9-bit LUT #2 word into red, green, blue:
//   select2 = 0: the low 8 bits drive all three guns (grey levels)
//   select2 = 1: three 3-bit fields R = [8:6], G = [5:3], B = [2:0] (colour),
//                widened to 8 bits by repeating the bits.
// The table sizes, widths and the two selectors follow the original; the
// page register, the choice of the upper six bits and the colour field order
// are this design's reading. The pipeline advances on pix_en; RGB is
// registered at the third pixel-enable edge, counting the one that takes the
// pixel in. Tables are written at any time
// through lut1_we / lut2_we.
module ppu (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pix_en,
  input  logic [7:0]  fb1,
  input  logic [7:0]  fb2,
  input  logic        select1,
  input  logic        select2,
  input  logic [3:0]  page,
  input  logic        lut1_we,
  input  logic [7:0]  lut1_wadr,
  input  logic [7:0]  lut1_wdata,
  input  logic        lut2_we,
  input  logic [11:0] lut2_wadr,
  input  logic [8:0]  lut2_wdata,
  output logic [7:0]  red,
  output logic [7:0]  green,
  output logic [7:0]  blue
);
  logic [7:0]  lut1_q, fb2_d;
  logic [8:0]  lut2_q;
  logic [11:0] lut2_adr;

  lut_ram #(.WORDS(256), .W(8)) u_lut1 (
    .clk, .we(lut1_we), .wadr(lut1_wadr), .wdata(lut1_wdata),
    .ren(pix_en), .radr(fb1), .q(lut1_q));

  always_ff @(posedge clk) begin
    if (!rst_n)      fb2_d <= '0;
    else if (pix_en) fb2_d <= fb2;
  end

  assign lut2_adr = select1 ? {lut1_q[7:2], fb2_d[7:2]} : {page, lut1_q};

  lut_ram #(.WORDS(4096), .W(9)) u_lut2 (
    .clk, .we(lut2_we), .wadr(lut2_wadr), .wdata(lut2_wdata),
    .ren(pix_en), .radr(lut2_adr), .q(lut2_q));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      red <= '0; green <= '0; blue <= '0;
    end else if (pix_en) begin
      if (!select2) begin
        red   <= lut2_q[7:0];
        green <= lut2_q[7:0];
        blue  <= lut2_q[7:0];
      end else begin
        red   <= {lut2_q[8:6], lut2_q[8:6], lut2_q[8:7]};
        green <= {lut2_q[5:3], lut2_q[5:3], lut2_q[5:4]};
        blue  <= {lut2_q[2:0], lut2_q[2:0], lut2_q[2:1]};
      end
    end
  end
endmodule
