// vsg: the video symbol generator, which puts alphanumeric information on
// the colour monitor.
//
// The host writes characters with their colour, intensity and blink
// attributes into the 2K x 16 page buffer through the I/O interface, which
// only gets the buffer during the vertical retrace (24 lines of 64 us, about
// 1.5 ms every 20 ms). The rest of the time the CRT controller reads the
// page in raster order and forms the pixels through the character generator
// and colour generator. Its own raster timing runs at 10 MHz pixels
// (PIX_DIV clocks), 640 pixels per 64 us line, 312 lines per field, of which
// 512 x 256 carry text. The alphanumeric picture is meant to be mixed with
// the display processor's picture outside this design.
module vsg #(
  parameter int unsigned PIX_DIV = 6,
  parameter int unsigned H_TOTAL = 640,
  parameter int unsigned V_TOTAL = 312,
  parameter int unsigned V_RETRACE = 24
) (
  input  logic        clk,
  input  logic        rst_n,
  // host
  input  logic        req,
  input  logic        we,
  input  logic [11:0] adr,
  input  logic [15:0] wdata,
  output logic        ack,
  output logic [15:0] rdata,
  // video
  output logic [7:0]  red,
  output logic [7:0]  green,
  output logic [7:0]  blue,
  output logic        hsync,
  output logic        vsync,
  output logic        blank,
  output logic        pix_en
);
  logic        active, hs, vs, vblank;
  logic [9:0]  hcount, vcount;
  logic        sel, io_en, io_we, crt_en, cg_we, cg_ren;
  logic [10:0] io_adr, crt_adr, cg_adr, cg_radr;
  logic [15:0] io_wdata, pb_q;
  logic [7:0]  cg_wdata, cg_q;

  video_timing #(.PIX_DIV(PIX_DIV), .H_TOTAL(H_TOTAL), .H_ACTIVE(512),
                 .V_TOTAL(V_TOTAL), .V_ACTIVE(V_TOTAL - V_RETRACE)) u_tim (
    .clk, .rst_n, .pix_en, .hcount, .vcount, .active, .hsync(hs), .vsync(vs), .vblank);

  vsg_io_interface u_io (
    .clk, .rst_n, .retrace(vblank), .req, .we, .adr, .wdata, .ack, .rdata,
    .sel, .pb_en(io_en), .pb_we(io_we), .pb_adr(io_adr), .pb_wdata(io_wdata), .pb_q,
    .cg_we, .cg_adr, .cg_wdata);

  vsg_page_buffer #(.WORDS(2048)) u_pb (
    .clk, .sel, .io_en, .io_we, .io_adr, .io_wdata, .crt_en, .crt_adr, .q(pb_q));

  lut_ram #(.WORDS(2048), .W(8)) u_cg (
    .clk, .we(cg_we), .wadr(cg_adr), .wdata(cg_wdata), .ren(cg_ren), .radr(cg_radr), .q(cg_q));

  vsg_crt_controller #(.COLS(64), .ROWS(32)) u_crt (
    .clk, .rst_n, .pix_en, .active, .hcount, .vcount, .hsync_in(hs), .vsync_in(vs),
    .pb_en(crt_en), .pb_adr(crt_adr), .pb_q, .cg_ren, .cg_radr, .cg_q,
    .red, .green, .blue, .hsync, .vsync, .blank);
endmodule
