// dvs_top: the Digital Video System, a multiprocessor for the real-time
// digitization, storage and display of video picture series.
//
// Dedicated processors share the RTA bus (real-time asynchronous bus, built
// here as its single-clock equivalent) and two frame buffers of 32K x 16
// bits. In daisy-chain priority order the bus masters are:
//   0  real-time digitizer (RTD), picture acquisition, must never lose data
//   1  DVS communication processor, the host computer's word port
//   2  video display processor (VDP), frame display and processing
// A higher-priority request takes the bus from the current master after the
// word in flight; the interrupted master resumes by itself. The video symbol
// generator (VSG) stands beside the bus with its own host port; its picture
// is meant to be mixed with the VDP's outside the design, so both video
// outputs are brought out. The A/D converter, the sync separator and the
// video D/A converters are analog and outside: the digitizer's converter
// port, digital sync inputs and digital RGB outputs take their place.
//
// All of it runs on one clock, nominally 60 MHz: a bus word takes four
// clocks (66.7 ns, 15 Mwords/s), the digitizer samples at 10 or 5 MHz and
// the display runs 5 MHz pixels, the symbol generator 10 MHz pixels.
module dvs_top
  import dvs_pkg::*;
#(
  parameter int unsigned FB_WORDS = 32768,
  parameter int unsigned H_START  = 720,
  parameter int unsigned V_START  = 23,
  parameter int unsigned VDP_H_TOTAL = 320,
  parameter int unsigned VDP_V_TOTAL = 312,
  parameter int unsigned VSG_H_TOTAL = 640,
  parameter int unsigned VSG_V_TOTAL = 312
) (
  input  logic        clk,
  input  logic        rst_n,
  // host computer, through the communication processor
  input  logic        host_req,
  input  logic        host_we,
  input  adr_t        host_adr,
  input  data_t       host_wdata,
  output logic        host_ack,
  output data_t       host_rdata,
  output logic        rtd_busy,
  output logic        rtd_done,
  output logic        rtd_overflow,
  output logic        lp_irq,
  // video input: converter and separated syncs
  input  logic        vid_hsync,
  input  logic        vid_vsync,
  output logic        adc_convert,
  input  logic [7:0]  adc_data,
  // display processor video
  output logic [7:0]  vdp_red,
  output logic [7:0]  vdp_green,
  output logic [7:0]  vdp_blue,
  output logic        vdp_hsync,
  output logic        vdp_vsync,
  output logic        vdp_blank,
  output logic        vdp_pix_en,
  input  logic        light_pen,
  // symbol generator: host port and video
  input  logic        vsg_req,
  input  logic        vsg_we,
  input  logic [11:0] vsg_adr,
  input  logic [15:0] vsg_wdata,
  output logic        vsg_ack,
  output logic [15:0] vsg_rdata,
  output logic [7:0]  vsg_red,
  output logic [7:0]  vsg_green,
  output logic [7:0]  vsg_blue,
  output logic        vsg_hsync,
  output logic        vsg_vsync,
  output logic        vsg_blank,
  output logic        vsg_pix_en
);
  localparam int unsigned NM = 3;
  localparam int unsigned NS = 4;

  logic      [NM-1:0] br, bu, bg_in, bg_out, p_in, p_out;
  logic                bb;
  bus_req_t  [NM-1:0] mreq;
  bus_resp_t [NS-1:0] sresp;
  bus_req_t            bus_mreq;
  bus_resp_t           bus_sresp;

  rta_backplane #(.NM(NM), .NS(NS)) u_bus (
    .clk, .rst_n, .br, .bu, .bg_out, .p_out, .bg_in, .p_in, .bb,
    .mreq, .sresp, .bus_mreq, .bus_sresp);

  rtd #(.FIFO_DEPTH(256), .H_START(H_START), .V_START(V_START)) u_rtd (
    .clk, .rst_n, .hsync(vid_hsync), .vsync(vid_vsync), .adc_convert, .adc_data,
    .bg_in(bg_in[0]), .bg_out(bg_out[0]), .p_in(p_in[0]), .p_out(p_out[0]), .bb,
    .br(br[0]), .bu(bu[0]), .mreq(mreq[0]), .bus_sresp, .bus_mreq, .sresp(sresp[2]),
    .busy(rtd_busy), .done(rtd_done), .overflow(rtd_overflow));

  comm_processor u_comm (
    .clk, .rst_n, .host_req, .host_we, .host_adr, .host_wdata, .host_ack, .host_rdata,
    .bg_in(bg_in[1]), .bg_out(bg_out[1]), .p_in(p_in[1]), .p_out(p_out[1]), .bb,
    .br(br[1]), .bu(bu[1]), .mreq(mreq[1]), .bus_sresp);

  vdp #(.FIFO_DEPTH(128), .H_TOTAL(VDP_H_TOTAL), .V_TOTAL(VDP_V_TOTAL)) u_vdp (
    .clk, .rst_n,
    .bg_in(bg_in[2]), .bg_out(bg_out[2]), .p_in(p_in[2]), .p_out(p_out[2]), .bb,
    .br(br[2]), .bu(bu[2]), .mreq(mreq[2]), .bus_sresp, .bus_mreq, .sresp(sresp[3]),
    .red(vdp_red), .green(vdp_green), .blue(vdp_blue), .hsync(vdp_hsync),
    .vsync(vdp_vsync), .blank(vdp_blank), .pix_en(vdp_pix_en), .pen(light_pen), .lp_irq);

  frame_buffer #(.WORDS(FB_WORDS), .BASE(FB1_BASE), .MASK(FB_MASK)) u_fb1 (
    .clk, .rst_n, .bus_mreq, .sresp(sresp[0]));

  frame_buffer #(.WORDS(FB_WORDS), .BASE(FB2_BASE), .MASK(FB_MASK)) u_fb2 (
    .clk, .rst_n, .bus_mreq, .sresp(sresp[1]));

  vsg #(.H_TOTAL(VSG_H_TOTAL), .V_TOTAL(VSG_V_TOTAL)) u_vsg (
    .clk, .rst_n, .req(vsg_req), .we(vsg_we), .adr(vsg_adr), .wdata(vsg_wdata),
    .ack(vsg_ack), .rdata(vsg_rdata), .red(vsg_red), .green(vsg_green), .blue(vsg_blue),
    .hsync(vsg_hsync), .vsync(vsg_vsync), .blank(vsg_blank), .pix_en(vsg_pix_en));
endmodule
