// vdp: the video display processor, processor #4 of the system.
//
// It shows the frame buffers on the colour monitor. Its data-flow pipeline:
// the bus interface unit reads the display window of both frame buffers over
// the RTA bus (block reads, lowest bus priority of the three masters) into a
// 128 x 16 FIFO; the display format control takes pixels out of the FIFO in
// step with the raster; the programmable processing unit transforms them
// through two look-up tables into red, green and blue; the cursor unit
// overlays the cursor. The light-pen unit reports where the pen saw the
// beam. The control unit holds the host's settings, written over the bus at
// VDP_BASE; the look-up tables are written at LUT1_BASE and LUT2_BASE.
//
// Timing: the FIFO and fetch restart at the start of each vertical retrace
// (vsync), which leaves the retrace to fill the FIFO. The RGB outputs and
// their hsync, vsync and blank are registered and delayed together by four
// pixel slots from the raster counters. Pixels outside the window are black.
module vdp
  import dvs_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 128,
  parameter int unsigned PIX_DIV    = 12,
  parameter int unsigned H_TOTAL    = 320,
  parameter int unsigned V_TOTAL    = 312
) (
  input  logic       clk,
  input  logic       rst_n,
  // bus
  input  logic       bg_in,
  output logic       bg_out,
  input  logic       p_in,
  output logic       p_out,
  input  logic       bb,
  output logic       br,
  output logic       bu,
  output bus_req_t   mreq,
  input  bus_resp_t  bus_sresp,
  input  bus_req_t   bus_mreq,
  output bus_resp_t  sresp,
  // video out
  output logic [7:0] red,
  output logic [7:0] green,
  output logic [7:0] blue,
  output logic       hsync,
  output logic       vsync,
  output logic       blank,
  output logic       pix_en,
  // light pen
  input  logic       pen,
  output logic       lp_irq
);
  localparam int unsigned PIPE = 3;   // processing unit latency in pixel slots

  typedef struct packed {
    logic       active, hsync, vsync, in_window;
    logic [9:0] h, v;
  } side_t;

  logic        do_d, do_a, di_d, di_we, di_a;
  adr_t        do_adr, di_adr;
  data_t       do_rdata, di_wdata, di_rdata;
  logic        disp_on, select1, select2, cursor_on;
  logic [3:0]  page;
  logic [7:0]  x0, x1, y0, y1, fb1, fb2;
  logic [9:0]  cx, cy, hcount, vcount, lp_x, lp_y;
  logic        lut1_we, lut2_we, lp_hit, underrun, underrun_clr;
  logic [11:0] lut_wadr;
  logic [8:0]  lut_wdata;
  logic        active, hs, vs, vblank, in_window;
  logic        fifo_push, fifo_pop, fifo_empty;
  data_t       fifo_din, fifo_dout;
  logic [$clog2(FIFO_DEPTH):0] fifo_count;
  logic [7:0]  p_r, p_g, p_b, c_r, c_g, c_b;
  side_t       side [PIPE];
  side_t       cur;

  rta_comm_block #(.HAS_MASTER(1'b1), .HAS_SLAVE(1'b1), .BASE(VDP_BASE), .MASK(VDP_MASK)) u_cb (
    .clk, .rst_n, .bg_in, .bg_out, .p_in, .p_out, .bb, .br, .bu, .mreq, .bus_sresp,
    .bus_mreq, .sresp,
    .do_d, .do_we(1'b0), .do_adr, .do_wdata('0), .do_a, .do_rdata,
    .di_d, .di_we, .di_adr, .di_wdata, .di_a, .di_rdata);

  vdp_control u_ctl (
    .clk, .rst_n, .rd_d(di_d), .rd_we(di_we), .rd_adr(di_adr), .rd_wdata(di_wdata),
    .rd_a(di_a), .rd_rdata(di_rdata), .disp_on, .select1, .select2, .page, .cursor_on,
    .x0, .x1, .y0, .y1, .cx, .cy, .lut1_we, .lut2_we, .lut_wadr, .lut_wdata,
    .lp_hit, .lp_x, .lp_y, .underrun, .underrun_clr, .lp_irq);

  video_timing #(.PIX_DIV(PIX_DIV), .H_TOTAL(H_TOTAL), .H_ACTIVE(256),
                 .V_TOTAL(V_TOTAL), .V_ACTIVE(256)) u_tim (
    .clk, .rst_n, .pix_en, .hcount, .vcount, .active, .hsync(hs), .vsync(vs), .vblank);

  vdp_bus_interface #(.FIFO_DEPTH(FIFO_DEPTH)) u_biu (
    .clk, .rst_n, .restart(vs), .enable(disp_on), .x0, .x1, .y0, .y1, .fifo_count,
    .fifo_push, .fifo_din, .d(do_d), .adr(do_adr), .a(do_a), .rdata(do_rdata));

  sync_fifo #(.W(16), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .clr(vs), .push(fifo_push), .din(fifo_din), .pop(fifo_pop),
    .dout(fifo_dout), .empty(fifo_empty), .full(), .count(fifo_count), .overflow());

  vdp_format_control u_fmt (
    .clk, .rst_n, .restart(vs), .clr_underrun(underrun_clr), .pix_en, .active, .hcount, .vcount,
    .x0, .x1, .y0, .y1, .disp_on, .fifo_empty, .fifo_dout, .fifo_pop,
    .fb1, .fb2, .in_window, .underrun);

  ppu u_ppu (
    .clk, .rst_n, .pix_en, .fb1, .fb2, .select1, .select2, .page,
    .lut1_we, .lut1_wadr(lut_wadr[7:0]), .lut1_wdata(lut_wdata[7:0]),
    .lut2_we, .lut2_wadr(lut_wadr), .lut2_wdata(lut_wdata),
    .red(p_r), .green(p_g), .blue(p_b));

  // raster position and syncs travel alongside the processing unit
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < PIPE; i++) side[i] <= '0;
    end else if (pix_en) begin
      side[0] <= '{active: active, hsync: hs, vsync: vs, in_window: in_window, h: hcount, v: vcount};
      for (int i = 1; i < PIPE; i++) side[i] <= side[i-1];
    end
  end
  assign cur = side[PIPE-1];

  vdp_cursor u_cur (
    .enable(cursor_on), .active(cur.active), .hcount(cur.h), .vcount(cur.v), .cx, .cy,
    .red_in(cur.in_window ? p_r : 8'h00), .green_in(cur.in_window ? p_g : 8'h00),
    .blue_in(cur.in_window ? p_b : 8'h00),
    .red(c_r), .green(c_g), .blue(c_b), .on_cursor());

  vdp_lightpen u_lp (
    .clk, .rst_n, .pen, .active(cur.active), .hcount(cur.h), .vcount(cur.v),
    .hit(lp_hit), .x(lp_x), .y(lp_y));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      red <= '0; green <= '0; blue <= '0; hsync <= 1'b0; vsync <= 1'b0; blank <= 1'b1;
    end else if (pix_en) begin
      red <= c_r; green <= c_g; blue <= c_b;
      hsync <= cur.hsync; vsync <= cur.vsync; blank <= !cur.active;
    end
  end
endmodule
