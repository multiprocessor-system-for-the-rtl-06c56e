// rtd: the real-time digitizer, processor #1 of the system.
//
// Video samples flow through a pipeline: the digitizing unit picks the
// samples of the programmed window and fields, the 256 x 8 FIFO absorbs the
// difference between the steady sample rate and the bursty bus, and the bus
// interface unit writes 16-bit words into a frame buffer as block transfers.
// Above this data-flow pipeline the action network holds the instructions
// and sequences the acquisition. The RTD is master and slave on the RTA bus:
// its registers sit at RTD_BASE. It has the highest bus priority, as picture
// data would otherwise be lost.
module rtd
  import dvs_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH         = 256,
  parameter int unsigned CLK_PER_SAMPLE_10M = 6,
  parameter int unsigned H_START            = 720,
  parameter int unsigned V_START            = 23,
  parameter int unsigned ADC_LAT            = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  // video
  input  logic       hsync,
  input  logic       vsync,
  output logic       adc_convert,
  input  logic [7:0] adc_data,
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
  // status to the host
  output logic       busy,
  output logic       done,
  output logic       overflow
);
  logic        do_d, do_a;
  adr_t        do_adr;
  data_t       do_wdata;
  logic        di_d, di_we, di_a;
  adr_t        di_adr;
  data_t       di_wdata, di_rdata;
  logic        field_en, rate10;
  logic [7:0]  x0, x1, y0, y1;
  logic        fifo_clr, fifo_empty, fifo_push, fifo_pop;
  logic [7:0]  pixel, fifo_dout;
  logic        biu_load, biu_dest, biu_flush, biu_idle;
  logic [14:0] biu_adr;

  rta_comm_block #(.HAS_MASTER(1'b1), .HAS_SLAVE(1'b1), .BASE(RTD_BASE), .MASK(DEV_MASK)) u_cb (
    .clk, .rst_n, .bg_in, .bg_out, .p_in, .p_out, .bb, .br, .bu, .mreq, .bus_sresp,
    .bus_mreq, .sresp,
    .do_d, .do_we(1'b1), .do_adr, .do_wdata, .do_a, .do_rdata(),
    .di_d, .di_we, .di_adr, .di_wdata, .di_a, .di_rdata);

  rtd_action_network u_an (
    .clk, .rst_n, .rd_d(di_d), .rd_we(di_we), .rd_adr(di_adr), .rd_wdata(di_wdata),
    .rd_a(di_a), .rd_rdata(di_rdata), .vsync, .field_en, .rate10, .x0, .x1, .y0, .y1,
    .fifo_clr, .fifo_empty, .fifo_overflow(overflow), .biu_load, .biu_dest, .biu_adr,
    .biu_flush, .biu_idle, .busy, .done);

  rtd_digitizer_unit #(.CLK_PER_SAMPLE_10M(CLK_PER_SAMPLE_10M), .H_START(H_START),
                       .V_START(V_START), .ADC_LAT(ADC_LAT)) u_du (
    .clk, .rst_n, .hsync, .vsync, .field_en, .rate10, .x0, .x1, .y0, .y1,
    .adc_convert, .adc_data, .push(fifo_push), .pixel);

  sync_fifo #(.W(8), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .clr(fifo_clr), .push(fifo_push), .din(pixel), .pop(fifo_pop),
    .dout(fifo_dout), .empty(fifo_empty), .full(), .count(), .overflow);

  rtd_bus_interface u_biu (
    .clk, .rst_n, .load(biu_load), .dest_sel(biu_dest), .start_adr(biu_adr),
    .flush(biu_flush), .fifo_empty, .fifo_dout, .fifo_pop,
    .d(do_d), .adr(do_adr), .wdata(do_wdata), .a(do_a), .idle(biu_idle));
endmodule
