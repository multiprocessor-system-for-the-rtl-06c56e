// rta_comm_block: communication block, the attachment of one dedicated
// processor to the RTA bus.
//
// It holds the bus request unit, the active transfer unit (master, if
// HAS_MASTER) and the passive transfer unit (slave, if HAS_SLAVE). The
// dialogue handler of the original is the routing between these units and
// the processor: outgoing demands (D_o/A_o) go to the active unit, accesses
// from the bus (D_i/A_i) come out of the passive unit. The daisy chains for
// grant (BG) and priority (P_N) pass through the block.
module rta_comm_block
  import dvs_pkg::*;
#(
  parameter bit   HAS_MASTER = 1'b1,
  parameter bit   HAS_SLAVE  = 1'b1,
  parameter adr_t BASE       = '0,
  parameter adr_t MASK       = DEV_MASK
) (
  input  logic      clk,
  input  logic      rst_n,
  // bus
  input  logic      bg_in,
  output logic      bg_out,
  input  logic      p_in,
  output logic      p_out,
  input  logic      bb,
  output logic      br,
  output logic      bu,
  output bus_req_t  mreq,
  input  bus_resp_t bus_sresp,  // wired-OR of all slaves, seen by the master
  input  bus_req_t  bus_mreq,   // wired-OR of all masters, seen by the slave
  output bus_resp_t sresp,
  // processor, outgoing (D_o / A_o)
  input  logic      do_d,
  input  logic      do_we,
  input  adr_t      do_adr,
  input  data_t     do_wdata,
  output logic      do_a,
  output data_t     do_rdata,
  // processor, incoming (D_i / A_i)
  output logic      di_d,
  output logic      di_we,
  output adr_t      di_adr,
  output data_t     di_wdata,
  input  logic      di_a,
  input  data_t     di_rdata
);
  logic bn, rel, yield_w;

  if (HAS_MASTER) begin : g_master
    rta_bus_request u_bru (
      .clk, .rst_n, .bn, .release_i(rel), .bg_in, .bg_out, .p_in, .p_out,
      .bb, .br, .bu, .yield_o(yield_w));
    rta_active_transfer u_atu (
      .clk, .rst_n, .d(do_d), .we(do_we), .adr(do_adr), .wdata(do_wdata),
      .a(do_a), .rdata(do_rdata), .bn, .release_o(rel), .bu, .yield_i(yield_w),
      .mreq, .sresp(bus_sresp));
  end else begin : g_no_master
    assign bn      = 1'b0;
    assign rel     = 1'b0;
    assign yield_w = 1'b0;
    assign bg_out  = bg_in;
    assign p_out   = p_in;
    assign br      = 1'b0;
    assign bu      = 1'b0;
    assign mreq    = '0;
    assign do_a    = 1'b0;
    assign do_rdata = '0;
  end

  if (HAS_SLAVE) begin : g_slave
    rta_passive_transfer #(.BASE(BASE), .MASK(MASK)) u_ptu (
      .clk, .rst_n, .mreq(bus_mreq), .sresp, .d(di_d), .we(di_we),
      .loc_adr(di_adr), .wdata(di_wdata), .a(di_a), .rdata(di_rdata));
  end else begin : g_no_slave
    assign sresp    = '0;
    assign di_d     = 1'b0;
    assign di_we    = 1'b0;
    assign di_adr   = '0;
    assign di_wdata = '0;
  end
endmodule
