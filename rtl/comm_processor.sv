// comm_processor: DVS communication processor, the host computer's single
// door to the RTA bus.
//
// The host places a request (host_req with we/adr/wdata) and holds it until
// host_ack, a one-clock pulse; for a read, host_rdata is valid with it. Each
// request becomes one word transfer on the bus. Because the host supplies at
// most one word at a time, the active transfer unit releases the bus after
// every word: the host transfers in word mode.
module comm_processor
  import dvs_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // host side
  input  logic      host_req,
  input  logic      host_we,
  input  adr_t      host_adr,
  input  data_t     host_wdata,
  output logic      host_ack,
  output data_t     host_rdata,
  // bus
  input  logic      bg_in,
  output logic      bg_out,
  input  logic      p_in,
  output logic      p_out,
  input  logic      bb,
  output logic      br,
  output logic      bu,
  output bus_req_t  mreq,
  input  bus_resp_t bus_sresp
);
  // one outstanding request: taken from the host, then passed to the bus
  typedef enum logic [1:0] {H_IDLE, H_BUS, H_DONE} hstate_t;
  hstate_t hs;
  logic    we_q, a;
  adr_t    adr_q;
  data_t   wd_q, rd;
  logic    unused_di;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hs <= H_IDLE; we_q <= 1'b0; adr_q <= '0; wd_q <= '0;
      host_ack <= 1'b0; host_rdata <= '0;
    end else begin
      host_ack <= 1'b0;
      unique case (hs)
        H_IDLE: if (host_req) begin
                  we_q <= host_we; adr_q <= host_adr; wd_q <= host_wdata;
                  hs <= H_BUS;
                end
        H_BUS:  if (a) begin
                  host_rdata <= rd; host_ack <= 1'b1; hs <= H_DONE;
                end
        H_DONE: if (!host_req) hs <= H_IDLE;  // host drops its request
        default: hs <= H_IDLE;
      endcase
    end
  end

  rta_comm_block #(.HAS_MASTER(1'b1), .HAS_SLAVE(1'b0)) u_cb (
    .clk, .rst_n, .bg_in, .bg_out, .p_in, .p_out, .bb, .br, .bu, .mreq,
    .bus_sresp, .bus_mreq('0), .sresp(),
    .do_d(hs == H_BUS && !a), .do_we(we_q), .do_adr(adr_q), .do_wdata(wd_q),
    .do_a(a), .do_rdata(rd),
    .di_d(unused_di), .di_we(), .di_adr(), .di_wdata(), .di_a(1'b0), .di_rdata('0));
endmodule
