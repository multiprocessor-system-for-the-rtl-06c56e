// rta_backplane: the lines of the RTA bus and its bus controller.
//
// Open-collector lines of the original are wired-OR here: BR, BB, the master
// lines (M, write flag, address, data) and the slave lines (S, read data) are
// the OR of what every unit drives, each unit driving zeros when inactive.
// The grant BG leaves the bus controller and runs through the masters in
// index order, index 0 first (highest priority); the priority chain P_N
// starts with 0 at master 0. Each master's chain outputs are fed back in as
// bg_out/p_out.
module rta_backplane
  import dvs_pkg::*;
#(
  parameter int unsigned NM = 3,
  parameter int unsigned NS = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      [NM-1:0] br,
  input  logic      [NM-1:0] bu,
  input  logic      [NM-1:0] bg_out,
  input  logic      [NM-1:0] p_out,
  output logic      [NM-1:0] bg_in,
  output logic      [NM-1:0] p_in,
  output logic      bb,
  input  bus_req_t  [NM-1:0] mreq,
  input  bus_resp_t [NS-1:0] sresp,
  output bus_req_t  bus_mreq,
  output bus_resp_t bus_sresp
);
  logic bg, br_any;

  rta_bus_controller u_ctl (.clk, .rst_n, .br(br_any), .bb, .bg);

  assign br_any = |br;
  assign bb     = |bu;

  always_comb begin
    bus_mreq  = '0;
    bus_sresp = '0;
    for (int i = 0; i < NM; i++) bus_mreq  = bus_mreq  | mreq[i];
    for (int j = 0; j < NS; j++) bus_sresp = bus_sresp | sresp[j];
  end

  for (genvar i = 0; i < NM; i++) begin : g_chain
    if (i == 0) begin : g_head
      assign bg_in[i] = bg;
      assign p_in[i]  = 1'b0;
    end else begin : g_next
      assign bg_in[i] = bg_out[i-1];
      assign p_in[i]  = p_out[i-1];
    end
  end

  logic [NS-1:0] s_bits;
  always_comb for (int j = 0; j < NS; j++) s_bits[j] = sresp[j].s;
  a_one_owner: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(bu));
  a_one_slave: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(s_bits));
endmodule
