// rta_passive_transfer: passive transfer unit (bus slave side) of a
// communication block.
//
// It watches M and the address lines. An address that matches
// (adr & MASK) == BASE starts a local access: a one-clock strobe d with the
// bus address, write flag and data. The local resource answers with a (in the
// same or any later clock), with rdata valid for a read. S is raised in the
// clock of that answer, held until M falls and dropped one clock later,
// completing the four-phase handshake: with a local answer in the next clock a
// word takes four clocks. loc_adr is the address with the base
// removed.
module rta_passive_transfer
  import dvs_pkg::*;
#(
  parameter adr_t BASE = '0,
  parameter adr_t MASK = FB_MASK
) (
  input  logic      clk,
  input  logic      rst_n,
  input  bus_req_t  mreq,
  output bus_resp_t sresp,
  // local side (D_i / A_i)
  output logic      d,
  output logic      we,
  output adr_t      loc_adr,
  output data_t     wdata,
  input  logic      a,
  input  data_t     rdata
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_SHI} state_t;
  state_t state;
  data_t  held;
  logic   hit;

  assign hit     = mreq.m && ((mreq.adr & MASK) == BASE);
  assign d       = (state == S_IDLE) && hit;
  assign we      = mreq.we;
  assign loc_adr = mreq.adr & ~MASK;
  assign wdata   = mreq.wdata;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      held  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (hit) begin
                  if (a) begin held <= rdata; state <= S_SHI; end
                  else state <= S_WAIT;
                end
        S_WAIT: if (a) begin held <= rdata; state <= S_SHI; end
        S_SHI:  if (!mreq.m) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    sresp = '0;
    if ((state == S_WAIT || (state == S_IDLE && hit)) && a) begin
      sresp.s     = 1'b1;
      sresp.rdata = rdata;
    end else if (state == S_SHI) begin
      sresp.s     = 1'b1;
      sresp.rdata = held;
    end
  end
endmodule
