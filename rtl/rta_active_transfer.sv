// rta_active_transfer: active transfer unit (bus master side) of a
// communication block.
//
// The dedicated processor places a demand (d, with we/adr/wdata held stable)
// and receives a one-clock acknowledge a, with rdata valid for reads. The unit
// asks the bus request unit for the bus (bn) and, once it owns it (bu), runs
// the four-phase M/S handshake: M up, slave answers S, M down, S down. That is
// four clocks per word when the slave answers at once (15 Mwords/s at the
// nominal 60 MHz clock).
//
// Block or word mode is chosen automatically: when a word completes and S has
// fallen, the unit keeps the bus and starts the next word if the processor
// already has its next demand up; otherwise it releases the bus. A fast
// processor therefore transfers in blocks, a slow one word by word. When a
// higher-priority block requests (yield), the unit releases after the word in
// flight, and asks again while its demand stays.
module rta_active_transfer
  import dvs_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // processor side (D_o / A_o)
  input  logic      d,
  input  logic      we,
  input  adr_t      adr,
  input  data_t     wdata,
  output logic      a,
  output data_t     rdata,
  // bus request unit
  output logic      bn,
  output logic      release_o,
  input  logic      bu,
  input  logic      yield_i,
  // bus lines
  output bus_req_t  mreq,
  input  bus_resp_t sresp
);
  typedef enum logic [1:0] {S_IDLE, S_MHI, S_MLO} state_t;
  state_t   state;
  bus_req_t drive;
  logic     start_word, last_done;

  // first word of a tenure, or next word of a block
  assign last_done  = (state == S_MLO) && !sresp.s;
  assign start_word = d && bu && !yield_i && ((state == S_IDLE) || last_done);
  assign release_o  = bu && (((state == S_IDLE) && (!d || yield_i)) ||
                             (last_done && (!d || yield_i)));
  assign bn         = d || (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      drive <= '0;
      a     <= 1'b0;
      rdata <= '0;
    end else begin
      a <= 1'b0;
      unique case (state)
        S_IDLE, S_MLO: begin
          if (start_word) begin
            drive <= '{m: 1'b1, we: we, adr: adr, wdata: wdata};
            state <= S_MHI;
          end else if (state == S_MLO && last_done) begin
            state <= S_IDLE;
          end
        end
        S_MHI: begin
          if (sresp.s) begin
            drive.m <= 1'b0;
            a       <= 1'b1;
            rdata   <= sresp.rdata;
            state   <= S_MLO;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign mreq = bu ? drive : '0;

  // the bus must stay owned for the whole handshake
  a_own: assert property (@(posedge clk) disable iff (!rst_n)
           (state == S_MHI) |-> bu);
endmodule
