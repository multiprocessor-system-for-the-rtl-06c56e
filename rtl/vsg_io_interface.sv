// vsg_io_interface: host port of the video symbol generator.
//
// The host raises req with we, adr and wdata and holds them until ack, a
// one-clock pulse (rdata valid with it for reads), then drops req. Address
// bit 11 selects the character generator (0x800-0xFFF, byte-wide) instead of
// the page buffer (0x000-0x7FF). An access is only carried out while retrace
// (vertical retrace from the CRT controller) is high, so the host never
// disturbs the picture; a request made during the picture waits. While it
// owns the page buffer the unit switches the multiplexer to itself (sel).
module vsg_io_interface (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        retrace,
  // host
  input  logic        req,
  input  logic        we,
  input  logic [11:0] adr,
  input  logic [15:0] wdata,
  output logic        ack,
  output logic [15:0] rdata,
  // page buffer, multiplexer input 1
  output logic        sel,
  output logic        pb_en,
  output logic        pb_we,
  output logic [10:0] pb_adr,
  output logic [15:0] pb_wdata,
  input  logic [15:0] pb_q,
  // character generator write port
  output logic        cg_we,
  output logic [10:0] cg_adr,
  output logic [7:0]  cg_wdata
);
  typedef enum logic [1:0] {I_IDLE, I_READ, I_DONE} istate_t;
  istate_t st;
  logic    go;

  assign go       = (st == I_IDLE) && req && retrace;
  assign sel      = go || (st == I_READ);
  assign pb_en    = go && !adr[11];
  assign pb_we    = we;
  assign pb_adr   = adr[10:0];
  assign pb_wdata = wdata;
  assign cg_we    = go && adr[11] && we;
  assign cg_adr   = adr[10:0];
  assign cg_wdata = wdata[7:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= I_IDLE; ack <= 1'b0; rdata <= '0;
    end else begin
      ack <= 1'b0;
      unique case (st)
        I_IDLE: if (go) st <= I_READ;
        I_READ: begin
                  rdata <= adr[11] ? 16'h0000 : pb_q;
                  ack   <= 1'b1;
                  st    <= I_DONE;
                end
        I_DONE: if (!req) st <= I_IDLE;
        default: st <= I_IDLE;
      endcase
    end
  end

  a_only_in_retrace: assert property (@(posedge clk) disable iff (!rst_n)
                       (pb_en || cg_we) |-> retrace);
endmodule
