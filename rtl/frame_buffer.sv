// frame_buffer: one of the two common picture stores of the system, a
// 32K x 16-bit RAM (64K x 8 bits, one 256 x 256 picture of 8-bit pixels) on
// the RTA bus as a slave.
//
// A 256 x 256 picture is stored line by line, word address y*128 + x/2, with
// the even pixel in the low byte and the odd pixel in the high byte (this
// design's convention; the digitizer and the display processor both use it).
// The RAM reads and writes in the clock of the passive unit's strobe and
// answers one clock later, so a bus word takes four clocks.
module frame_buffer
  import dvs_pkg::*;
#(
  parameter int unsigned WORDS = 32768,
  parameter adr_t        BASE  = FB1_BASE,
  parameter adr_t        MASK  = FB_MASK
) (
  input  logic      clk,
  input  logic      rst_n,
  input  bus_req_t  bus_mreq,
  output bus_resp_t sresp
);
  localparam int unsigned AW = $clog2(WORDS);

  logic  d, we, a;
  adr_t  ladr;
  data_t wdata, q;
  data_t mem [WORDS];

  rta_passive_transfer #(.BASE(BASE), .MASK(MASK)) u_ptu (
    .clk, .rst_n, .mreq(bus_mreq), .sresp, .d, .we, .loc_adr(ladr),
    .wdata, .a, .rdata(q));

  always_ff @(posedge clk) begin
    if (d) begin
      if (we) mem[ladr[AW-1:0]] <= wdata;
      q <= mem[ladr[AW-1:0]];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) a <= 1'b0;
    else        a <= d;
  end
endmodule
