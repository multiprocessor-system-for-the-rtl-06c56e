// vsg_page_buffer: page buffer of the video symbol generator, a 2K x 16
// static RAM holding the alphanumeric page, with its data path multiplexer.
//
// Input 1 of the multiplexer is the I/O interface (address and write data),
// input 0 the CRT controller (read address only). sel picks the source. The
// RAM reads in the clock of an enabled access; q holds until the next one.
module vsg_page_buffer #(
  parameter int unsigned WORDS = 2048
) (
  input  logic                     clk,
  input  logic                     sel,      // 1: I/O interface, 0: CRT controller
  // input 1
  input  logic                     io_en,
  input  logic                     io_we,
  input  logic [$clog2(WORDS)-1:0] io_adr,
  input  logic [15:0]              io_wdata,
  // input 0
  input  logic                     crt_en,
  input  logic [$clog2(WORDS)-1:0] crt_adr,
  output logic [15:0]              q
);
  logic [15:0] mem [WORDS];
  logic                     en, we;
  logic [$clog2(WORDS)-1:0] adr;

  assign en  = sel ? io_en  : crt_en;
  assign we  = sel && io_we;
  assign adr = sel ? io_adr : crt_adr;

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[adr] <= io_wdata;
      q <= mem[adr];
    end
  end
endmodule
