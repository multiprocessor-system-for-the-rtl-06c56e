// dvs_pkg: types and constants shared by the Digital Video System.
//
// The RTA bus ("real-time asynchronous bus") carries a 16-bit data vector, as
// the original system did for compatibility with its PDP-11 host. The
// original bus is asynchronous; this RTL is its single-clock equivalent, in
// which every handshake edge is a registered level change. A master drives a
// bus_req_t (M strobe, write flag, address, write data), a slave a bus_resp_t
// (S strobe, read data). Lines are wired-OR: an inactive unit drives zeros.
//
// The 17-bit word address map is this design's own choice:
//   0x00000-0x07FFF  frame buffer #1 (32K x 16)
//   0x08000-0x0FFFF  frame buffer #2 (32K x 16)
//   0x10000-0x10FFF  real-time digitizer registers
//   0x14000-0x14FFF  video display processor registers
//   0x15000-0x150FF  VDP look-up table #1 (256 x 8)
//   0x16000-0x16FFF  VDP look-up table #2 (4096 x 9)
package dvs_pkg;
  localparam int unsigned ADR_W  = 17;
  localparam int unsigned DATA_W = 16;

  typedef logic [ADR_W-1:0]  adr_t;
  typedef logic [DATA_W-1:0] data_t;

  // master -> bus
  typedef struct packed {
    logic  m;      // master signal: a transfer is requested
    logic  we;     // 1 = write, 0 = read
    adr_t  adr;
    data_t wdata;
  } bus_req_t;

  // slave -> bus
  typedef struct packed {
    logic  s;      // slave signal: transfer done, rdata valid on reads
    data_t rdata;
  } bus_resp_t;

  localparam adr_t FB1_BASE  = 17'h00000;
  localparam adr_t FB2_BASE  = 17'h08000;
  localparam adr_t FB_MASK   = 17'h18000;
  localparam adr_t RTD_BASE  = 17'h10000;
  localparam adr_t VDP_BASE  = 17'h14000;
  localparam adr_t LUT1_BASE = 17'h15000;
  localparam adr_t LUT2_BASE = 17'h16000;
  localparam adr_t DEV_MASK  = 17'h1F000;   // one 4K-word device window
  localparam adr_t VDP_MASK  = 17'h1C000;   // the VDP answers for 16K words

  // RTD register offsets (word address low bits)
  localparam logic [3:0] RTD_CTRL   = 4'd0;  // [0] start (self-clearing), [1] 10 MHz sampling, [7:4] field skip
  localparam logic [3:0] RTD_X0     = 4'd1;
  localparam logic [3:0] RTD_X1     = 4'd2;
  localparam logic [3:0] RTD_Y0     = 4'd3;
  localparam logic [3:0] RTD_Y1     = 4'd4;
  localparam logic [3:0] RTD_NFIELD = 4'd5;  // number of fields to acquire
  localparam logic [3:0] RTD_DEST   = 4'd6;  // [0] frame buffer select
  localparam logic [3:0] RTD_DADR   = 4'd7;  // start word address inside the buffer
  localparam logic [3:0] RTD_STATUS = 4'd8;  // read: [0] busy [1] done [2] overflow

  // VDP register offsets
  localparam logic [3:0] VDP_CTRL   = 4'd0;  // [0] display on [1] select1 [2] select2 [3] cursor on [4] cursor follows pen [11:8] LUT2 page
  localparam logic [3:0] VDP_X0     = 4'd1;  // window, in pixels (x edges word aligned)
  localparam logic [3:0] VDP_X1     = 4'd2;
  localparam logic [3:0] VDP_Y0     = 4'd3;
  localparam logic [3:0] VDP_Y1     = 4'd4;
  localparam logic [3:0] VDP_CX     = 4'd5;  // cursor
  localparam logic [3:0] VDP_CY     = 4'd6;
  localparam logic [3:0] VDP_LPX    = 4'd7;  // read: [15] light pen hit, [8:0] x; reading clears the hit
  localparam logic [3:0] VDP_LPY    = 4'd8;  // read: [8:0] y
  localparam logic [3:0] VDP_STATUS = 4'd9;  // read: [0] FIFO underrun seen

endpackage
