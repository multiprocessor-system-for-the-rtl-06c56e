// vdp_bus_interface: bus interface unit of the video display processor.
//
// It reads the display window out of both frame buffers into the FIFO, ahead
// of the beam. At restart (the start of the vertical retrace) it goes back to
// line y0, word x0/2. For every word address of the window it reads the word
// of frame buffer #1 and then the word of the same address in frame buffer
// #2, so the FIFO holds pairs that carry two pixels of each buffer. Demands
// are raised while the FIFO has room for another word; with room for many
// words the demand stays up and the active transfer unit holds the bus for a
// block. When the digitizer takes the bus away the reads simply pause and
// resume later. Window x limits are in pixels and used at word granularity.
module vdp_bus_interface
  import dvs_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        restart,
  input  logic        enable,
  input  logic [7:0]  x0, x1, y0, y1,
  input  logic [$clog2(FIFO_DEPTH):0] fifo_count,
  output logic        fifo_push,
  output data_t       fifo_din,
  // active transfer unit
  output logic        d,
  output adr_t        adr,
  input  logic        a,
  input  data_t       rdata
);
  logic [7:0] y;
  logic [6:0] wx;
  logic       second;   // 0: buffer #1 word next, 1: buffer #2 word
  logic       done;
  logic       room;

  // a word still in flight may also need a place
  assign room = (fifo_count < ($clog2(FIFO_DEPTH)+1)'(FIFO_DEPTH - 1));
  assign d    = enable && !done && room && !restart;
  assign adr  = (second ? FB2_BASE : FB1_BASE) | adr_t'({y, wx});

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y <= '0; wx <= '0; second <= 1'b0; done <= 1'b1;
    end else if (restart) begin
      y <= y0; wx <= x0[7:1]; second <= 1'b0; done <= 1'b0;
    end else if (a) begin
      if (!second) begin
        second <= 1'b1;
      end else begin
        second <= 1'b0;
        if (wx >= x1[7:1]) begin
          wx <= x0[7:1];
          if (y >= y1) done <= 1'b1;
          else         y <= y + 1'b1;
        end else begin
          wx <= wx + 1'b1;
        end
      end
    end
  end

  assign fifo_push = a;
  assign fifo_din  = rdata;
endmodule
