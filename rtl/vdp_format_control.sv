// vdp_format_control: display format control of the video display
// processor.
//
// For each visible raster pixel it decides whether the pixel lies inside the
// programmed window (x0..x1 at word granularity, y0..y1) and, if so, supplies
// that pixel of frame buffer #1 and of frame buffer #2 from the FIFO. A pair
// register is filled from the FIFO with two words (buffer #1 word, then
// buffer #2 word) in the clocks between pixel slots; the even pixel uses the
// low bytes, the odd pixel the high bytes and frees the pair. If the pair is
// not ready when a window pixel is due, the pixel is shown as zero and the
// sticky underrun flag is set. Outside the window the pixel is zero. restart
// (start of retrace) empties the pair register with the FIFO.
module vdp_format_control (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        restart,
  input  logic        clr_underrun,
  input  logic        pix_en,
  input  logic        active,
  input  logic [9:0]  hcount,
  input  logic [9:0]  vcount,
  input  logic [7:0]  x0, x1, y0, y1,
  input  logic        disp_on,
  // FIFO (first word falls through)
  input  logic        fifo_empty,
  input  logic [15:0] fifo_dout,
  output logic        fifo_pop,
  // pixel to the processing unit, valid at pix_en
  output logic [7:0]  fb1,
  output logic [7:0]  fb2,
  output logic        in_window,
  output logic        underrun
);
  logic [15:0] w1, w2;
  logic [1:0]  fill;        // words in the pair register
  logic        consume;

  assign in_window = disp_on && active && (hcount[9:8] == 2'b00) && (vcount[9:8] == 2'b00) &&
                     (hcount[7:1] >= x0[7:1]) && (hcount[7:1] <= x1[7:1]) &&
                     (vcount[7:0] >= y0) && (vcount[7:0] <= y1);
  assign consume   = pix_en && in_window && hcount[0] && (fill == 2'd2);
  assign fifo_pop  = !fifo_empty && (fill != 2'd2) && !restart;

  always_ff @(posedge clk) begin
    if (!rst_n || restart) begin
      fill <= '0; w1 <= '0; w2 <= '0;
    end else begin
      if (fifo_pop) begin
        if (fill == 2'd0) w1 <= fifo_dout;
        else              w2 <= fifo_dout;
        fill <= fill + 1'b1;
      end else if (consume) begin
        fill <= '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr_underrun) underrun <= 1'b0;
    else if (pix_en && in_window && fill != 2'd2) underrun <= 1'b1;
  end

  always_comb begin
    fb1 = '0; fb2 = '0;
    if (in_window && fill == 2'd2) begin
      fb1 = hcount[0] ? w1[15:8] : w1[7:0];
      fb2 = hcount[0] ? w2[15:8] : w2[7:0];
    end
  end
endmodule
