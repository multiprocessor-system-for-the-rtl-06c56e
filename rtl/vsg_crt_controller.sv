// vsg_crt_controller: CRT controller of the video symbol generator.
//
// It reads the page buffer in raster order and makes the alphanumeric
// picture. The page is COLS x ROWS character cells of 8 x 8 pixels (64 x 32
// fill the 2K page exactly). Each page word is
//   [7:0] character code, [10:8] symbol colour (R,G,B), [13:11] background
//   colour (R,G,B), [14] intensity, [15] blink.
// The character generator is a 256 x 8-line RAM loaded by the host; bit 7 of
// a line is the leftmost pixel. The colour generator shows the symbol colour
// on set pixels and the background colour elsewhere, at full level with
// intensity and at two-thirds level without; a blinking cell shows only its
// background during half of each 32-field blink period.
//
// Timing: in the pixel slot of a raster position the page word is read, one
// clock later the character line; the pixel leaves at the next pixel slot, so
// RGB, hsync, vsync and blank trail the raster counters by one pixel slot.
// The word format, cell size and blink rate are this design's choices.
module vsg_crt_controller #(
  parameter int unsigned COLS = 64,
  parameter int unsigned ROWS = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pix_en,
  input  logic        active,
  input  logic [9:0]  hcount,
  input  logic [9:0]  vcount,
  input  logic        hsync_in,
  input  logic        vsync_in,
  // page buffer, multiplexer input 0
  output logic        pb_en,
  output logic [10:0] pb_adr,
  input  logic [15:0] pb_q,
  // character generator read port
  output logic        cg_ren,
  output logic [10:0] cg_radr,
  input  logic [7:0]  cg_q,
  // video
  output logic [7:0]  red,
  output logic [7:0]  green,
  output logic [7:0]  blue,
  output logic        hsync,
  output logic        vsync,
  output logic        blank
);
  logic       pix_en_d, in_text_q, act_q, hs_q, vs_q;
  logic [2:0] hbit_q;
  logic [4:0] blink_cnt;
  logic       in_text, dot, show_fg;
  logic [2:0] colour;
  logic [7:0] level;
  logic [2:0] vcount_q_low;

  assign in_text = active && (hcount < 10'(COLS*8)) && (vcount < 10'(ROWS*8));
  assign pb_en   = pix_en && in_text;
  assign pb_adr  = 11'((vcount[9:3] * 10'(COLS)) + 10'(hcount[9:3]));
  assign cg_ren  = pix_en_d;
  assign cg_radr = {pb_q[7:0], vcount_q_low};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pix_en_d <= 1'b0; in_text_q <= 1'b0; act_q <= 1'b0; hs_q <= 1'b0; vs_q <= 1'b0;
      hbit_q <= '0; vcount_q_low <= '0; blink_cnt <= '0;
    end else begin
      pix_en_d <= pix_en;
      if (pix_en) begin
        in_text_q <= in_text; act_q <= active; hs_q <= hsync_in; vs_q <= vsync_in;
        hbit_q <= hcount[2:0]; vcount_q_low <= vcount[2:0];
        if (vsync_in) blink_cnt <= blink_cnt + 1'b1;
      end
    end
  end

  assign dot     = cg_q[3'd7 - hbit_q];
  assign show_fg = dot && !(pb_q[15] && blink_cnt[4]);
  assign colour  = show_fg ? pb_q[10:8] : pb_q[13:11];
  assign level   = pb_q[14] ? 8'hFF : 8'hAA;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      red <= '0; green <= '0; blue <= '0; hsync <= 1'b0; vsync <= 1'b0; blank <= 1'b1;
    end else if (pix_en) begin
      red   <= (in_text_q && colour[2]) ? level : 8'h00;
      green <= (in_text_q && colour[1]) ? level : 8'h00;
      blue  <= (in_text_q && colour[0]) ? level : 8'h00;
      hsync <= hs_q; vsync <= vs_q; blank <= !act_q;
    end
  end
endmodule
