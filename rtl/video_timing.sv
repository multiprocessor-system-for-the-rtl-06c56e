// video_timing: raster generator for a CCIR-like display field.
//
// A pixel enable pix_en pulses every PIX_DIV clocks. hcount runs over
// H_TOTAL pixels per line, vcount over V_TOTAL lines per field; the first
// H_ACTIVE pixels of the first V_ACTIVE lines are visible. hsync pulses (one
// pixel slot) when a line's blanking starts, vsync when the vertical retrace
// starts; vblank is high during the retrace lines. Defaults: 5 MHz pixels
// (60 MHz / 12), 320 pixels = 64 us per line, 312 lines = 20 ms per field,
// 256 x 256 visible. Used by the display processor's format control and by
// the symbol generator.
module video_timing #(
  parameter int unsigned PIX_DIV  = 12,
  parameter int unsigned H_TOTAL  = 320,
  parameter int unsigned H_ACTIVE = 256,
  parameter int unsigned V_TOTAL  = 312,
  parameter int unsigned V_ACTIVE = 256
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       pix_en,
  output logic [9:0] hcount,
  output logic [9:0] vcount,
  output logic       active,
  output logic       hsync,
  output logic       vsync,
  output logic       vblank
);
  localparam int unsigned DW = $clog2(PIX_DIV + 1);
  logic [DW-1:0] div;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      div <= '0; hcount <= '0; vcount <= '0;
    end else begin
      div <= (div == DW'(PIX_DIV - 1)) ? '0 : div + 1'b1;
      if (pix_en) begin
        if (hcount == 10'(H_TOTAL - 1)) begin
          hcount <= '0;
          vcount <= (vcount == 10'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
        end else begin
          hcount <= hcount + 1'b1;
        end
      end
    end
  end

  assign pix_en = (div == '0);
  assign active = (hcount < 10'(H_ACTIVE)) && (vcount < 10'(V_ACTIVE));
  assign vblank = (vcount >= 10'(V_ACTIVE));
  assign hsync  = pix_en && (hcount == 10'(H_ACTIVE));
  assign vsync  = pix_en && (hcount == 10'(H_ACTIVE)) && (vcount == 10'(V_ACTIVE));
endmodule
