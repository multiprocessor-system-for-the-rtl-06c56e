// rtd_digitizer_unit: digitizing unit of the real-time digitizer.
//
// It synchronises with the video sync pulses, generates the ADC convert
// strobe at the programmed sampling rate (10 MHz: every CLK_PER_SAMPLE_10M
// clocks, 5 MHz: every twice that) and keeps only the samples inside the
// programmed window x0..x1, y0..y1 (0..255 each) of a field the action
// network has enabled. x counts samples at the chosen rate from H_START
// clocks after the line sync; y counts lines from V_START lines after the
// field sync. A kept sample is pushed into the FIFO ADC_LAT clocks after its
// convert strobe, when the converter's result is valid.
//
// The window limits, the two rates and field selection follow the original;
// the sync offsets, the counter datapath (instead of a microprogram) and the
// converter latency are this design's choices.
module rtd_digitizer_unit #(
  parameter int unsigned CLK_PER_SAMPLE_10M = 6,   // 60 MHz clock / 10 MHz
  parameter int unsigned H_START            = 720, // clocks from line sync to x = 0 (12 us)
  parameter int unsigned V_START            = 23,  // lines from field sync to y = 0
  parameter int unsigned ADC_LAT            = 4    // convert strobe to valid data (66 ns)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       hsync,     // one-clock line sync pulse
  input  logic       vsync,     // one-clock field sync pulse
  input  logic       field_en,  // capture the current field
  input  logic       rate10,    // 1: 10 MHz sampling, 0: 5 MHz
  input  logic [7:0] x0, x1, y0, y1,
  output logic       adc_convert,
  input  logic [7:0] adc_data,
  output logic       push,
  output logic [7:0] pixel
);
  localparam int unsigned PW = $clog2(2*CLK_PER_SAMPLE_10M + 1);
  localparam int unsigned HW = $clog2(H_START + 1);

  logic [HW-1:0]  hcnt;        // clocks since line sync, saturating at H_START
  logic [PW-1:0]  pcnt;        // clocks within a sample period
  logic [8:0]     xcnt;        // sample index, 256 = past the window range
  logic [9:0]     line;        // lines since field sync
  logic [9:0]     ycoord;
  logic           in_line, tick, keep;
  logic [ADC_LAT-1:0] keep_d;
  logic [PW-1:0]  period;

  assign period  = rate10 ? PW'(CLK_PER_SAMPLE_10M - 1) : PW'(2*CLK_PER_SAMPLE_10M - 1);
  assign in_line = (hcnt == HW'(H_START)) && !xcnt[8];
  assign tick    = in_line && (pcnt == '0);
  assign ycoord  = line - 10'(V_START);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hcnt <= '0; pcnt <= '0; xcnt <= 9'h100; line <= '0;
    end else begin
      if (vsync) line <= '0;
      else if (hsync) line <= line + 1'b1;
      if (hsync) begin
        hcnt <= '0; pcnt <= '0; xcnt <= '0;
      end else if (hcnt != HW'(H_START)) begin
        hcnt <= hcnt + 1'b1;
      end else if (!xcnt[8]) begin
        if (pcnt == period) begin
          pcnt <= '0;
          xcnt <= xcnt + 1'b1;
        end else begin
          pcnt <= pcnt + 1'b1;
        end
      end
    end
  end

  assign keep = tick && field_en && (line >= 10'(V_START)) && (ycoord < 10'd256) &&
                (xcnt[7:0] >= x0) && (xcnt[7:0] <= x1) &&
                (ycoord[7:0] >= y0) && (ycoord[7:0] <= y1);

  assign adc_convert = tick;

  always_ff @(posedge clk) begin
    if (!rst_n) keep_d <= '0;
    else        keep_d <= {keep_d[ADC_LAT-2:0], keep};
  end

  assign push  = keep_d[ADC_LAT-1];
  assign pixel = adc_data;
endmodule
