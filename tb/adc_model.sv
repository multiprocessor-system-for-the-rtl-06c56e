// adc_model: behavioural model of the video A/D converter and of the video
// source in front of it, for testbenches.
//
// It produces the line and field sync pulses of a reduced raster (LINE_CLKS
// clocks per line, LINES per field) and answers each convert strobe, LAT
// clocks later, with the sample value pix(field, line, n), n being the number
// of the convert strobe within the line. pix() is a fixed hash, so a test
// can compute every expected byte independently.
module adc_model #(
  parameter int unsigned LINE_CLKS = 400,
  parameter int unsigned LINES     = 16,
  parameter int unsigned LAT       = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       hsync,
  output logic       vsync,
  input  logic       convert,
  output logic [7:0] data
);
  int hc, line, field, n;
  logic [7:0] pipe [LAT];

  function automatic logic [7:0] pix(input int f, input int l, input int x);
    return 8'((f * 71) ^ (l * 13) ^ (x * 5 + 1) ^ (x >> 2));
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hc <= 0; line <= 0; field <= 0; n <= 0;
      for (int i = 0; i < LAT; i++) pipe[i] <= '0;
    end else begin
      if (hc == LINE_CLKS - 1) begin
        hc <= 0; n <= 0;
        if (line == LINES - 1) begin line <= 0; field <= field + 1; end
        else line <= line + 1;
      end else begin
        hc <= hc + 1;
        if (convert) n <= n + 1;
      end
      pipe[0] <= convert ? pix(field, line, n) : 8'h00;
      for (int i = 1; i < LAT; i++) pipe[i] <= pipe[i-1];
    end
  end

  // the sync pulse of a line comes at its first clock; line 0 also has vsync
  assign hsync = rst_n && (hc == 0);
  assign vsync = rst_n && (hc == 0) && (line == 0);
  assign data  = pipe[LAT-1];
endmodule
