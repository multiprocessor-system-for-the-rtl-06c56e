// vdp_control: control unit of the video display processor.
//
// It receives the host's instructions as register writes through the VDP's
// passive transfer unit and sets the other units: display on/off, the data
// path selectors and table page of the processing unit, the display window,
// the cursor. Writes into the look-up table windows are passed to the tables.
// It returns the light-pen message (position and hit flag, which the read of
// VDP_LPX clears) and the FIFO underrun flag (cleared by its read). With "cursor follows pen" set, a
// light-pen hit moves the cursor to the pen position. Accesses are answered
// one clock after the strobe. The register set stands in for the original's
// microprogrammed control unit, whose microcode is not known.
module vdp_control
  import dvs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // register port from the passive transfer unit (address relative to VDP_BASE)
  input  logic        rd_d,
  input  logic        rd_we,
  input  adr_t        rd_adr,
  input  data_t       rd_wdata,
  output logic        rd_a,
  output data_t       rd_rdata,
  // settings
  output logic        disp_on,
  output logic        select1,
  output logic        select2,
  output logic [3:0]  page,
  output logic        cursor_on,
  output logic [7:0]  x0, x1, y0, y1,
  output logic [9:0]  cx, cy,
  // look-up table update
  output logic        lut1_we,
  output logic        lut2_we,
  output logic [11:0] lut_wadr,
  output logic [8:0]  lut_wdata,
  // light pen and status
  input  logic        lp_hit,     // one-clock pulse
  input  logic [9:0]  lp_x, lp_y,
  input  logic        underrun,
  output logic        underrun_clr,  // the status read clears the underrun flag
  output logic        lp_irq
);
  logic       follow;
  logic [1:0] region;
  logic [3:0] reg_ix;

  assign region = rd_adr[13:12];   // 0 registers, 1 LUT #1, 2 LUT #2
  assign reg_ix = rd_adr[3:0];

  assign lut1_we   = rd_d && rd_we && (region == 2'd1);
  assign lut2_we   = rd_d && rd_we && (region == 2'd2);
  assign lut_wadr  = rd_adr[11:0];
  assign lut_wdata = rd_wdata[8:0];
  assign underrun_clr = rd_d && !rd_we && (region == 2'd0) && (reg_ix == VDP_STATUS);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      disp_on <= 1'b0; select1 <= 1'b0; select2 <= 1'b0; page <= '0;
      cursor_on <= 1'b0; follow <= 1'b0;
      x0 <= '0; x1 <= 8'hFF; y0 <= '0; y1 <= 8'hFF; cx <= '0; cy <= '0;
      lp_irq <= 1'b0; rd_a <= 1'b0; rd_rdata <= '0;
    end else begin
      rd_a <= rd_d;
      if (lp_hit) begin
        lp_irq <= 1'b1;
        if (follow) begin cx <= lp_x; cy <= lp_y; end
      end
      if (rd_d && rd_we && region == 2'd0) begin
        unique case (reg_ix)
          VDP_CTRL: begin
            disp_on <= rd_wdata[0]; select1 <= rd_wdata[1]; select2 <= rd_wdata[2];
            cursor_on <= rd_wdata[3]; follow <= rd_wdata[4]; page <= rd_wdata[11:8];
          end
          VDP_X0: x0 <= rd_wdata[7:0];
          VDP_X1: x1 <= rd_wdata[7:0];
          VDP_Y0: y0 <= rd_wdata[7:0];
          VDP_Y1: y1 <= rd_wdata[7:0];
          VDP_CX: cx <= rd_wdata[9:0];
          VDP_CY: cy <= rd_wdata[9:0];
          default: ;
        endcase
      end
      if (rd_d && !rd_we) begin
        rd_rdata <= '0;
        if (region == 2'd0) begin
          unique case (reg_ix)
            VDP_CTRL:   rd_rdata <= {4'h0, page, 3'b000, follow, cursor_on, select2, select1, disp_on};
            VDP_X0:     rd_rdata <= {8'h00, x0};
            VDP_X1:     rd_rdata <= {8'h00, x1};
            VDP_Y0:     rd_rdata <= {8'h00, y0};
            VDP_Y1:     rd_rdata <= {8'h00, y1};
            VDP_CX:     rd_rdata <= {6'h00, cx};
            VDP_CY:     rd_rdata <= {6'h00, cy};
            VDP_LPX:    begin rd_rdata <= {lp_irq, 5'h00, lp_x}; lp_irq <= lp_hit; end
            VDP_LPY:    rd_rdata <= {6'h00, lp_y};
            VDP_STATUS: rd_rdata <= {15'h0, underrun};
            default:    rd_rdata <= '0;
          endcase
        end
      end
    end
  end
endmodule
