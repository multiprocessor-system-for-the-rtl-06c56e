// rtd_action_network: control-flow level of the real-time digitizer.
//
// It holds the host's instructions (registers written over the bus through
// the passive transfer unit: acquisition window, sampling rate, field skip,
// number of fields, destination buffer and address) and sequences an
// acquisition: a write with the start bit set clears the FIFO, loads the bus
// interface unit and waits for the next field sync (ARM). At every field
// sync it enables the coming field, or skips it, so that one field in
// (skip+1) is digitized, until the programmed number has been taken. Then it
// lets the FIFO and bus interface unit drain (DRAIN) and reports the end:
// status bit done and the done output to the host. Status also shows busy and
// a FIFO overflow (data lost because the bus was not granted in time).
// Register accesses are answered one clock after the strobe.
module rtd_action_network
  import dvs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // register port from the passive transfer unit
  input  logic        rd_d,
  input  logic        rd_we,
  input  adr_t        rd_adr,
  input  data_t       rd_wdata,
  output logic        rd_a,
  output data_t       rd_rdata,
  // video
  input  logic        vsync,
  // digitizing unit
  output logic        field_en,
  output logic        rate10,
  output logic [7:0]  x0, x1, y0, y1,
  // FIFO and bus interface unit
  output logic        fifo_clr,
  input  logic        fifo_empty,
  input  logic        fifo_overflow,
  output logic        biu_load,
  output logic        biu_dest,
  output logic [14:0] biu_adr,
  output logic        biu_flush,
  input  logic        biu_idle,
  // to the host
  output logic        busy,
  output logic        done
);
  typedef enum logic [1:0] {A_IDLE, A_ARM, A_RUN, A_DRAIN} astate_t;
  astate_t     st;
  logic [3:0]  skip, skip_cnt;
  logic [15:0] nfield, fields_left;
  logic        start;

  assign start = rd_d && rd_we && (rd_adr[3:0] == RTD_CTRL) && rd_wdata[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rate10 <= 1'b1; skip <= '0; x0 <= '0; x1 <= 8'hFF; y0 <= '0; y1 <= 8'hFF;
      nfield <= 16'd1; biu_dest <= 1'b0; biu_adr <= '0;
      rd_a <= 1'b0; rd_rdata <= '0;
    end else begin
      rd_a <= rd_d;
      if (rd_d && rd_we && !busy) begin
        unique case (rd_adr[3:0])
          RTD_CTRL:   begin rate10 <= rd_wdata[1]; skip <= rd_wdata[7:4]; end
          RTD_X0:     x0 <= rd_wdata[7:0];
          RTD_X1:     x1 <= rd_wdata[7:0];
          RTD_Y0:     y0 <= rd_wdata[7:0];
          RTD_Y1:     y1 <= rd_wdata[7:0];
          RTD_NFIELD: nfield <= rd_wdata;
          RTD_DEST:   biu_dest <= rd_wdata[0];
          RTD_DADR:   biu_adr <= rd_wdata[14:0];
          default: ;
        endcase
      end
      if (rd_d && !rd_we) begin
        unique case (rd_adr[3:0])
          RTD_CTRL:   rd_rdata <= {8'h00, skip, 2'b00, rate10, 1'b0};
          RTD_X0:     rd_rdata <= {8'h00, x0};
          RTD_X1:     rd_rdata <= {8'h00, x1};
          RTD_Y0:     rd_rdata <= {8'h00, y0};
          RTD_Y1:     rd_rdata <= {8'h00, y1};
          RTD_NFIELD: rd_rdata <= nfield;
          RTD_DEST:   rd_rdata <= {15'h0, biu_dest};
          RTD_DADR:   rd_rdata <= {1'b0, biu_adr};
          RTD_STATUS: rd_rdata <= {13'h0, fifo_overflow, done, busy};
          default:    rd_rdata <= '0;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= A_IDLE; field_en <= 1'b0; fields_left <= '0; skip_cnt <= '0; done <= 1'b0;
    end else begin
      unique case (st)
        A_IDLE: if (start) begin
                  done <= 1'b0; fields_left <= nfield; skip_cnt <= '0; st <= A_ARM;
                end
        A_ARM, A_RUN: if (vsync) begin
                  if (fields_left == 0) begin
                    field_en <= 1'b0; st <= A_DRAIN;
                  end else if (skip_cnt == 0) begin
                    field_en <= 1'b1; fields_left <= fields_left - 1'b1;
                    skip_cnt <= skip; st <= A_RUN;
                  end else begin
                    field_en <= 1'b0; skip_cnt <= skip_cnt - 1'b1; st <= A_RUN;
                  end
                end
        A_DRAIN: if (fifo_empty && biu_idle) begin
                  done <= 1'b1; st <= A_IDLE;
                end
        default: st <= A_IDLE;
      endcase
    end
  end

  assign busy      = (st != A_IDLE);
  assign fifo_clr  = start && !busy;
  assign biu_load  = start && !busy;
  assign biu_flush = (st == A_DRAIN) && fifo_empty;
endmodule
