// tb_dvs_top: end-to-end test of the whole Digital Video System at its
// default sizes and CCIR-like timing (60 MHz clock, 64 us lines, 312-line
// fields).
//
// A video model supplies line and field syncs and answers the digitizer's
// converter strobes. The host, through the communication processor, loads
// the display processor's look-up tables (grey identity), switches the
// display on for a full 256 x 256 window, and starts the digitizer on one
// full 256 x 256 field at 10 MHz into frame buffer #1 while the display
// keeps reading both frame buffers. Meanwhile it reads a digitizer register
// now and then and writes a character cell into the symbol generator. After
// the acquisition the test compares every pixel of a full displayed field
// with the video model's values, and reads the symbol generator's cell back.
//
// Mechanisms counted, each must occur: block transfers, word transfers,
// pre-emption of the display processor by a higher-priority master, the end
// of an acquisition, a symbol-generator access held back until the vertical
// retrace, and a light-pen message.
module tb_dvs_top;
  import dvs_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic        host_req = 0, host_we = 0, host_ack;
  adr_t        host_adr = '0;
  data_t       host_wdata = '0, host_rdata;
  logic        rtd_busy, rtd_done, rtd_overflow, lp_irq;
  logic        vid_hsync, vid_vsync, adc_convert;
  logic [7:0]  adc_data;
  logic [7:0]  vdp_red, vdp_green, vdp_blue, vsg_red, vsg_green, vsg_blue;
  logic        vdp_hsync, vdp_vsync, vdp_blank, vdp_pix_en, light_pen = 0;
  logic        vsg_req = 0, vsg_we = 0, vsg_ack, vsg_hsync, vsg_vsync, vsg_blank, vsg_pix_en;
  logic [11:0] vsg_adr = '0;
  logic [15:0] vsg_wdata = '0, vsg_rdata;

  dvs_top dut (.*);

  adc_model #(.LINE_CLKS(3840), .LINES(312), .LAT(4)) u_video (
    .clk, .rst_n, .hsync(vid_hsync), .vsync(vid_vsync), .convert(adc_convert), .data(adc_data));

  // host port; a semaphore keeps the two host threads apart
  semaphore hs = new(1);
  task automatic host(input bit w, input adr_t ad, input data_t dat, output data_t q);
    hs.get(1);
    @(posedge clk); host_req <= 1; host_we <= w; host_adr <= ad; host_wdata <= dat;
    do @(posedge clk); while (!host_ack);
    q = host_rdata; host_req <= 0; @(posedge clk);
    hs.put(1);
  endtask
  task automatic wr(input adr_t ad, input data_t dat);
    data_t q; host(1, ad, dat, q);
  endtask

  // mechanism counters, from the bus-use lines
  int block_t = 0, word_t = 0, vdp_preempt = 0, acq_done = 0, vsg_waited = 0, lp_msgs = 0;
  int words [3];
  logic [2:0] bu_q = '0;
  always @(posedge clk) begin
    logic [2:0] bu;
    bu = {dut.u_vdp.bu, dut.u_comm.bu, dut.u_rtd.bu};
    for (int m = 0; m < 3; m++) begin
      if (bu[m] && !bu_q[m]) words[m] = 0;
      if (bu[m] && dut.bus_sresp.s && !$past(dut.bus_sresp.s)) words[m]++;
      if (!bu[m] && bu_q[m]) begin
        if (words[m] > 1) block_t++; else word_t++;
      end
    end
    // the display gave the bus away with its demand still up, to a higher master
    if (bu_q[2] && !bu[2] && dut.u_vdp.do_d && (dut.u_rtd.br || dut.u_comm.br)) vdp_preempt++;
    if (rtd_done && !$past(rtd_done)) acq_done++;
    if (lp_irq && !$past(lp_irq)) lp_msgs++;
    bu_q <= bu;
  end

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // displayed raster rebuilt from the outputs
  int ox = 0, oy = -1, seen = 0, bad = 0, acq_field = -1;
  bit was_blank = 1, checking = 0;
  always @(posedge clk) if (vdp_pix_en) begin
    #1;
    if (vdp_vsync) oy = -1;
    if (!vdp_blank) begin
      if (was_blank) begin oy++; ox = 0; end
      if (checking) begin
        logic [7:0] v;
        v = u_video.pix(acq_field, 23 + oy, ox);
        seen++;
        if ({vdp_red, vdp_green, vdp_blue} != {v, v, v}) begin
          bad++;
          if (bad < 6) $display("pixel (%0d,%0d) = %h expected %h", ox, oy,
                                {vdp_red, vdp_green, vdp_blue}, {v, v, v});
        end
      end
      ox++;
    end
    was_blank = vdp_blank;
  end

  data_t q;
  logic [15:0] vq;
  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    // tables: grey identity through page 0
    for (int a = 0; a < 256; a++)  wr(LUT1_BASE | adr_t'(a), data_t'(a));
    for (int a = 0; a < 4096; a++) wr(LUT2_BASE | adr_t'(a), data_t'(a % 256));
    wr(VDP_BASE | adr_t'(VDP_X0), 0);
    wr(VDP_BASE | adr_t'(VDP_X1), 255);
    wr(VDP_BASE | adr_t'(VDP_Y0), 0);
    wr(VDP_BASE | adr_t'(VDP_Y1), 255);
    wr(VDP_BASE | adr_t'(VDP_CTRL), 16'h0001);
    // digitizer: full window, 10 MHz, one field, frame buffer #1 from 0
    wr(RTD_BASE | adr_t'(RTD_X0), 0);
    wr(RTD_BASE | adr_t'(RTD_X1), 255);
    wr(RTD_BASE | adr_t'(RTD_Y0), 0);
    wr(RTD_BASE | adr_t'(RTD_Y1), 255);
    wr(RTD_BASE | adr_t'(RTD_NFIELD), 1);
    wr(RTD_BASE | adr_t'(RTD_DEST), 0);
    wr(RTD_BASE | adr_t'(RTD_DADR), 0);
    wr(RTD_BASE | adr_t'(RTD_CTRL), 16'h0003);
    acq_field = u_video.field + 1;
    fork
      // symbol generator: one cell, written from the picture time
      begin
        bit in_pic;
        in_pic = !dut.u_vsg.u_tim.vblank;
        @(posedge clk); vsg_req <= 1; vsg_we <= 1; vsg_adr <= 12'h041; vsg_wdata <= 16'h4A41;
        do @(posedge clk); while (!vsg_ack);
        vsg_req <= 0;
        if (in_pic) vsg_waited++;
        check(dut.u_vsg.u_tim.vblank, "symbol generator access inside the retrace");
        @(posedge clk); vsg_req <= 1; vsg_we <= 0; vsg_adr <= 12'h041;
        do @(posedge clk); while (!vsg_ack);
        vq = vsg_rdata; vsg_req <= 0;
        check(vq == 16'h4A41, "symbol generator read-back");
      end
      // host polls the digitizer status while it acquires
      begin
        do begin
          repeat (20000) @(posedge clk);
          host(0, RTD_BASE | adr_t'(RTD_STATUS), 0, q);
        end while (!q[1]);
        check(q == 16'h0002, "digitizer done without overflow");
      end
    join
    check(!rtd_overflow, "no FIFO overflow");
    // one whole displayed field after the acquisition
    @(posedge dut.u_vdp.u_tim.vsync);
    host(0, VDP_BASE | adr_t'(VDP_STATUS), 0, q);
    @(posedge clk iff (vdp_pix_en && vdp_vsync));
    seen = 0; bad = 0; checking = 1;
    @(posedge clk iff (vdp_pix_en && vdp_vsync));
    checking = 0;
    check(seen == 256 * 256, $sformatf("visible pixels %0d", seen));
    check(bad == 0, $sformatf("%0d displayed pixels differ from the digitized field", bad));
    host(0, VDP_BASE | adr_t'(VDP_STATUS), 0, q);
    check(q[0] == 1'b0, "no display FIFO underrun");
    // light pen
    wait (oy == 100 && ox == 50);
    light_pen <= 1; repeat (3) @(posedge clk); light_pen <= 0;
    repeat (30) @(posedge clk);
    host(0, VDP_BASE | adr_t'(VDP_LPY), 0, q);
    check(q[9:0] == 10'd100, "light-pen line");

    check(block_t > 0, $sformatf("block transfers: %0d", block_t));
    check(word_t > 0, $sformatf("word transfers: %0d", word_t));
    check(vdp_preempt > 0, $sformatf("display pre-empted: %0d", vdp_preempt));
    check(acq_done == 1, "acquisition ended once");
    check(vsg_waited > 0, "symbol-generator access waited for the retrace");
    check(lp_msgs > 0, "light-pen message");
    $display("mechanisms: block %0d, word %0d, display pre-empted %0d, acquisitions %0d, vsg waits %0d, light pen %0d",
             block_t, word_t, vdp_preempt, acq_done, vsg_waited, lp_msgs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
