// tb_dvs_workloads: the Digital Video System at its default sizes and
// CCIR-like timing (60 MHz clock, 64 us lines, 312-line fields), run
// through the workloads the original sets for it, each timed:
//   1. reloading all of look-up table #2 from the host while the display
//      runs, which must take less than one 20 ms field so the tables can
//      change 50 times a second;
//   2. acquiring one full 256 x 256 field at 5 MHz into frame buffer #2
//      while the display reads both buffers, with no FIFO overflow and no
//      display underrun;
//   3. showing buffer #2 through the two-buffer path of selector 1 (LUT #1
//      cleared, so LUT #2 sees buffer #2's upper six bits), checked on every
//      pixel of a field, then rewriting LUT #2 to the inverse grey scale and
//      checking the next whole field again (table animation);
//   4. writing a whole 2K-word symbol-generator page, started during the
//      picture, which the host may only do during vertical retraces of
//      about 1.5 ms, and reading it back;
//   5. a picture series: eight consecutive fields of a 64 x 64 window at
//      10 MHz (50 fields a second) stored one after another in frame
//      buffer #1, then read back word by word by the host and compared.
// The video source is the same behavioural model as in the end-to-end test;
// the expected pixels come from its sample function, not from the design.
// The table reload time and the page write are reported in clocks and
// fields.
module tb_dvs_workloads;
  import dvs_pkg::*;

  localparam int unsigned FIELD_CLKS = 312 * 3840;   // 20 ms at 60 MHz

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

  task automatic host(input bit w, input adr_t ad, input data_t dat, output data_t q);
    @(posedge clk); host_req <= 1; host_we <= w; host_adr <= ad; host_wdata <= dat;
    do @(posedge clk); while (!host_ack);
    q = host_rdata; host_req <= 0; @(posedge clk);
  endtask
  task automatic wr(input adr_t ad, input data_t dat);
    data_t q; host(1, ad, dat, q);
  endtask

  int outside_retrace = 0, vsg_fields = 0;
  task automatic vsg_access(input bit w, input logic [11:0] ad, input logic [15:0] dat,
                            output logic [15:0] q);
    @(posedge clk); vsg_req <= 1; vsg_we <= w; vsg_adr <= ad; vsg_wdata <= dat;
    do @(posedge clk); while (!vsg_ack);
    q = vsg_rdata; vsg_req <= 0;
    if (!dut.u_vsg.u_tim.vblank) outside_retrace++;
  endtask

  initial begin
    #300000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge dut.u_vsg.u_tim.vsync) vsg_fields++;

  // displayed raster rebuilt from the outputs; expected grey from mode:
  // 0 = buffer #2's upper six bits, 1 = their inverse
  int ox = 0, oy = -1, seen = 0, bad = 0, acq_field = -1, mode = 0;
  bit was_blank = 1, checking = 0;
  function automatic logic [7:0] expect_grey(input logic [7:0] v, input int md);
    logic [7:0] g;
    g = {v[7:2], 2'b00};
    return (md == 0) ? g : 8'(255 - g);
  endfunction
  always @(posedge clk) if (vdp_pix_en) begin
    #1;
    if (vdp_vsync) oy = -1;
    if (!vdp_blank) begin
      if (was_blank) begin oy++; ox = 0; end
      if (checking) begin
        logic [7:0] e;
        e = expect_grey(u_video.pix(acq_field, 23 + oy, ox), mode);
        seen++;
        if ({vdp_red, vdp_green, vdp_blue} != {e, e, e}) begin
          bad++;
          if (bad < 6) $display("pixel (%0d,%0d) = %h expected %h", ox, oy,
                                {vdp_red, vdp_green, vdp_blue}, {e, e, e});
        end
      end
      ox++;
    end
    was_blank = vdp_blank;
  end

  task automatic check_field(input string what);
    data_t q;
    @(posedge dut.u_vdp.u_tim.vsync);
    host(0, VDP_BASE | adr_t'(VDP_STATUS), 0, q);
    @(posedge clk iff (vdp_pix_en && vdp_vsync));
    seen = 0; bad = 0; checking = 1;
    @(posedge clk iff (vdp_pix_en && vdp_vsync));
    checking = 0;
    check(seen == 256 * 256, $sformatf("%s: visible pixels %0d", what, seen));
    check(bad == 0, $sformatf("%s: %0d displayed pixels wrong", what, bad));
    host(0, VDP_BASE | adr_t'(VDP_STATUS), 0, q);
    check(q[0] == 1'b0, $sformatf("%s: no display FIFO underrun", what));
  endtask

  data_t       q;
  logic [15:0] vq;
  longint      t0, t_lut, t_vsg, t_ser;
  int          f0, vbad, sbad;
  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    // display on, full window, selector 1 = both buffers, grey output
    wr(VDP_BASE | adr_t'(VDP_X0), 0);
    wr(VDP_BASE | adr_t'(VDP_X1), 255);
    wr(VDP_BASE | adr_t'(VDP_Y0), 0);
    wr(VDP_BASE | adr_t'(VDP_Y1), 255);
    wr(VDP_BASE | adr_t'(VDP_CTRL), 16'h0003);
    for (int a = 0; a < 256; a++) wr(LUT1_BASE | adr_t'(a), 0);

    // 1. whole LUT #2 from the host with the display running
    t0 = $time;
    for (int a = 0; a < 4096; a++) wr(LUT2_BASE | adr_t'(a), data_t'((a % 64) * 4));
    t_lut = ($time - t0) / 10;
    check(t_lut < longint'(FIELD_CLKS), $sformatf("LUT #2 reload in %0d clocks, field is %0d", t_lut, FIELD_CLKS));

    // 2. one full field at 5 MHz into frame buffer #2
    wr(RTD_BASE | adr_t'(RTD_X0), 0);
    wr(RTD_BASE | adr_t'(RTD_X1), 255);
    wr(RTD_BASE | adr_t'(RTD_Y0), 0);
    wr(RTD_BASE | adr_t'(RTD_Y1), 255);
    wr(RTD_BASE | adr_t'(RTD_NFIELD), 1);
    wr(RTD_BASE | adr_t'(RTD_DEST), 1);
    wr(RTD_BASE | adr_t'(RTD_DADR), 0);
    wr(RTD_BASE | adr_t'(RTD_CTRL), 16'h0001);
    acq_field = u_video.field + 1;
    do begin
      repeat (20000) @(posedge clk);
      host(0, RTD_BASE | adr_t'(RTD_STATUS), 0, q);
    end while (!q[1]);
    check(q == 16'h0002, $sformatf("5 MHz acquisition done without overflow (status %h)", q));

    // 3. buffer #2 on the screen, then the inverse table
    mode = 0;
    check_field("buffer #2 through selector 1");
    t0 = $time;
    for (int a = 0; a < 4096; a++) wr(LUT2_BASE | adr_t'(a), data_t'(255 - (a % 64) * 4));
    check(($time - t0) / 10 < longint'(FIELD_CLKS), "second LUT #2 reload inside one field");
    mode = 1;
    check_field("inverse table");

    // 4. a whole symbol-generator page, started during the picture
    wait (!dut.u_vsg.u_tim.vblank);
    f0 = vsg_fields; t0 = $time;
    for (int a = 0; a < 2048; a++) vsg_access(1, 12'(a), 16'(a * 37 + 5), vq);
    t_vsg = ($time - t0) / 10;
    f0 = vsg_fields - f0;
    check(f0 <= 2, $sformatf("page written within %0d field starts", f0));
    vbad = 0;
    for (int a = 0; a < 2048; a++) begin
      vsg_access(0, 12'(a), 0, vq);
      if (vq != 16'(a * 37 + 5)) vbad++;
    end
    check(vbad == 0, $sformatf("%0d page words read back wrong", vbad));
    check(outside_retrace == 0, $sformatf("%0d page accesses outside the retrace", outside_retrace));

    // 5. a picture series: 8 consecutive fields of a 64 x 64 window at
    //    10 MHz into frame buffer #1, 50 fields a second, read back by the host
    wr(RTD_BASE | adr_t'(RTD_X0), 96);
    wr(RTD_BASE | adr_t'(RTD_X1), 159);
    wr(RTD_BASE | adr_t'(RTD_Y0), 96);
    wr(RTD_BASE | adr_t'(RTD_Y1), 159);
    wr(RTD_BASE | adr_t'(RTD_NFIELD), 8);
    wr(RTD_BASE | adr_t'(RTD_DEST), 0);
    wr(RTD_BASE | adr_t'(RTD_DADR), 0);
    wr(RTD_BASE | adr_t'(RTD_CTRL), 16'h0003);
    acq_field = u_video.field + 1;
    t0 = $time;
    do begin
      repeat (20000) @(posedge clk);
      host(0, RTD_BASE | adr_t'(RTD_STATUS), 0, q);
    end while (!q[1]);
    t_ser = ($time - t0) / 10;
    check(q == 16'h0002, $sformatf("series acquisition done without overflow (status %h)", q));
    check(t_ser < longint'(10 * FIELD_CLKS), $sformatf("8 fields taken in %0d clocks", t_ser));
    sbad = 0;
    for (int f = 0; f < 8; f++)
      for (int y = 0; y < 64; y++)
        for (int x = 0; x < 64; x += 2) begin
          logic [15:0] e;
          e = {u_video.pix(acq_field + f, 23 + 96 + y, 96 + x + 1),
               u_video.pix(acq_field + f, 23 + 96 + y, 96 + x)};
          host(0, FB1_BASE | adr_t'(f * 2048 + y * 32 + x / 2), 0, q);
          if (q != e) begin
            sbad++;
            if (sbad < 6) $display("series field %0d (%0d,%0d) = %h expected %h", f, x, y, q, e);
          end
        end
    check(sbad == 0, $sformatf("%0d series words wrong of %0d", sbad, 8 * 2048));

    $display("LUT #2 reload %0d clocks (%0d us); page write %0d clocks over %0d retraces; 8-field series %0d clocks",
             t_lut, t_lut / 60, t_vsg, f0, t_ser);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
