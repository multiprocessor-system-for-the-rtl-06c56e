// tb_rtd: self-checking test of the real-time digitizer on a small bus with
// two frame buffers and the host port.
//
// The converter model supplies a reduced raster (400-clock lines, 16-line
// fields). The host programs two acquisitions through the communication
// processor: (1) 10 MHz sampling, window x 10..41, y 3..10, three fields with
// one field skipped between them, into frame buffer #2; (2) 5 MHz sampling,
// an odd-sized window 5..9 x 0..2, one field, into frame buffer #1 at an
// offset. Checked: the convert strobe period (6 and 12 clocks), busy and
// done, the status register, and every stored byte against the model's hash
// for the fields that should have been taken.
module tb_rtd;
  import dvs_pkg::*;

  localparam int unsigned LINE_CLKS = 400, LINES = 16, V_START = 2, H_START = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  logic      [1:0] br, bu, bg_in, bg_out, p_in, p_out;
  logic            bb;
  bus_req_t  [1:0] mreq;
  bus_resp_t [2:0] sresp;
  bus_req_t        bus_mreq;
  bus_resp_t       bus_sresp;
  logic hsync, vsync, convert, busy, done, overflow;
  logic [7:0] adc;

  rta_backplane #(.NM(2), .NS(3)) u_bus (.clk, .rst_n, .br, .bu, .bg_out, .p_out, .bg_in, .p_in,
    .bb, .mreq, .sresp, .bus_mreq, .bus_sresp);
  frame_buffer #(.WORDS(4096), .BASE(FB1_BASE)) u_fb1 (.clk, .rst_n, .bus_mreq, .sresp(sresp[0]));
  frame_buffer #(.WORDS(4096), .BASE(FB2_BASE)) u_fb2 (.clk, .rst_n, .bus_mreq, .sresp(sresp[1]));

  adc_model #(.LINE_CLKS(LINE_CLKS), .LINES(LINES), .LAT(4)) u_adc (
    .clk, .rst_n, .hsync, .vsync, .convert, .data(adc));

  rtd #(.FIFO_DEPTH(256), .H_START(H_START), .V_START(V_START)) dut (
    .clk, .rst_n, .hsync, .vsync, .adc_convert(convert), .adc_data(adc),
    .bg_in(bg_in[0]), .bg_out(bg_out[0]), .p_in(p_in[0]), .p_out(p_out[0]), .bb,
    .br(br[0]), .bu(bu[0]), .mreq(mreq[0]), .bus_sresp, .bus_mreq, .sresp(sresp[2]),
    .busy, .done, .overflow);

  logic  h_req = 0, h_we = 0, h_ack;
  adr_t  h_adr = '0;
  data_t h_wd = '0, h_rd;
  comm_processor u_comm (.clk, .rst_n, .host_req(h_req), .host_we(h_we), .host_adr(h_adr),
    .host_wdata(h_wd), .host_ack(h_ack), .host_rdata(h_rd),
    .bg_in(bg_in[1]), .bg_out(bg_out[1]), .p_in(p_in[1]), .p_out(p_out[1]), .bb,
    .br(br[1]), .bu(bu[1]), .mreq(mreq[1]), .bus_sresp);

  task automatic host(input bit w, input adr_t ad, input data_t dat, output data_t q);
    @(posedge clk); h_req <= 1; h_we <= w; h_adr <= ad; h_wd <= dat;
    do @(posedge clk); while (!h_ack);
    q = h_rd; h_req <= 0; @(posedge clk);
  endtask
  task automatic wr(input adr_t ad, input data_t dat);
    data_t q; host(1, ad, dat, q);
  endtask

  // convert strobe period
  int last_conv = -1, per_min = 1000, per_max = 0;
  always @(posedge clk) if (hsync) last_conv = -1; else if (convert) begin
    if (last_conv >= 0) begin
      if (cyc - last_conv < per_min) per_min = cyc - last_conv;
      if (cyc - last_conv > per_max) per_max = cyc - last_conv;
    end
    last_conv = cyc;
  end

  // field number at which each acquisition was armed, from the model
  int start_field;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic acquire(input bit r10, input int skip, input int x0, x1, y0, y1, nf,
                         input bit dest, input int dadr);
    data_t q;
    wr(RTD_BASE | adr_t'(RTD_X0), data_t'(x0));
    wr(RTD_BASE | adr_t'(RTD_X1), data_t'(x1));
    wr(RTD_BASE | adr_t'(RTD_Y0), data_t'(y0));
    wr(RTD_BASE | adr_t'(RTD_Y1), data_t'(y1));
    wr(RTD_BASE | adr_t'(RTD_NFIELD), data_t'(nf));
    wr(RTD_BASE | adr_t'(RTD_DEST), data_t'(dest));
    wr(RTD_BASE | adr_t'(RTD_DADR), data_t'(dadr));
    wr(RTD_BASE | adr_t'(RTD_CTRL), data_t'({skip[3:0], 2'b00, r10, 1'b1}));
    fork begin @(posedge hsync); per_min = 1000; per_max = 0; end join_none
    start_field = u_adc.field + 1;   // armed: the next field sync starts the first field
    @(posedge clk);
    check(busy, "busy after start");
    host(0, RTD_BASE | adr_t'(RTD_STATUS), 0, q);
    check(q[0] && !q[1], "status busy");
    while (!done) @(posedge clk);
    check(!busy, "not busy when done");
    check(per_min == (r10 ? 6 : 12) && per_max == (r10 ? 6 : 12),
          $sformatf("sample period %0d..%0d", per_min, per_max));
    host(0, RTD_BASE | adr_t'(RTD_STATUS), 0, q);
    check(q[1] && !q[0] && !q[2], "status done, no overflow");
  endtask

  task automatic verify(input int skip, input int x0, x1, y0, y1, nf, input bit dest, input int dadr);
    int k = 0;
    logic [7:0] bytes [$];
    data_t q;
    for (int f = 0; f < nf; f++)
      for (int y = y0; y <= y1; y++)
        for (int x = x0; x <= x1; x++)
          bytes.push_back(u_adc.pix(start_field + f * (skip + 1), V_START + y, x));
    if (bytes.size() % 2) bytes.push_back(8'h00);
    for (int w = 0; w < bytes.size() / 2; w++) begin
      host(0, (dest ? FB2_BASE : FB1_BASE) | adr_t'(dadr + w), 0, q);
      check(q == {bytes[2*w+1], bytes[2*w]}, $sformatf("word %0d: %h expected %h", w, q, {bytes[2*w+1], bytes[2*w]}));
    end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    acquire(1, 1, 10, 41, 3, 10, 3, 1, 16);
    verify(1, 10, 41, 3, 10, 3, 1, 16);
    acquire(0, 0, 5, 9, 0, 2, 1, 0, 100);
    verify(0, 5, 9, 0, 2, 1, 0, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
