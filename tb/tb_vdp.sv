// tb_vdp: self-checking test of the video display processor on a small bus
// with two frame buffers and the host port.
//
// The host fills a 32 x 8 pixel window of both frame buffers, loads both
// look-up tables, sets the window and the cursor and switches the display on.
// The test rebuilds the raster position from the output syncs and blanking
// and compares every visible pixel of a whole field with the expected colour:
// black outside the window, the cursor cross-hair in white, and inside the
// window the table cascade applied to the two buffers. Two settings are
// checked: the dyadic path (select1 = 1) with grey output, and the monadic
// path with table page 3 and colour output (select2 = 1). Also checked: no
// FIFO underrun, the light-pen message and cursor-follows-pen.
module tb_vdp;
  import dvs_pkg::*;

  localparam int unsigned H_TOTAL = 280, V_TOTAL = 264;
  localparam int WX0 = 16, WX1 = 47, WY0 = 20, WY1 = 27, CX = 30, CY = 22;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  logic      [1:0] br, bu, bg_in, bg_out, p_in, p_out;
  logic            bb;
  bus_req_t  [1:0] mreq;
  bus_resp_t [2:0] sresp;
  bus_req_t        bus_mreq;
  bus_resp_t       bus_sresp;
  logic [7:0] red, green, blue;
  logic hsync, vsync, blank, pix_en, pen = 0, lp_irq;

  rta_backplane #(.NM(2), .NS(3)) u_bus (.clk, .rst_n, .br, .bu, .bg_out, .p_out, .bg_in, .p_in,
    .bb, .mreq, .sresp, .bus_mreq, .bus_sresp);
  frame_buffer #(.WORDS(32768), .BASE(FB1_BASE)) u_fb1 (.clk, .rst_n, .bus_mreq, .sresp(sresp[0]));
  frame_buffer #(.WORDS(32768), .BASE(FB2_BASE)) u_fb2 (.clk, .rst_n, .bus_mreq, .sresp(sresp[1]));

  logic  h_req = 0, h_we = 0, h_ack;
  adr_t  h_adr = '0;
  data_t h_wd = '0, h_rd;
  comm_processor u_comm (.clk, .rst_n, .host_req(h_req), .host_we(h_we), .host_adr(h_adr),
    .host_wdata(h_wd), .host_ack(h_ack), .host_rdata(h_rd),
    .bg_in(bg_in[0]), .bg_out(bg_out[0]), .p_in(p_in[0]), .p_out(p_out[0]), .bb,
    .br(br[0]), .bu(bu[0]), .mreq(mreq[0]), .bus_sresp);

  vdp #(.FIFO_DEPTH(128), .H_TOTAL(H_TOTAL), .V_TOTAL(V_TOTAL)) dut (
    .clk, .rst_n, .bg_in(bg_in[1]), .bg_out(bg_out[1]), .p_in(p_in[1]), .p_out(p_out[1]), .bb,
    .br(br[1]), .bu(bu[1]), .mreq(mreq[1]), .bus_sresp, .bus_mreq, .sresp(sresp[2]),
    .red, .green, .blue, .hsync, .vsync, .blank, .pix_en, .pen, .lp_irq);

  task automatic host(input bit w, input adr_t ad, input data_t dat, output data_t q);
    @(posedge clk); h_req <= 1; h_we <= w; h_adr <= ad; h_wd <= dat;
    do @(posedge clk); while (!h_ack);
    q = h_rd; h_req <= 0; @(posedge clk);
  endtask
  task automatic wr(input adr_t ad, input data_t dat);
    data_t q; host(1, ad, dat, q);
  endtask

  function automatic logic [7:0] p1(input int x, y); return 8'(x * 3 + y * 17); endfunction
  function automatic logic [7:0] p2(input int x, y); return 8'(x * 11 ^ y * 5); endfunction
  function automatic logic [7:0] f1(input logic [7:0] v); return v ^ 8'h5A; endfunction
  function automatic logic [8:0] f2(input logic [11:0] a); return 9'((a * 37 + 11) % 512); endfunction
  function automatic logic [7:0] widen(input logic [2:0] c); return {c, c, c[2:1]}; endfunction

  // expected colour of visible pixel (x, y)
  bit s1, s2;
  logic [3:0] pg;
  function automatic logic [23:0] expect_rgb(input int x, y);
    logic [11:0] a;
    logic [8:0]  v;
    if (x == CX || y == CY) return 24'hFFFFFF;
    if (x < WX0 || x > WX1 || y < WY0 || y > WY1) return 24'h0;
    a = s1 ? {f1(p1(x, y))[7:2], p2(x, y)[7:2]} : {pg, f1(p1(x, y))};
    v = f2(a);
    if (!s2) return {v[7:0], v[7:0], v[7:0]};
    return {widen(v[8:6]), widen(v[5:3]), widen(v[2:0])};
  endfunction

  // raster position rebuilt from the outputs
  int ox = 0, oy = -1, seen = 0, bad = 0;
  bit was_blank = 1, in_field = 0, checking = 0;
  always @(posedge clk) if (pix_en) begin
    #1;
    if (vsync) begin oy = -1; in_field = 1; end
    if (!blank) begin
      if (was_blank) begin oy++; ox = 0; end
      if (checking && in_field) begin
        seen++;
        if ({red, green, blue} != expect_rgb(ox, oy)) begin
          bad++;
          if (bad < 10) $display("pixel (%0d,%0d) = %h expected %h", ox, oy, {red, green, blue}, expect_rgb(ox, oy));
        end
      end
      ox++;
    end
    was_blank = blank;
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_field(input string name);
    // from one output vsync to the next, every visible pixel is compared
    @(posedge vsync); @(negedge pix_en);
    seen = 0; bad = 0; checking = 1;
    @(posedge vsync); @(negedge pix_en);
    checking = 0;
    check(seen == 256 * 256, $sformatf("%s: visible pixels %0d", name, seen));
    check(bad == 0, $sformatf("%s: %0d wrong pixels", name, bad));
  endtask

  data_t q;
  int px, py;
  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    for (int y = WY0; y <= WY1; y++)
      for (int x = WX0; x <= WX1; x += 2) begin
        wr(FB1_BASE | adr_t'(y * 128 + x / 2), {p1(x + 1, y), p1(x, y)});
        wr(FB2_BASE | adr_t'(y * 128 + x / 2), {p2(x + 1, y), p2(x, y)});
      end
    for (int a = 0; a < 256; a++)  wr(LUT1_BASE | adr_t'(a), data_t'(f1(8'(a))));
    for (int a = 0; a < 4096; a++) wr(LUT2_BASE | adr_t'(a), data_t'(f2(12'(a))));
    wr(VDP_BASE | adr_t'(VDP_X0), WX0);
    wr(VDP_BASE | adr_t'(VDP_X1), WX1);
    wr(VDP_BASE | adr_t'(VDP_Y0), WY0);
    wr(VDP_BASE | adr_t'(VDP_Y1), WY1);
    wr(VDP_BASE | adr_t'(VDP_CX), CX);
    wr(VDP_BASE | adr_t'(VDP_CY), CY);
    s1 = 1; s2 = 0; pg = 0;
    wr(VDP_BASE | adr_t'(VDP_CTRL), 16'h000B);          // on, select1, cursor
    @(posedge dut.u_tim.vsync);                         // fetch restarts here
    host(0, VDP_BASE | adr_t'(VDP_STATUS), 0, q);       // clear underrun of the start-up field
    one_field("dyadic grey");
    host(0, VDP_BASE | adr_t'(VDP_STATUS), 0, q);
    check(q[0] == 1'b0, "no FIFO underrun");
    s1 = 0; s2 = 1; pg = 3;
    @(posedge vsync);                                    // change settings inside the retrace
    wr(VDP_BASE | adr_t'(VDP_CTRL), 16'h030D);          // on, select2, cursor, page 3
    one_field("monadic colour page 3");

    // light pen: pulse while the output shows pixel (100, 40); cursor follows
    wr(VDP_BASE | adr_t'(VDP_CTRL), 16'h031D);
    @(posedge vsync);
    wait (oy == 40 && ox == 100);
    pen <= 1; repeat (3) @(posedge clk); pen <= 0;
    repeat (30) @(posedge clk);
    check(lp_irq, "light-pen message raised");
    host(0, VDP_BASE | adr_t'(VDP_LPX), 0, q); px = int'(q[9:0]);
    check(q[15], "light-pen hit flag");
    host(0, VDP_BASE | adr_t'(VDP_LPY), 0, q); py = int'(q[9:0]);
    check(py == 40 && px >= 99 && px <= 102, $sformatf("light-pen position (%0d,%0d)", px, py));
    host(0, VDP_BASE | adr_t'(VDP_CX), 0, q);
    check(int'(q[9:0]) == px, "cursor follows the pen (x)");
    host(0, VDP_BASE | adr_t'(VDP_CY), 0, q);
    check(int'(q[9:0]) == py, "cursor follows the pen (y)");
    repeat (5) @(posedge clk);
    check(!lp_irq, "light-pen message cleared by its read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
