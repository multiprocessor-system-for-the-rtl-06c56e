// tb_vsg: self-checking test of the video symbol generator at its default
// timing (10 MHz pixels, 64 us lines, 312-line fields, 24 retrace lines).
//
// The host loads the character generator with a generated pattern and the
// whole 64 x 32 page with random characters and attributes. Checked: host
// accesses made during the picture wait for the vertical retrace and all
// complete inside it, read-back of the page, the retrace length (about
// 1.5 ms), and every visible pixel of two whole fields, one with blinking
// cells shown and one with them blanked to their background.
module tb_vsg;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic        req = 0, we = 0, ack;
  logic [11:0] adr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [7:0]  red, green, blue;
  logic        hsync, vsync, blank, pix_en;

  vsg dut (.clk, .rst_n, .req, .we, .adr, .wdata, .ack, .rdata,
    .red, .green, .blue, .hsync, .vsync, .blank, .pix_en);

  logic [15:0] page [2048];
  function automatic logic [7:0] cg(input int code, row);
    return 8'((code * 29 + row * 7) ^ 8'h33 ^ (code >> 3));
  endfunction

  // retrace = lines 288..311 of the raster; measured from the outputs
  int nv = 0;
  always @(posedge clk) if (pix_en && vsync) nv++;

  int acks_outside = 0;
  always @(posedge clk) if (ack && !dut.u_tim.vblank) acks_outside++;

  task automatic access(input bit w, input logic [11:0] a, input logic [15:0] d, output logic [15:0] q);
    @(posedge clk); req <= 1; we <= w; adr <= a; wdata <= d;
    do @(posedge clk); while (!ack);
    q = rdata; req <= 0; @(posedge clk);
  endtask

  function automatic logic [23:0] expect_rgb(input int x, y, input int field);
    logic [15:0] w;
    logic [7:0]  bits, lv;
    logic        dot, fg;
    logic [2:0]  c;
    if (y >= 256) return 24'h0;
    w    = page[(y / 8) * 64 + x / 8];
    bits = cg(int'(w[7:0]), y % 8);
    dot  = bits[7 - (x % 8)];
    fg   = dot && !(w[15] && ((field >> 4) & 1));
    c    = fg ? w[10:8] : w[13:11];
    lv   = w[14] ? 8'hFF : 8'hAA;
    return {c[2] ? lv : 8'h00, c[1] ? lv : 8'h00, c[0] ? lv : 8'h00};
  endfunction

  int ox = 0, oy = -1, seen = 0, bad = 0, fld = 0;
  bit was_blank = 1, checking = 0;
  always @(posedge clk) if (pix_en) begin
    #1;
    if (vsync) oy = -1;
    if (!blank) begin
      if (was_blank) begin oy++; ox = 0; end
      if (checking) begin
        seen++;
        if ({red, green, blue} != expect_rgb(ox, oy, fld)) begin
          bad++;
          if (bad < 6) $display("pixel (%0d,%0d) = %h expected %h", ox, oy, {red, green, blue}, expect_rgb(ox, oy, fld));
        end
      end
      ox++;
    end
    was_blank = blank;
  end

  task automatic one_field(input string name);
    @(posedge clk iff (pix_en && vsync));
    fld = nv + 1; seen = 0; bad = 0; checking = 1;
    @(posedge clk iff (pix_en && vsync));
    checking = 0;
    check(seen == 512 * 288, $sformatf("%s: visible pixels %0d", name, seen));
    check(bad == 0, $sformatf("%s: %0d wrong pixels", name, bad));
  endtask

  initial begin
    #2000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] q;
  int t0, t1, rb_cycles;
  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (10) @(posedge clk);
    // a request made in the picture waits for the retrace
    check(!dut.u_tim.vblank, "starts in the picture");
    for (int i = 0; i < 2048; i++) page[i] = 16'($urandom);
    for (int c = 0; c < 256; c++)
      for (int r = 0; r < 8; r++) access(1, 12'h800 | 12'(c * 8 + r), {8'h00, cg(c, r)}, q);
    for (int i = 0; i < 2048; i++) access(1, 12'(i), page[i], q);
    for (int i = 0; i < 2048; i += 97) begin
      access(0, 12'(i), 16'h0, q);
      check(q == page[i], $sformatf("page read-back %0d", i));
    end
    check(acks_outside == 0, $sformatf("%0d accesses outside the retrace", acks_outside));
    // retrace length in clocks: 24 lines x 3840 = 92160 (1.536 ms at 60 MHz)
    @(posedge dut.u_tim.vblank); t0 = $time;
    t1 = 0;
    while (dut.u_tim.vblank) begin @(posedge clk); t1++; end
    check(t1 >= 24 * 3840 && t1 <= 24 * 3840 + 1, $sformatf("retrace %0d clocks", t1));
    one_field("blink phase visible");
    // run on to a field whose blink phase hides blinking cells
    while (((nv + 1) >> 4 & 1) == 0) @(posedge clk);
    one_field("blink phase hidden");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
