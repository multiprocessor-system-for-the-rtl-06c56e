// tb_video_timing: self-checking test of the raster generator at its default
// (display) timing: pixel enable period, line length in clocks (64 us at
// 60 MHz = 3840), field length (312 lines = 1 198 080 clocks), visible area
// 256 x 256, one hsync per line and one vsync per field.
module tb_video_timing;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic pix_en, active, hsync, vsync, vblank;
  logic [9:0] hcount, vcount;

  video_timing dut (.clk, .rst_n, .pix_en, .hcount, .vcount, .active, .hsync, .vsync, .vblank);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int clk_n = 0, pe = 0, act = 0, hs = 0, vs = 0, last_pe = -1, last_hs = -1, last_vs = -1;
  int vb_lines = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // skip to the first vsync, then measure two fields
    do @(posedge clk); while (!vsync);
    last_vs = 0;
    while (vs < 2) begin
      @(posedge clk);
      clk_n++;
      if (pix_en) begin
        if (last_pe >= 0 && clk_n - last_pe != 12) check(0, "pixel period");
        last_pe = clk_n; pe++;
        if (active) act++;
        if (active != (hcount < 256 && vcount < 256)) check(0, "active area");
        if (vblank != (vcount >= 256)) check(0, "vblank");
      end
      if (hsync) begin
        if (last_hs >= 0) check(clk_n - last_hs == 3840, "line length 3840 clocks");
        last_hs = clk_n; hs++;
      end
      if (vsync) begin
        check(clk_n - last_vs == 312 * 3840, $sformatf("field length %0d", clk_n - last_vs));
        last_vs = clk_n; vs++;
      end
    end
    check(pe == 2 * 312 * 320, "pixels per two fields");
    check(act == 2 * 256 * 256, "visible pixels per two fields");
    check(hs == 2 * 312, "hsync per line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
