// tb_ppu: self-checking test of the programmable processing unit.
//
// Tables are loaded with independent reference functions: LUT #1 with a
// logarithm-like curve, LUT #2 with a function of its 12-bit address. For
// random pixel pairs the test compares red, green and blue, pixel by pixel
// (valid after the third pixel-slot edge) with the expected value for each of the four selector settings:
// grey through page 0 and page 5, colour fields, and the dyadic path that
// combines buffer 1 and buffer 2 (here a subtraction table).
module tb_ppu;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        pix_en = 0, select1 = 0, select2 = 0;
  logic [3:0]  page = 0;
  logic [7:0]  fb1 = 0, fb2 = 0;
  logic        lut1_we = 0, lut2_we = 0;
  logic [7:0]  lut1_wadr = 0, lut1_wdata = 0;
  logic [11:0] lut2_wadr = 0;
  logic [8:0]  lut2_wdata = 0;
  logic [7:0]  red, green, blue;

  ppu dut (.clk, .rst_n, .pix_en, .fb1, .fb2, .select1, .select2, .page,
    .lut1_we, .lut1_wadr, .lut1_wdata, .lut2_we, .lut2_wadr, .lut2_wdata, .red, .green, .blue);

  function automatic logic [7:0] f1(input logic [7:0] x);
    // square-root shaped curve (enhances low levels), integer form
    int r = 0;
    while ((r + 1) * (r + 1) <= int'(x) * 256) r++;
    return 8'(r > 255 ? 255 : r);
  endfunction
  function automatic logic [8:0] f2(input logic [11:0] a);
    return 9'((a * 37 + (a >> 3)) % 512);
  endfunction
  function automatic logic [8:0] fsub(input logic [11:0] a);
    int d = int'(a[11:6]) - int'(a[5:0]);
    return 9'(d < 0 ? 0 : d * 4);
  endfunction
  function automatic logic [7:0] widen(input logic [2:0] c);
    return {c, c, c[2:1]};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load2(input int mode);
    for (int a = 0; a < 4096; a++) begin
      lut2_we <= 1; lut2_wadr <= 12'(a); lut2_wdata <= (mode == 0) ? f2(12'(a)) : fsub(12'(a));
      @(posedge clk);
    end
    lut2_we <= 0;
  endtask

  task automatic run(input int n, input bit s1, input bit s2, input logic [3:0] pg, input int mode);
    logic [7:0] p1 [$], p2 [$];
    select1 <= s1; select2 <= s2; page <= pg;
    for (int i = 0; i < n + 3; i++) begin
      logic [7:0] a = 8'($urandom), b = 8'($urandom);
      fb1 <= a; fb2 <= b; pix_en <= 1;
      @(posedge clk);
      pix_en <= 0;
      p1.push_back(a); p2.push_back(b);
      repeat (3) @(posedge clk);
      #1;
      if (i >= 2) begin
        logic [7:0] x1 = p1[i-2], x2 = p2[i-2];
        logic [11:0] ad = s1 ? {f1(x1)[7:2], x2[7:2]} : {pg, f1(x1)};
        logic [8:0] v = (mode == 0) ? f2(ad) : fsub(ad);
        if (!s2) check(red == v[7:0] && green == v[7:0] && blue == v[7:0], $sformatf("grey s1=%0d", s1));
        else     check(red == widen(v[8:6]) && green == widen(v[5:3]) && blue == widen(v[2:0]), "colour");
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int a = 0; a < 256; a++) begin
      lut1_we <= 1; lut1_wadr <= 8'(a); lut1_wdata <= f1(8'(a)); @(posedge clk);
    end
    lut1_we <= 0;
    load2(0);
    run(200, 0, 0, 4'd0, 0);
    run(200, 0, 0, 4'd5, 0);
    run(200, 0, 1, 4'd0, 0);
    run(200, 1, 0, 4'd0, 0);
    run(200, 1, 1, 4'd0, 0);
    load2(1);
    run(200, 1, 0, 4'd0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
