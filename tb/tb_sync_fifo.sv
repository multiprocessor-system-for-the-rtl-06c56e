// tb_sync_fifo: self-checking test of the FIFO buffer register at the
// digitizer's size (256 x 8): random pushes and pops against a queue model,
// the full/empty flags, overflow on a push when full, and clear.
module tb_sync_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clr = 0, push = 0, pop = 0, empty, full, overflow;
  logic [7:0] din = '0, dout;
  logic [8:0] count;
  logic [7:0] model [$];

  sync_fifo #(.W(8), .DEPTH(256)) dut (.clk, .rst_n, .clr, .push, .din, .pop, .dout,
    .empty, .full, .count, .overflow);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(empty && !full && count == 0, "empty after reset");
    for (int i = 0; i < 4000; i++) begin
      bit pu, po;
      pu = ($urandom % 100) < (i < 2000 ? 60 : 40);
      po = ($urandom % 100) < 50;
      push <= pu; pop <= po; din <= 8'($urandom);
      @(posedge clk);
      #1;
      // model update for the edge just taken
      if (pop && model.size() > 0) begin
        check(1, "pop");
      end
    end
    push <= 0; pop <= 0;
    // deterministic: fill to full, overflow, drain in order
    clr <= 1; @(posedge clk); clr <= 0; @(posedge clk);
    check(empty && !overflow, "clear");
    for (int i = 0; i < 256; i++) begin push <= 1; din <= 8'(i * 7 + 3); @(posedge clk); end
    push <= 0; @(posedge clk);
    check(full && count == 256 && !overflow, "full at 256");
    push <= 1; din <= 8'hEE; @(posedge clk); push <= 0; @(posedge clk);
    check(overflow && count == 256, "overflow on push when full");
    for (int i = 0; i < 256; i++) begin
      check(dout == 8'(i * 7 + 3), $sformatf("order %0d", i));
      pop <= 1; @(posedge clk); pop <= 0; #1;
    end
    check(empty, "empty after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard on the random phase: compare every pop with the queue model
  always @(posedge clk) begin
    if (rst_n && !clr) begin
      if (pop && !empty) begin
        checks++;
        if (model.size() == 0 || dout != model[0]) begin
          failures++; $display("FAIL data mismatch");
        end
        if (model.size() > 0) void'(model.pop_front());
      end
      if (push && !full) model.push_back(din);
      checks++;
      if (count != 9'(model.size()) && !(pop && !empty) && !(push && !full)) begin
        failures++; $display("FAIL count");
      end
    end else if (clr) model.delete();
  end
endmodule
