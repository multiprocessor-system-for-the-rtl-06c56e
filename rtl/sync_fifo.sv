// sync_fifo: FIFO buffer register, as used between the pipeline stages of
// the digitizer (256 x 8) and the display processor (128 x 16).
//
// One clock, first-word-fall-through: dout shows the oldest entry whenever
// empty is low; pop removes it. A push while full is dropped and sets the
// sticky overflow flag, cleared by clr (which also empties the FIFO).
module sync_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full,
  output logic [$clog2(DEPTH):0] count,
  output logic         overflow
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == DEPTH);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      wp <= '0; rp <= '0; count <= '0; overflow <= 1'b0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
      count <= count + {{AW{1'b0}}, do_push} - {{AW{1'b0}}, do_pop};
      if (push && full) overflow <= 1'b1;
    end
  end

endmodule
