// rtd_bus_interface: bus interface unit of the real-time digitizer.
//
// It takes bytes from the FIFO, packs two into a 16-bit word (first byte in
// the low half) and hands the words to the active transfer unit as write
// demands to consecutive addresses of the destination frame buffer. While a
// word waits for its acknowledge the next one is assembled, so with a backlog
// in the FIFO the demand never drops and the bus is held for a block. load
// sets the start address; flush writes a half-filled word (high byte zero) at
// the end of an acquisition. idle is high when nothing is pending.
module rtd_bus_interface
  import dvs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic        dest_sel,   // 0: frame buffer #1, 1: frame buffer #2
  input  logic [14:0] start_adr,
  input  logic        flush,
  // FIFO
  input  logic        fifo_empty,
  input  logic [7:0]  fifo_dout,
  output logic        fifo_pop,
  // active transfer unit
  output logic        d,
  output adr_t        adr,
  output data_t       wdata,
  input  logic        a,
  output logic        idle
);
  logic        have_lo, have_word;
  logic [7:0]  lo;
  logic [14:0] next_off, cur_off;
  logic        sel_q;
  logic        take_word;

  // a fresh word goes to the pending slot when the slot is empty or frees now
  assign take_word = have_lo && (!fifo_empty || flush) && (!have_word || a);
  assign fifo_pop  = !fifo_empty && (!have_lo || take_word);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      have_lo <= 1'b0; have_word <= 1'b0; lo <= '0; wdata <= '0;
      next_off <= '0; cur_off <= '0; sel_q <= 1'b0;
    end else if (load) begin
      have_lo <= 1'b0; have_word <= 1'b0;
      next_off <= start_adr; sel_q <= dest_sel;
    end else begin
      if (a && !take_word) have_word <= 1'b0;
      if (take_word) begin
        have_word <= 1'b1;
        wdata     <= {(fifo_empty ? 8'h00 : fifo_dout), lo};
        cur_off   <= next_off;
        next_off  <= next_off + 1'b1;
      end
      if (fifo_pop) begin
        if (!have_lo)       begin lo <= fifo_dout; have_lo <= 1'b1; end
        else if (take_word) have_lo <= 1'b0;
      end else if (take_word) begin
        have_lo <= 1'b0;            // flushed a lone byte
      end
    end
  end

  assign d    = have_word;
  assign adr  = (sel_q ? FB2_BASE : FB1_BASE) | adr_t'(cur_off);
  assign idle = !have_word && !have_lo;
endmodule
