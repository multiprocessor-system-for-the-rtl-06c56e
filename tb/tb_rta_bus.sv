// tb_rta_bus: self-checking test of the RTA bus: bus controller, bus request
// units, active and passive transfer units, communication blocks, the
// backplane, the communication processor and two (small) frame buffers.
//
// Three masters in priority order: a block writer (index 0), the host port
// (index 1) and a block reader/writer (index 2). Checked: host word writes and
// reads, block writes at one word per four clocks in one bus tenure, word
// mode for the host (bus released after each word), priority order on
// simultaneous requests, pre-emption of a running block by a higher-priority
// master within one bus cycle and its automatic resumption, and all data.
module tb_rta_bus;
  import dvs_pkg::*;

  localparam int unsigned NM = 3, NS = 2, WORDS = 1024;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  logic      [NM-1:0] br, bu, bg_in, bg_out, p_in, p_out;
  logic                bb;
  bus_req_t  [NM-1:0] mreq;
  bus_resp_t [NS-1:0] sresp;
  bus_req_t            bus_mreq;
  bus_resp_t           bus_sresp;

  rta_backplane #(.NM(NM), .NS(NS)) u_bus (
    .clk, .rst_n, .br, .bu, .bg_out, .p_out, .bg_in, .p_in, .bb,
    .mreq, .sresp, .bus_mreq, .bus_sresp);

  frame_buffer #(.WORDS(WORDS), .BASE(FB1_BASE)) u_fb1 (.clk, .rst_n, .bus_mreq, .sresp(sresp[0]));
  frame_buffer #(.WORDS(WORDS), .BASE(FB2_BASE)) u_fb2 (.clk, .rst_n, .bus_mreq, .sresp(sresp[1]));

  // masters 0 and 2: communication blocks driven by the test
  logic  d   [3];
  logic  we  [3];
  adr_t  adr [3];
  data_t wd  [3];
  logic  a   [3];
  data_t rd  [3];

  for (genvar m = 0; m < 3; m += 2) begin : g_m
    rta_comm_block #(.HAS_MASTER(1'b1), .HAS_SLAVE(1'b0)) u_cb (
      .clk, .rst_n, .bg_in(bg_in[m]), .bg_out(bg_out[m]), .p_in(p_in[m]), .p_out(p_out[m]),
      .bb, .br(br[m]), .bu(bu[m]), .mreq(mreq[m]), .bus_sresp, .bus_mreq('0), .sresp(),
      .do_d(d[m]), .do_we(we[m]), .do_adr(adr[m]), .do_wdata(wd[m]), .do_a(a[m]), .do_rdata(rd[m]),
      .di_d(), .di_we(), .di_adr(), .di_wdata(), .di_a(1'b0), .di_rdata('0));
  end

  // master 1: communication processor with a host port
  logic  h_req = 0, h_we = 0, h_ack;
  adr_t  h_adr = '0;
  data_t h_wd = '0, h_rd;
  comm_processor u_comm (
    .clk, .rst_n, .host_req(h_req), .host_we(h_we), .host_adr(h_adr), .host_wdata(h_wd),
    .host_ack(h_ack), .host_rdata(h_rd),
    .bg_in(bg_in[1]), .bg_out(bg_out[1]), .p_in(p_in[1]), .p_out(p_out[1]), .bb,
    .br(br[1]), .bu(bu[1]), .mreq(mreq[1]), .bus_sresp);

  task automatic host(input bit w, input adr_t ad, input data_t dat, output data_t q);
    @(posedge clk); h_req <= 1; h_we <= w; h_adr <= ad; h_wd <= dat;
    do @(posedge clk); while (!h_ack);
    q = h_rd;
    h_req <= 0;
    @(posedge clk);
  endtask

  // block transfer by master m: n words from base, data = seed + i
  int ack_cyc [3][$];
  task automatic block(input int m, input bit w, input adr_t base, input int n, input data_t seed);
    for (int i = 0; i < n; i++) begin
      d[m] <= 1; we[m] <= w; adr[m] <= base + adr_t'(i); wd[m] <= seed + data_t'(i);
      do @(posedge clk); while (!a[m]);
      ack_cyc[m].push_back(cyc);
    end
    d[m] <= 0;
  endtask

  // counts of mechanisms
  int tenures [3], words_in_tenure [3], block_tenures = 0, word_tenures = 0, preempts = 0;
  logic [NM-1:0] bu_q = '0;
  int cur_words [3];
  always @(posedge clk) begin
    bu_q <= bu;
    for (int m = 0; m < 3; m++) begin
      if (bu[m] && !bu_q[m]) begin tenures[m]++; cur_words[m] = 0; end
      if (a[m] || (m == 1 && u_comm.a)) cur_words[m]++;
      if (!bu[m] && bu_q[m]) begin
        if (cur_words[m] > 1) block_tenures++; else word_tenures++;
        if (d[m]) preempts++;   // gave the bus back with work left
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  data_t q;
  int t0, t_req, t_rel;
  initial begin
    for (int m = 0; m < 3; m++) begin d[m] = 0; we[m] = 0; adr[m] = '0; wd[m] = '0; end
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);

    // 1. host word write / read, both buffers
    host(1, FB1_BASE | 17'd5, 16'hBEEF, q);
    host(1, FB2_BASE | 17'd5, 16'h1234, q);
    host(0, FB1_BASE | 17'd5, 16'h0, q);  check(q == 16'hBEEF, "host read FB1");
    host(0, FB2_BASE | 17'd5, 16'h0, q);  check(q == 16'h1234, "host read FB2");
    check(tenures[1] == 4, "host takes the bus once per word");

    // 2. block write by master 2, 32 words, in one tenure at 4 clocks/word
    ack_cyc[2].delete();
    t0 = tenures[2];
    block(2, 1, FB2_BASE | 17'd100, 32, 16'h5000);
    repeat (8) @(posedge clk);
    check(tenures[2] == t0 + 1, "32-word block in one tenure");
    for (int i = 1; i < 32; i++)
      check(ack_cyc[2][i] - ack_cyc[2][i-1] == 4, $sformatf("block word period %0d", ack_cyc[2][i] - ack_cyc[2][i-1]));
    for (int i = 0; i < 32; i += 7) begin
      host(0, FB2_BASE | adr_t'(100 + i), 16'h0, q);
      check(q == 16'h5000 + data_t'(i), "block data");
    end

    // 3. pre-emption: master 2 runs 64 words, master 0 breaks in with 8
    fork
      block(2, 1, FB1_BASE | 17'd200, 64, 16'h7000);
      begin
        repeat (60) @(posedge clk);
        t_req = cyc;
        d[0] <= 1; we[0] <= 1; adr[0] <= FB2_BASE | 17'd300; wd[0] <= 16'hA000;
        @(posedge clk);
        while (bu[2]) @(posedge clk);
        t_rel = cyc;
        check(t_rel - t_req <= 5, $sformatf("pre-empted within one bus cycle (%0d clocks)", t_rel - t_req));
        do @(posedge clk); while (!a[0]);
        for (int i = 1; i < 8; i++) begin
          adr[0] <= FB2_BASE | adr_t'(300 + i); wd[0] <= 16'hA000 + data_t'(i);
          do @(posedge clk); while (!a[0]);
        end
        d[0] <= 0;
      end
    join
    check(preempts >= 1, "pre-emption happened");
    for (int i = 0; i < 64; i++) begin
      host(0, FB1_BASE | adr_t'(200 + i), 16'h0, q);
      check(q == 16'h7000 + data_t'(i), $sformatf("resumed block data %0d", i));
    end
    for (int i = 0; i < 8; i++) begin
      host(0, FB2_BASE | adr_t'(300 + i), 16'h0, q);
      check(q == 16'hA000 + data_t'(i), "pre-empting block data");
    end

    // 4. simultaneous requests: the host (index 1) wins over master 2
    @(posedge clk);
    h_req <= 1; h_we <= 1; h_adr <= FB1_BASE | 17'd7; h_wd <= 16'h0707;
    d[2] <= 1; we[2] <= 1; adr[2] <= FB1_BASE | 17'd8; wd[2] <= 16'h0808;
    fork
      begin do @(posedge clk); while (!h_ack); t0 = cyc; h_req <= 0; end
      begin do @(posedge clk); while (!a[2]); t_rel = cyc; d[2] <= 0; end
    join
    check(t0 < t_rel, "priority: host before master 2");
    host(0, FB1_BASE | 17'd7, 16'h0, q); check(q == 16'h0707, "priority write 1");
    host(0, FB1_BASE | 17'd8, 16'h0, q); check(q == 16'h0808, "priority write 2");

    check(block_tenures > 0, "block transfers seen");
    check(word_tenures > 0, "word transfers seen");
    $display("mechanisms: block tenures %0d, word tenures %0d, pre-emptions %0d",
             block_tenures, word_tenures, preempts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
