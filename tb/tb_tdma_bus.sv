// Test of the TDMA BVA bus (4 layers).
//
// Each layer has a source that plays the UPDOWN buffer: it announces its
// pending direction on have_up/have_down and sends its flit when that lane's
// slot is granted to it. Flits carry {source layer, sequence number}. The
// testbench checks that each lane grants at most one layer per cycle and only
// a layer that asked, that every flit is ejected exactly once, at its target
// layer, on the lane of its direction, in order per source/target pair, one
// cycle after it was sent, and that under full load every requesting layer
// gets its share of slots.
module tb_tdma_bus;
  import noc_pkg::*;
  localparam int NL = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      inj_valid [NL];
  bus_flit_t inj_flit  [NL];
  logic      up_ready [NL], down_ready [NL];
  logic      have_up [NL], have_down [NL];
  logic      ej_up_valid [NL], ej_dn_valid [NL];
  flit_t     ej_up_flit [NL], ej_dn_flit [NL];

  tdma_bus #(.NL(NL)) dut (.*);

  always_comb
    for (int k = 0; k < NL; k++) begin
      have_up[k]   = pend_dst[k] > k;
      have_down[k] = pend_dst[k] >= 0 && pend_dst[k] < k;
    end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  int  cycle = 0;
  int  next_seq [NL][NL];     // [src][dst] next expected sequence
  int  seq      [NL][NL];     // [src][dst] next sequence to send
  int  pend_dst [NL];         // -1: none
  bit  sent_now [NL];
  int  sent = 0, got = 0;
  int  inj_cyc [int];         // key: src*1e6+dst*1e4+seq
  bit  measure = 0;
  int  lat_err = 0, lat_n = 0;
  int  n_full = 0, n_cont = 0;
  int  rate = 100;

  function automatic bus_flit_t mk(int s, int d, int q);
    bus_flit_t b;
    b = '0;
    b.layer = Z_W'(d);
    b.flit.ftype = F_BODY;
    b.flit.vc = VC_W'(q % NVC);
    b.flit.data = 32'(s) << 24 | 32'(d) << 16 | 32'(q);
    return b;
  endfunction

  task automatic eject(int k, flit_t f, bit up);
    int s, d, q;
    s = int'(f.data[31:24]); d = int'(f.data[23:16]); q = int'(f.data[15:0]);
    check(d == k, "flit ejected at the wrong layer");
    check(up == (s < k), "flit ejected from the wrong lane");
    check(q == next_seq[s][d], "flit order per source/target pair");
    check(f.vc == VC_W'(q % NVC), "VCID changed on the bus");
    next_seq[s][d] = q + 1;
    if (measure) begin
      lat_n++;
      if (cycle - inj_cyc[s*1000000 + d*10000 + q] != 1) lat_err++;
    end
    got++;
  endtask

  always @(posedge clk) cycle <= cycle + 1;

  // Sampled mid-cycle, away from the clock edge.
  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < NL; k++) begin
      if (ej_up_valid[k]) eject(k, ej_up_flit[k], 1);
      if (ej_dn_valid[k]) eject(k, ej_dn_flit[k], 0);
    end
  end

  task automatic check_slots();
    for (int k = 0; k < NL; k++) begin
      if (inj_valid[k] && !((inj_flit[k].layer > k) ? up_ready[k] : down_ready[k]))
        check(0, $sformatf("source %0d sent to a lane that was not ready (layer %0d up_rdy %b dn_rdy %b have %b%b pend %0d)", k, inj_flit[k].layer, up_ready[k], down_ready[k], have_up[k], have_down[k], pend_dst[k]));
    end
    begin
      int nu, nd, ru, rd;
      nu = 0; nd = 0; ru = 0; rd = 0;
      for (int k = 0; k < NL; k++) begin
        nu += int'(up_ready[k]);
        nd += int'(down_ready[k]);
        ru += int'(have_up[k]);
        rd += int'(have_down[k]);
        if (up_ready[k])   check(have_up[k], "up slot to a layer without an upward flit");
        if (down_ready[k]) check(have_down[k], "down slot to a layer without a downward flit");
      end
      check(nu == ((ru > 0) ? 1 : 0) && nd == ((rd > 0) ? 1 : 0), "one slot per lane per cycle");
      if (ru > 1 || rd > 1) n_cont++;
      nu = 0; nd = 0;
      for (int k = 0; k < NL; k++) begin
        nu += int'(ej_up_valid[k]);
        nd += int'(ej_dn_valid[k]);
      end
      check(nu <= 1 && nd <= 1, "more than one flit on a lane");
      n_full += nu + nd;
    end
  endtask

  always @(posedge clk)
    for (int k = 0; k < NL; k++)
      if (sent_now[k]) begin
        sent_now[k] = 0;
        pend_dst[k] = -1;
      end

  // Sources: choose a target, offer the flit when its lane is ready.
  // Sources choose a target first, then, once the slot grants have settled,
  // send when their lane is granted.
  task automatic drive(int limit);
    for (int k = 0; k < NL; k++) begin
      inj_valid[k] = 0;
      if (pend_dst[k] < 0 && sent < limit && $urandom_range(99) < rate) begin
        int d;
        do d = $urandom_range(NL-1); while (d == k);
        pend_dst[k] = d;
      end
    end
    #1;
    for (int k = 0; k < NL; k++) begin
      if (pend_dst[k] >= 0 && !sent_now[k] && ((pend_dst[k] > k) ? up_ready[k] : down_ready[k])) begin
        inj_valid[k] = 1;
        inj_flit[k]  = mk(k, pend_dst[k], seq[k][pend_dst[k]]);
        inj_cyc[k*1000000 + pend_dst[k]*10000 + seq[k][pend_dst[k]]] = cycle;
        seq[k][pend_dst[k]]++;
        sent_now[k] = 1;   // slot used: the request drops after this cycle
        sent++;
      end
    end
  endtask

  initial begin
    foreach (pend_dst[k]) begin pend_dst[k] = -1; sent_now[k] = 0; inj_valid[k] = 0; inj_flit[k] = '0; end
    foreach (seq[s, d]) begin seq[s][d] = 0; next_seq[s][d] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // heavy load
    while (sent < 3000) begin
      @(negedge clk);
      #1;
      drive(3000);
      #1;
      check_slots();
    end
    @(negedge clk);
    foreach (inj_valid[k]) inj_valid[k] = 0;
    foreach (pend_dst[k]) pend_dst[k] = -1;   // drop targets chosen but never sent
    repeat (40) @(posedge clk);
    check(got == sent, $sformatf("lost flits: sent %0d got %0d", sent, got));
    check(n_cont > 0, "lanes never had competing layers");
    // idle-bus latency: one flit at a time
    measure = 1;
    for (int i = 0; i < 60; i++) begin
      int s, d;
      @(negedge clk);
      s = $urandom_range(NL-1);
      do d = $urandom_range(NL-1); while (d == s);
      foreach (inj_valid[k]) inj_valid[k] = 0;
      pend_dst[s]  = d;
      sent_now[s]  = 1;
      inj_valid[s] = 1;
      inj_flit[s]  = mk(s, d, seq[s][d]);
      inj_cyc[s*1000000 + d*10000 + seq[s][d]] = cycle;
      seq[s][d]++;
      sent++;
      #1;
      check((d > s) ? up_ready[s] : down_ready[s], "idle lane not granted");
      check_slots();
      @(negedge clk);
      foreach (inj_valid[k]) inj_valid[k] = 0;
      repeat (NL) @(posedge clk);
    end
    check(lat_n == 60 && lat_err == 0, $sformatf("idle latency: %0d of %0d wrong", lat_err, lat_n));
    check(got == sent, "lost flits in latency test");
    $display("flits %0d, lane transfers %0d, contention cycles %0d", got, n_full, n_cont);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
