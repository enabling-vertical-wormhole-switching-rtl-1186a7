// Test of the pipelined BVA bus (4 layers, 4-flit Bus_FIFOs).
//
// Each layer has a source that plays the UPDOWN buffer: it offers its next
// flit only when the lane of that flit's direction is ready. Flits carry
// {source layer, sequence number}. The testbench checks that every flit is
// ejected exactly once, at its target layer, on the lane of its direction
// (up lane for flits from below), in order per source/target pair, that the
// FIFOs stall and the stages alternate under load, and that on an idle bus a
// flit crossing d layers is ejected d cycles after it was injected.
module tb_pip_bus;
  import noc_pkg::*;
  localparam int NL = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      inj_valid [NL];
  bus_flit_t inj_flit  [NL];
  logic      up_ready [NL], down_ready [NL];
  logic      ej_up_valid [NL], ej_dn_valid [NL];
  flit_t     ej_up_flit [NL], ej_dn_flit [NL];

  pip_bus #(.NL(NL)) dut (.*);

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
      if (cycle - inj_cyc[s*1000000 + d*10000 + q] != (k > s ? k - s : s - k)) lat_err++;
    end
    got++;
  endtask

  always @(posedge clk) cycle <= cycle + 1;

  always_ff @(posedge clk) if (rst_n) begin
    for (int k = 0; k < NL; k++) begin
      if (ej_up_valid[k]) eject(k, ej_up_flit[k], 1);
      if (ej_dn_valid[k]) eject(k, ej_dn_flit[k], 0);
      if ((k < NL-1 && dut.up_full[k]) || (k > 0 && dut.dn_full[k])) n_full++;
      if (inj_valid[k] && !((inj_flit[k].layer > k) ? up_ready[k] : down_ready[k]))
        check(0, "source sent to a lane that was not ready");
    end
    if (dut.g_stage[1].thr_up_v && dut.g_stage[1].loc_up_v) n_cont++;
  end

  // Sources: choose a target, offer the flit when its lane is ready.
  task automatic drive(int limit);
    for (int k = 0; k < NL; k++) begin
      inj_valid[k] = 0;
      if (pend_dst[k] < 0 && sent < limit && $urandom_range(99) < rate) begin
        int d;
        do d = $urandom_range(NL-1); while (d == k);
        pend_dst[k] = d;
      end
      if (pend_dst[k] >= 0 && ((pend_dst[k] > k) ? up_ready[k] : down_ready[k])) begin
        inj_valid[k] = 1;
        inj_flit[k]  = mk(k, pend_dst[k], seq[k][pend_dst[k]]);
        inj_cyc[k*1000000 + pend_dst[k]*10000 + seq[k][pend_dst[k]]] = cycle;
        seq[k][pend_dst[k]]++;
        pend_dst[k] = -1;
        sent++;
      end
    end
  endtask

  initial begin
    foreach (pend_dst[k]) begin pend_dst[k] = -1; inj_valid[k] = 0; inj_flit[k] = '0; end
    foreach (seq[s, d]) begin seq[s][d] = 0; next_seq[s][d] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // heavy load
    while (sent < 3000) begin
      @(negedge clk);
      drive(3000);
    end
    @(negedge clk);
    foreach (inj_valid[k]) inj_valid[k] = 0;
    repeat (40) @(posedge clk);
    check(got == sent, $sformatf("lost flits: sent %0d got %0d", sent, got));
    check(n_full > 0, "Bus_FIFO never filled");
    check(n_cont > 0, "stage never had local and through flits at once");
    // idle-bus latency: one flit at a time
    measure = 1;
    for (int i = 0; i < 60; i++) begin
      int s, d;
      @(negedge clk);
      s = $urandom_range(NL-1);
      do d = $urandom_range(NL-1); while (d == s);
      foreach (inj_valid[k]) inj_valid[k] = 0;
      inj_valid[s] = 1;
      inj_flit[s]  = mk(s, d, seq[s][d]);
      inj_cyc[s*1000000 + d*10000 + seq[s][d]] = cycle;
      seq[s][d]++;
      sent++;
      check((d > s) ? up_ready[s] : down_ready[s], "idle lane not ready");
      @(negedge clk);
      foreach (inj_valid[k]) inj_valid[k] = 0;
      repeat (NL) @(posedge clk);
    end
    check(lat_n == 60 && lat_err == 0, $sformatf("idle latency: %0d of %0d wrong", lat_err, lat_n));
    check(got == sent, "lost flits in latency test");
    $display("flits %0d, FIFO-full cycles %0d, contention cycles %0d", got, n_full, n_cont);
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
