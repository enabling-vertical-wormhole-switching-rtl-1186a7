// End-to-end test of the 3D NoC-bus hybrid with the TDMA BVA bus
// (BUS_KIND 1) at the default size (4x4x4, 4 VCs, 8-flit packets).
//
// Every router's LOCAL port is driven by a traffic source and drained by a
// sink. Three phases: uniform random traffic, localized traffic (half of the
// packets stay in the source's pillar) and a hot-spot phase in which many
// nodes send to the top-layer router of one pillar whose sink drains slowly,
// so that the UPDOWN input VCs there run out. Every packet carries its id in
// the head flit and {id, flit index} in every other flit; the sinks check
// destination, order, length, per-VC wormhole integrity and that every packet
// arrives exactly once. Counters of the BVA and bus mechanisms must all be
// non-zero at the end.
module tb_noc3d_top_tdma;
  import noc_pkg::*;

  localparam int NNODE   = NX*NY*NZ;
  localparam int NPKT    = 12;        // packets per node per phase
  localparam int WATCHDOG = 15000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           loc_in_valid  [NZ][NY][NX];
  flit_t          loc_in_flit   [NZ][NY][NX];
  logic [NVC-1:0] loc_in_credit [NZ][NY][NX];
  logic           loc_out_valid [NZ][NY][NX];
  flit_t          loc_out_flit  [NZ][NY][NX];
  logic [NVC-1:0] loc_out_credit[NZ][NY][NX];

  noc3d_top #(.BUS_KIND(1)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cycle, msg);
  endtask

  // ---------------------------------------------------------------- traffic
  int  phase = 0;               // 0 idle, 1 random, 2 localized, 3 hot spot
  int  sent_pkts = 0, recv_pkts = 0;
  int  exp_dest [int];          // packet id -> destination node
  int  got      [int];          // packet id -> times received
  int  t_inject [int];
  longint lat_sum = 0;

  function automatic int node_of(int x, int y, int z);
    return (z*NY + y)*NX + x;
  endfunction

  // Source state per node.
  int  src_left   [NNODE];
  int  src_idx    [NNODE];   // flit index within current packet, -1 none
  int  src_id     [NNODE];
  int  src_dest   [NNODE];
  int  src_vc     [NNODE];
  int  src_seq    [NNODE];
  int  src_cred   [NNODE][NVC];
  int  inj_pct = 10;

  // Sink state per node and VC.
  int  snk_id   [NNODE][NVC];
  int  snk_idx  [NNODE][NVC];  // -1: no packet open
  int  snk_owed [NNODE][NVC];
  bit  slow_sink[NNODE];
  int  nnodes = NNODE;          // loop bound kept variable: the loops stay loops

  function automatic int pick_dest(int x, int y, int z);
    int dx, dy, dz;
    do begin
      dx = $urandom_range(NX-1);
      dy = $urandom_range(NY-1);
      dz = $urandom_range(NZ-1);
      if (phase == 2 && $urandom_range(1) == 0) begin
        dx = x; dy = y;                  // same pillar
      end
      if (phase == 3) begin
        // hot spot: the top router of pillar (1,1) and its neighbours
        dx = 1; dy = 1; dz = NZ-1;
        if ($urandom_range(3) == 0) dz = 0;
      end
    end while (dx == x && dy == y && dz == z);
    return node_of(dx, dy, dz);
  endfunction

  function automatic logic [FLIT_W-1:0] flit_data(int id, int idx, int dest);
    if (idx == 0) return {id[23:0], 2'b00, 6'(dest % 64)} & 32'hFFFF_FF3F |
                         {26'd0, 2'(dest / (NX*NY)), 2'((dest / NX) % NY), 2'(dest % NX)};
    return {id[23:0], 8'(idx)};
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int n = 0; n < nnodes; n++) begin
        int x, y, z;
        x = n % NX; y = (n / NX) % NY; z = n / (NX*NY);
        loc_in_valid[z][y][x] <= 1'b0;
        loc_in_flit[z][y][x]  <= '0;
        loc_out_credit[z][y][x] <= '0;
        src_idx[n] <= -1;
        src_seq[n] <= 0;
        src_left[n] <= 0;
        for (int v = 0; v < NVC; v++) begin
          src_cred[n][v] = VC_DEPTH;
          snk_idx[n][v]  = -1;
          snk_owed[n][v] = 0;
        end
      end
    end else begin
      for (int n = 0; n < nnodes; n++) begin
        int x, y, z;
        x = n % NX; y = (n / NX) % NY; z = n / (NX*NY);
        // ---- source
        for (int v = 0; v < NVC; v++)
          if (loc_in_credit[z][y][x][v]) src_cred[n][v]++;
        loc_in_valid[z][y][x] <= 1'b0;
        if (src_idx[n] < 0 && src_left[n] > 0 &&
            $urandom_range(99) < inj_pct) begin
          int id;
          id = node_of(x, y, z) * 4096 + src_seq[n];
          src_seq[n]++;
          src_left[n]--;
          src_idx[n]  = 0;
          src_id[n]   = id;
          src_dest[n] = pick_dest(x, y, z);
          src_vc[n]   = $urandom_range(NVC-1);
          exp_dest[id] = src_dest[n];
          t_inject[id] = cycle;
          sent_pkts++;
        end
        if (src_idx[n] >= 0 && src_cred[n][src_vc[n]] > 0) begin
          flit_t f;
          int i;
          i = src_idx[n];
          f.vc   = VC_W'(src_vc[n]);
          f.data = flit_data(src_id[n], i, src_dest[n]);
          f.ftype = (PKT_LEN == 1) ? F_HEADTAIL : (i == 0) ? F_HEAD :
                    (i == PKT_LEN-1) ? F_TAIL : F_BODY;
          loc_in_valid[z][y][x] <= 1'b1;
          loc_in_flit[z][y][x]  <= f;
          src_cred[n][src_vc[n]]--;
          src_idx[n] = (i == PKT_LEN-1) ? -1 : i + 1;
        end

        // ---- sink
        if (loc_out_valid[z][y][x]) begin
          flit_t f;
          int v, me;
          f  = loc_out_flit[z][y][x];
          v  = int'(f.vc);
          me = node_of(x, y, z);
          snk_owed[n][v]++;
          checks++;
          if (snk_owed[n][v] > VC_DEPTH) fail("sink overflow (credit violation)");
          if (is_head(f)) begin
            int id;
            id = int'(f.data[31:8]);
            if (snk_idx[n][v] >= 0) fail($sformatf("head inside open packet at node %0d", me));
            if (!exp_dest.exists(id)) fail($sformatf("unknown packet id %0d", id));
            else if (exp_dest[id] != me) fail($sformatf("packet %0d at node %0d, expected %0d", id, me, exp_dest[id]));
            else if (f.data != flit_data(id, 0, me)) fail("head flit data");
            snk_id[n][v]  = id;
            snk_idx[n][v] = 1;
          end else begin
            if (snk_idx[n][v] < 0) fail("body flit with no open packet");
            else if (f.data != flit_data(snk_id[n][v], snk_idx[n][v], me))
              fail($sformatf("flit data node %0d vc %0d: got %h", me, v, f.data));
            snk_idx[n][v]++;
          end
          if (is_tail(f)) begin
            int id;
            id = snk_id[n][v];
            if (snk_idx[n][v] != PKT_LEN) fail("packet length");
            if (got.exists(id)) got[id]++; else got[id] = 1;
            if (t_inject.exists(id)) lat_sum += cycle - t_inject[id];
            recv_pkts++;
            snk_idx[n][v] = -1;
          end
        end
        for (int v = 0; v < NVC; v++) begin
          logic give;
          give = snk_owed[n][v] > 0 &&
                 (!slow_sink[n] || $urandom_range(7) == 0);
          loc_out_credit[z][y][x][v] <= give;
          if (give) snk_owed[n][v]--;
        end
      end
    end
  end

  // ------------------------------------------------------ mechanism counters
  int n_bva_grant = 0, n_bva_contend = 0, n_no_free_vc = 0, n_through = 0;
  int n_fifo_full = 0, n_stage_contend = 0, n_dual_eject = 0, n_bus_up = 0, n_bus_dn = 0;

  for (genvar py = 0; py < NY; py++) begin : g_cy
    for (genvar px = 0; px < NX; px++) begin : g_cx
      always @(posedge clk) if (rst_n) begin
        if (dut.g_py[py].g_px[px].u_pillar.bus_granted) n_bva_grant++;
        if ($countones(dut.g_py[py].g_px[px].u_pillar.bva_req) > 1) n_bva_contend++;
        if (dut.g_py[py].g_px[px].u_pillar.free_vc_exist != '1) n_no_free_vc++;
        for (int k = 0; k < NZ; k++) begin
          if (dut.g_py[py].g_px[px].u_pillar.ud_in_valid[k] &&
              dut.g_py[py].g_px[px].u_pillar.ud_in2_valid[k]) n_dual_eject++;
          if (dut.g_py[py].g_px[px].u_pillar.ud_in_valid[k]) n_bus_up++;
          if (dut.g_py[py].g_px[px].u_pillar.ud_in2_valid[k]) n_bus_dn++;
        end
      end
    end
  end

  task automatic run_phase(int ph, int pct, int npkt);
    int t0;
    phase   = ph;
    inj_pct = pct;
    for (int n = 0; n < nnodes; n++)
      src_left[n] = npkt;
    t0 = cycle;
    // wait until everything sent has arrived
    do @(posedge clk);
    while (recv_pkts != sent_pkts || sent_pkts == 0 || pending_src());
    $display("phase %0d: %0d packets delivered so far, %0d cycles", ph, recv_pkts, cycle - t0);
  endtask

  function automatic bit pending_src();
    for (int n = 0; n < nnodes; n++)
      if (src_left[n] > 0 || src_idx[n] >= 0) return 1;
    return 0;
  endfunction

  task automatic mech(string name, int n);
    checks++;
    $display("  %-32s %0d", name, n);
    if (n == 0) fail($sformatf("mechanism never exercised: %s", name));
  endtask

  initial begin
    for (int n = 0; n < nnodes; n++)
      slow_sink[n] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    run_phase(1, 8, NPKT);       // uniform random
    run_phase(2, 8, NPKT);       // localized
    slow_sink[node_of(1, 1, NZ-1)] = 1'b1;
    slow_sink[node_of(1, 1, 0)] = 1'b1;
    run_phase(3, 20, NPKT/3);    // hot spot
    repeat (20) @(posedge clk);

    // every packet exactly once
    foreach (exp_dest[id]) begin
      checks++;
      if (!got.exists(id)) fail($sformatf("packet %0d lost", id));
      else if (got[id] != 1) fail($sformatf("packet %0d received %0d times", id, got[id]));
    end
    $display("packets sent %0d received %0d, mean latency %0d cycles",
             sent_pkts, recv_pkts, (recv_pkts > 0) ? int'(lat_sum / recv_pkts) : 0);
    mech("BVA grants", n_bva_grant);
    mech("BVA requests from >1 layer", n_bva_contend);
    mech("cycles with a full UD input port", n_no_free_vc);
    mech("two lanes eject at one layer", n_dual_eject);
    mech("flits ejected from up lane", n_bus_up);
    mech("flits ejected from down lane", n_bus_dn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog: sent %0d received %0d", sent_pkts, recv_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
