// Test of the planar VC router at mesh position (1,1,1) of a 4x4x4 system.
//
// Sources on all six input ports (the UD port on both of its write channels,
// one for VCs 0-1 and one for VCs 2-3) send packets of random length to
// random destinations, each keeping to the credits the router returns.
// Sinks on all six output ports take flits and return credits after random
// delays. Checks: every packet leaves on the port XYZ routing names, on one
// output VC with its flits in order and unmixed with other packets, no sink
// gets more flits than its credits allow, a released UD input VC is reported
// once per packet that came in through UD, and through an idle router a head
// flit needs 3 cycles from input to output (write, VC allocation, switch
// allocation) and the body flits follow one per cycle.
module tb_vc_router;
  import noc_pkg::*;
  localparam int MX = 1, MY = 1, MZ = 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           in_valid   [NPORT];
  flit_t          in_flit    [NPORT];
  logic [NVC-1:0] credit_out [NPORT];
  logic           ud_in2_valid;
  flit_t          ud_in2_flit;
  logic [NVC-1:0] ud_release;
  logic           out_valid  [NPORT];
  flit_t          out_flit   [NPORT];
  logic [NVC-1:0] credit_in  [NPORT];
  logic [X_W-1:0] my_x = X_W'(MX);
  logic [Y_W-1:0] my_y = Y_W'(MY);
  logic [Z_W-1:0] my_z = Z_W'(MZ);

  vc_router dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, msg);
    end
  endtask

  function automatic int xyz_port(int dx, int dy, int dz);
    if (dx > MX) return P_XP;
    if (dx < MX) return P_XM;
    if (dy > MY) return P_YP;
    if (dy < MY) return P_YM;
    if (dz != MZ) return P_UD;
    return P_LOCAL;
  endfunction

  // sources: 7 channels (6 ports + second UD channel)
  localparam int NCH = NPORT + 1;
  int  s_cred [NCH][NVC];
  int  s_vc   [NCH], s_idx [NCH], s_len [NCH], s_id [NCH], s_dest [NCH];
  int  s_left = 0;
  int  next_id = 1;
  int  exp_port [int];
  int  exp_len  [int];
  int  t_first  [int];
  int  ud_pkts_in = 0, ud_released = 0;
  int  done [int];
  int  recv = 0, sent = 0;
  // sinks
  int  k_owed [NPORT][NVC];
  int  k_out  [NPORT][NVC];   // outstanding flits = depth - credits
  int  k_open [NPORT][NVC];   // open packet id, 0 none
  int  k_idx  [NPORT][NVC];
  bit  measure = 0;
  int  lat_head = -1, lat_tail = -1;

  function automatic int depth_in(int ch);
    return (ch >= P_UD) ? UD_IN_DEPTH : VC_DEPTH;
  endfunction
  function automatic int depth_out(int p);
    return (p == P_UD) ? UD_BUF_DEPTH : VC_DEPTH;
  endfunction

  function automatic logic [FLIT_W-1:0] mkdata(int id, int idx, int dest);
    if (idx == 0) return 32'(id) << 8 | 32'(dest);
    return 32'(id) << 8 | 32'(idx);
  endfunction

  task automatic sources(int rate);
    for (int ch = 0; ch < NCH; ch++) begin
      if (s_idx[ch] < 0 && s_left > 0 && $urandom_range(99) < rate) begin
        int dx, dy, dz;
        dx = $urandom_range(NX-1); dy = $urandom_range(NY-1); dz = $urandom_range(NZ-1);
        s_id[ch]   = next_id++;
        s_len[ch]  = $urandom_range(1, PKT_LEN);
        s_dest[ch] = dz << 4 | dy << 2 | dx;
        s_vc[ch]   = (ch == P_UD) ? $urandom_range(1) : (ch == NPORT) ? 2 + $urandom_range(1) :
                     $urandom_range(NVC-1);
        s_idx[ch]  = 0;
        exp_port[s_id[ch]] = xyz_port(dx, dy, dz);
        exp_len[s_id[ch]]  = s_len[ch];
        if (ch >= P_UD) ud_pkts_in++;
        s_left--;
        sent++;
      end
    end
    for (int p = 0; p < NPORT; p++) in_valid[p] = 0;
    ud_in2_valid = 0;
    for (int ch = 0; ch < NCH; ch++) begin
      if (s_idx[ch] >= 0 && s_cred[ch][s_vc[ch]] > 0) begin
        flit_t f;
        f.vc    = VC_W'(s_vc[ch]);
        f.data  = mkdata(s_id[ch], s_idx[ch], s_dest[ch]);
        f.ftype = (s_len[ch] == 1) ? F_HEADTAIL : (s_idx[ch] == 0) ? F_HEAD :
                  (s_idx[ch] == s_len[ch]-1) ? F_TAIL : F_BODY;
        if (ch < NPORT) begin in_valid[ch] = 1; in_flit[ch] = f; end
        else begin ud_in2_valid = 1; ud_in2_flit = f; end
        if (s_idx[ch] == 0) t_first[s_id[ch]] = cycle;
        s_cred[ch][s_vc[ch]]--;
        s_idx[ch] = (s_idx[ch] == s_len[ch]-1) ? -1 : s_idx[ch] + 1;
      end
    end
  endtask

  // Sampled at the negative edge, when all registered outputs are stable.
  task automatic sample(int credit_pct);
    for (int p = 0; p < NPORT; p++) begin
      for (int v = 0; v < NVC; v++) begin
        if (credit_out[p][v]) s_cred[p][v]++;
        if (p == P_UD && credit_out[p][v]) begin
          // the UD port credits are shared by both channels by VC
          s_cred[P_UD][v]--; s_cred[NPORT][v]++;
          if (v < 2) begin s_cred[NPORT][v]--; s_cred[P_UD][v]++; end
        end
      end
      if (out_valid[p]) begin
        flit_t f;
        int v;
        f = out_flit[p];
        v = int'(f.vc);
        k_out[p][v]++;
        check(k_out[p][v] <= depth_out(p), "output VC credit overrun");
        k_owed[p][v]++;
        if (is_head(f)) begin
          int id;
          id = int'(f.data[31:8]);
          check(k_open[p][v] == 0, "head flit inside an open packet");
          check(exp_port.exists(id) && exp_port[id] == p, $sformatf("packet %0d left on port %0d", id, p));
          k_open[p][v] = id;
          k_idx[p][v]  = 1;
          if (measure) lat_head = cycle - t_first[id];
        end else begin
          check(k_open[p][v] != 0, "body flit without a packet");
          check(f.data == mkdata(k_open[p][v], k_idx[p][v], 0), "flit data or order");
          k_idx[p][v]++;
        end
        if (is_tail(f)) begin
          int id;
          id = k_open[p][v];
          check(exp_len.exists(id) && exp_len[id] == k_idx[p][v], "packet length");
          check(!done.exists(id), "packet delivered twice");
          done[id] = 1;
          if (measure) lat_tail = cycle - t_first[id];
          k_open[p][v] = 0;
          recv++;
        end
      end
      for (int v = 0; v < NVC; v++) begin
        credit_in[p][v] = 0;
        if (k_owed[p][v] > 0 && $urandom_range(99) < credit_pct) begin
          credit_in[p][v] = 1;
          k_owed[p][v]--;
          k_out[p][v]--;
        end
      end
    end
    ud_released += $countones(ud_release);
  endtask

  initial begin
    for (int ch = 0; ch < NCH; ch++) begin
      s_idx[ch] = -1;
      for (int v = 0; v < NVC; v++) s_cred[ch][v] = depth_in(ch);
    end
    // UD port: VCs 0-1 belong to the first channel, 2-3 to the second
    for (int v = 0; v < NVC; v++) begin
      if (v < 2) s_cred[NPORT][v] = 0; else s_cred[P_UD][v] = 0;
    end
    for (int p = 0; p < NPORT; p++) begin
      in_valid[p] = 0; in_flit[p] = '0; credit_in[p] = '0;
      for (int v = 0; v < NVC; v++) begin k_owed[p][v] = 0; k_out[p][v] = 0; k_open[p][v] = 0; end
    end
    ud_in2_valid = 0; ud_in2_flit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // idle latency: one 8-flit packet from LOCAL to the east
    @(negedge clk);
    measure = 1;
    s_left = 0;
    s_id[P_LOCAL] = next_id++; s_len[P_LOCAL] = PKT_LEN; s_dest[P_LOCAL] = MZ << 4 | MY << 2 | 3;
    s_vc[P_LOCAL] = 0; s_idx[P_LOCAL] = 0; sent++;
    exp_port[s_id[P_LOCAL]] = P_XP; exp_len[s_id[P_LOCAL]] = PKT_LEN;
    for (int i = 0; i < 30; i++) begin
      sample(100);
      sources(0);
      @(negedge clk);
      cycle++;
    end
    check(lat_head == 3, $sformatf("head flit latency %0d, expected 3", lat_head));
    check(lat_tail == 3 + PKT_LEN - 1, $sformatf("tail flit latency %0d, expected %0d", lat_tail, 3 + PKT_LEN - 1));
    measure = 0;

    // random load with slow sinks
    s_left = 600;
    for (int i = 0; i < 20000 && (s_left > 0 || recv < sent); i++) begin
      sample(40);
      sources(60);
      @(negedge clk);
      cycle++;
    end
    repeat (5) begin sample(100); sources(0); @(negedge clk); cycle++; end
    check(recv == sent && sent == 601, $sformatf("sent %0d received %0d", sent, recv));
    check(ud_released == ud_pkts_in, $sformatf("UD releases %0d for %0d UD packets", ud_released, ud_pkts_in));
    $display("packets %0d, UD packets %0d", recv, ud_pkts_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
