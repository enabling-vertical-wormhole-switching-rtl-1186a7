// Test of a whole pillar, once with the pipelined bus (BUS_KIND 0) and once
// with the TDMA bus (BUS_KIND 1), 4 layers.
//
// On every layer the testbench plays the router: it writes 8-flit packets
// for random other layers into the UPDOWN buffer through the UD output port
// (keeping to the returned credits), and it models the router's UD input
// port: NVC VCs of 8 flits that are drained at a random rate, with a release
// pulse when a tail flit leaves. Checks: every packet arrives once, whole and
// in order, at its target layer; two packets never share an input VC at the
// same time and no VC ever holds more than its 8 flits, i.e. BVA reserved a
// free VC for every packet before its flits used the bus; the
// free_vc_exist signals do run low and several layers do request BVA in
// the same cycle.
module tb_bva_pillar;
  import noc_pkg::*;
  localparam int NL = 4;
  localparam int ND = 2;                // two pillars: pip_BVA, TDMA_BVA
  localparam int NPKT = 300;            // packets per pillar

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           ud_out_valid [ND][NL];
  flit_t          ud_out_flit  [ND][NL];
  logic [NVC-1:0] ud_out_credit[ND][NL];
  logic           ud_in_valid  [ND][NL];
  flit_t          ud_in_flit   [ND][NL];
  logic           ud_in2_valid [ND][NL];
  flit_t          ud_in2_flit  [ND][NL];
  logic [NVC-1:0] ud_release   [ND][NL];

  for (genvar d = 0; d < ND; d++) begin : g_dut
    bva_pillar #(.NL(NL), .BUS_KIND(d)) dut (
      .clk, .rst_n,
      .ud_out_valid(ud_out_valid[d]), .ud_out_flit(ud_out_flit[d]), .ud_out_credit(ud_out_credit[d]),
      .ud_in_valid(ud_in_valid[d]), .ud_in_flit(ud_in_flit[d]),
      .ud_in2_valid(ud_in2_valid[d]), .ud_in2_flit(ud_in2_flit[d]),
      .ud_release(ud_release[d])
    );
  end

  int checks = 0, failures = 0, cycle = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, msg);
    end
  endtask

  // source state [d][layer]
  int s_cred [ND][NL][NVC];
  int s_idx  [ND][NL], s_vc [ND][NL], s_id [ND][NL], s_dst [ND][NL];
  int s_left [ND];
  int sent [ND], recv [ND];
  int exp_dst [int];
  // UD input VC model [d][layer][vc]
  flit_t ivc [ND][NL][NVC][$];
  int    ivc_id  [ND][NL][NVC];   // packet currently owning the VC, 0 none
  int    ivc_idx [ND][NL][NVC];
  int    n_nofree [ND], n_contend [ND], n_dual [ND];
  int    next_id = 1;

  task automatic arrive(int d, int k, flit_t f);
    int v;
    v = int'(f.vc);
    ivc[d][k][v].push_back(f);
    check(ivc[d][k][v].size() <= UD_IN_DEPTH, "UD input VC overflow");
    if (is_head(f)) begin
      int id;
      id = int'(f.data[31:8]);
      check(ivc_id[d][k][v] == 0, "two packets in one UD input VC");
      check(exp_dst.exists(id) && exp_dst[id] == k, $sformatf("packet %0d at layer %0d", id, k));
      ivc_id[d][k][v]  = id;
      ivc_idx[d][k][v] = 1;
    end else begin
      check(ivc_id[d][k][v] != 0, "body flit in a VC with no packet");
      check(f.data == (32'(ivc_id[d][k][v]) << 8 | 32'(ivc_idx[d][k][v])), "flit order or data");
      ivc_idx[d][k][v]++;
    end
    if (is_tail(f)) begin
      check(ivc_idx[d][k][v] == PKT_LEN, "packet length");
      recv[d]++;
    end
  endtask

  task automatic step(int rate);
    for (int d = 0; d < ND; d++) begin
      if ($countones(g_dut_req(d)) > 1) n_contend[d]++;
      for (int k = 0; k < NL; k++) begin
        // credits back from the UPDOWN buffer
        for (int v = 0; v < NVC; v++) if (ud_out_credit[d][k][v]) s_cred[d][k][v]++;
        // bus deliveries
        if (ud_in_valid[d][k])  arrive(d, k, ud_in_flit[d][k]);
        if (ud_in2_valid[d][k]) arrive(d, k, ud_in2_flit[d][k]);
        if (ud_in_valid[d][k] && ud_in2_valid[d][k]) n_dual[d]++;
        // drain the UD input VCs; a tail leaving frees the VC
        ud_release[d][k] = '0;
        for (int v = 0; v < NVC; v++) begin
          if (ivc[d][k][v].size() > 0 && $urandom_range(99) < 30) begin
            flit_t f;
            f = ivc[d][k][v].pop_front();
            if (is_tail(f)) begin
              ud_release[d][k][v] = 1'b1;
              ivc_id[d][k][v] = 0;
            end
          end
        end
        // router UD output port
        ud_out_valid[d][k] = 0;
        if (s_idx[d][k] < 0 && s_left[d] > 0 && $urandom_range(99) < rate) begin
          int t;
          do t = $urandom_range(NL-1); while (t == k);
          s_id[d][k]  = next_id++;
          s_dst[d][k] = t;
          s_vc[d][k]  = $urandom_range(NVC-1);
          s_idx[d][k] = 0;
          exp_dst[s_id[d][k]] = t;
          s_left[d]--;
          sent[d]++;
        end
        if (s_idx[d][k] >= 0 && s_cred[d][k][s_vc[d][k]] > 0) begin
          flit_t f;
          f.vc    = VC_W'(s_vc[d][k]);
          f.ftype = (s_idx[d][k] == 0) ? F_HEAD : (s_idx[d][k] == PKT_LEN-1) ? F_TAIL : F_BODY;
          f.data  = (s_idx[d][k] == 0) ? (32'(s_id[d][k]) << 8 | 32'(s_dst[d][k]) << 4) :
                                         (32'(s_id[d][k]) << 8 | 32'(s_idx[d][k]));
          ud_out_valid[d][k] = 1;
          ud_out_flit[d][k]  = f;
          s_cred[d][k][s_vc[d][k]]--;
          s_idx[d][k] = (s_idx[d][k] == PKT_LEN-1) ? -1 : s_idx[d][k] + 1;
        end
      end
    end
  endtask

  function automatic logic [NL-1:0] g_dut_req(int d);
    return (d == 0) ? g_dut[0].dut.bva_req : g_dut[1].dut.bva_req;
  endfunction

  always @(negedge clk) if (rst_n)
    for (int d = 0; d < ND; d++) begin
      logic [NL-1:0] fe;
      fe = (d == 0) ? g_dut[0].dut.free_vc_exist : g_dut[1].dut.free_vc_exist;
      if (fe != '1) n_nofree[d]++;
    end

  initial begin
    for (int d = 0; d < ND; d++) begin
      s_left[d] = NPKT; sent[d] = 0; recv[d] = 0;
      n_nofree[d] = 0; n_contend[d] = 0; n_dual[d] = 0;
      for (int k = 0; k < NL; k++) begin
        s_idx[d][k] = -1;
        ud_out_valid[d][k] = 0; ud_out_flit[d][k] = '0; ud_release[d][k] = '0;
        for (int v = 0; v < NVC; v++) begin
          s_cred[d][k][v] = UD_BUF_DEPTH; ivc_id[d][k][v] = 0;
        end
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 30000 && (recv[0] + recv[1] < 2*NPKT); i++) begin
      @(negedge clk);
      cycle++;
      step(50);
    end
    for (int d = 0; d < ND; d++) begin
      check(sent[d] == NPKT && recv[d] == NPKT,
            $sformatf("bus kind %0d: sent %0d received %0d", d, sent[d], recv[d]));
      check(n_nofree[d] > 0, "free_vc_exist never went low");
      check(n_contend[d] > 0, "never more than one BVA request");
      $display("bus kind %0d: %0d packets, %0d cycles with a full UD port, %0d BVA contention cycles, %0d dual ejections",
               d, recv[d], n_nofree[d], n_contend[d], n_dual[d]);
    end
    check(n_dual[0] > 0, "lanes never delivered to one layer together");
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
